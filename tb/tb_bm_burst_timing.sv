// Cycle-count test of the BusMatrix (default 4x4) with INCR4, INCR8 and
// INCR16 write bursts, no slave wait states.
//
// Lone burst: a master that finds its slave idle must have its NONSEQ
// accepted in the first cycle and finish a burst of BL beats BL+1 cycles
// after it first drove NONSEQ. A BusMatrix with an input stage and a Moore
// arbiter needs BL+2, so the gain is 1/(BL+1); the test prints it.
// Two masters, one slave: both start a burst in the same cycle. One of them
// runs without a wait; the other gets DELAY responses for exactly BL cycles,
// has its NONSEQ accepted in the cycle after the first master's last address
// phase, and both bursts are done 2*BL+1 cycles after they started.
module tb_bm_burst_timing;
  import bm_pkg::*;

  localparam int NM = 4, NS = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int cyc;
  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  logic    [NM-1:0]             hsel_m;
  bm_req_t [NM-1:0]             req_m;
  logic    [NM-1:0][DATA_W-1:0] hwdata_m;
  logic    [NM-1:0]             hreadyout_m;
  hresp_e  [NM-1:0]             hresp_m;
  logic    [NM-1:0][DATA_W-1:0] hrdata_m;
  logic    [NS-1:0]             hsel_s;
  bm_req_t [NS-1:0]             req_s;
  logic    [NS-1:0][DATA_W-1:0] hwdata_s;
  logic    [NS-1:0]             hready_s;
  logic    [NS-1:0][1:0]        hmaster_s;
  bm_rsp_t [NS-1:0]             rsp_s;

  ahb_busmatrix dut (
    .clk, .rst_n, .hsel_m, .req_m, .hwdata_m, .hreadyout_m, .hresp_m, .hrdata_m,
    .hsel_s, .req_s, .hwdata_s, .hready_s, .hmaster_s, .rsp_s
  );

  logic [1:0] start;
  int         len;
  logic [1:0] busy;
  int first_acc [2], last_acc [2], done_at [2], delays [2];
  int s_waits [NS], s_xfers [NS], s_bad [NS];

  for (genvar m = 0; m < 2; m++) begin : g_m
    ahb_tb_burst_master u_m (
      .clk, .rst_n, .cyc, .start(start[m]), .len, .base(32'h0000_0100 * (m + 1)),
      .hsel(hsel_m[m]), .req(req_m[m]), .hwdata(hwdata_m[m]), .hready(hreadyout_m[m]),
      .busy(busy[m]), .first_acc(first_acc[m]), .last_acc(last_acc[m]),
      .done_at(done_at[m]), .delays(delays[m])
    );
  end
  for (genvar m = 2; m < NM; m++) begin : g_idle
    assign hsel_m[m]   = 1'b0;
    assign req_m[m]    = REQ_IDLE;
    assign hwdata_m[m] = '0;
  end
  for (genvar s = 0; s < NS; s++) begin : g_s
    ahb_tb_slave #(.SID(s)) u_s (
      .clk, .rst_n, .waits_en(1'b0), .hsel(hsel_s[s]), .req(req_s[s]), .hwdata(hwdata_s[s]),
      .hready(hready_s[s]), .rsp(rsp_s[s]),
      .n_waits(s_waits[s]), .n_xfers(s_xfers[s]), .bad_addr(s_bad[s])
    );
  end

  int checks = 0, failures = 0;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, w, l;
    int lens [3] = '{4, 8, 16};
    start = '0; len = 4;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    foreach (lens[i]) begin
      len = lens[i];
      // lone burst
      t0 = cyc; start = 2'b01;
      @(negedge clk); start = '0;
      wait (!busy[0]); @(negedge clk);
      expect_eq(first_acc[0] - t0, 1, $sformatf("INCR%0d lone: NONSEQ accepted after", len));
      expect_eq(delays[0], 0, $sformatf("INCR%0d lone: DELAY cycles", len));
      expect_eq(done_at[0] - t0, len + 1, $sformatf("INCR%0d lone: burst cycles", len));
      $display("INCR%0d: %0d cycles, %0d with an input stage: gain %0.1f %% (1/(BL+1) = %0.1f %%)",
               len, done_at[0] - t0, len + 2,
               100.0 * real'((len + 2) - (done_at[0] - t0)) / real'(done_at[0] - t0),
               100.0 / real'(len + 1));
      repeat (2) @(negedge clk);

      // two masters, one slave
      t0 = cyc; start = 2'b11;
      @(negedge clk); start = '0;
      wait (!busy[0] && !busy[1]); @(negedge clk);
      w = (first_acc[0] < first_acc[1]) ? 0 : 1;
      l = 1 - w;
      expect_eq(first_acc[w] - t0, 1, $sformatf("INCR%0d shared: first master start", len));
      expect_eq(delays[w], 0, $sformatf("INCR%0d shared: first master DELAY cycles", len));
      expect_eq(delays[l], len, $sformatf("INCR%0d shared: second master DELAY cycles", len));
      expect_eq(first_acc[l], last_acc[w] + 1, $sformatf("INCR%0d shared: handover gap", len));
      expect_eq(done_at[l] - t0, 2 * len + 1, $sformatf("INCR%0d shared: total cycles", len));
      repeat (2) @(negedge clk);
    end
    expect_eq(s_xfers[0], 3 * (4 + 8 + 16), "beats seen by slave 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
