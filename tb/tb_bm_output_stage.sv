// Self-checking test of one output stage (4 masters) with its arbiter.
//
// Random requests, address-phase bundles, write data and slave responses
// drive the output stage. Checked every cycle, from values kept here:
//   - exactly one requesting master is selected whenever the slave is free
//     and HREADY is high (same-cycle selection), none when no one requests;
//   - a selected master stays selected while it keeps requesting
//     (non-preemptive);
//   - the slave port carries the selected master's address and control with
//     HSEL high, or an IDLE transfer with HSEL low when none is selected;
//   - HMASTER names the selected master and HREADY equals the slave's
//     HREADYOUT;
//   - the write data are those of the master whose address phase the slave
//     accepted last.
module tb_bm_output_stage;
  import bm_pkg::*;

  localparam int NM = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    [NM-1:0]             sel_i;
  bm_req_t [NM-1:0]             req_i;
  logic    [NM-1:0][DATA_W-1:0] hwdata_i;
  logic    [NM-1:0]             active_o;
  logic                         hsel_s;
  bm_req_t                      req_s;
  logic    [DATA_W-1:0]         hwdata_s;
  logic                         hready_s;
  logic    [1:0]                hmaster_s;
  bm_rsp_t                      rsp_s;

  bm_output_stage #(.NM(NM)) dut (
    .clk, .rst_n, .sel_i, .req_i, .hwdata_i, .active_o,
    .hsel_s, .req_s, .hwdata_s, .hready_s, .hmaster_s, .rsp_s
  );

  int checks = 0, failures = 0;
  int n_grant = 0, n_hold = 0, n_idle = 0;
  int prev_grant, dp_master;

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NM-1:0] s;
    sel_i = '0; req_i = '0; hwdata_i = '0; rsp_s = '0; rsp_s.hreadyout = 1'b1;
    prev_grant = -1; dp_master = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    s = '0;

    for (int i = 0; i < 4000; i++) begin
      int g;
      if ($urandom % 4 == 0) s = 4'($urandom);
      sel_i = s;
      for (int m = 0; m < NM; m++) begin
        req_i[m].haddr  = $urandom;
        req_i[m].htrans = sel_i[m] ? htrans_e'(2 + $urandom % 2) : HTRANS_IDLE;
        req_i[m].hwrite = $urandom % 2;
        req_i[m].hsize  = 3'b010;
        req_i[m].hburst = 3'($urandom);
        req_i[m].hprot  = 4'($urandom);
        hwdata_i[m]     = $urandom;
      end
      rsp_s.hreadyout = ($urandom % 3) != 0;
      rsp_s.hresp     = HRESP_OKAY;
      rsp_s.hrdata    = $urandom;
      #1;

      g = -1;
      for (int m = 0; m < NM; m++) if (active_o[m]) g = m;
      expect_true($onehot0(active_o), "more than one master selected");
      expect_true((active_o & ~sel_i) == '0, "a master selected without a request");
      if (prev_grant >= 0 && sel_i[prev_grant]) begin
        expect_true(g == prev_grant, "current master preempted");
        n_hold++;
      end else if (sel_i != 0 && rsp_s.hreadyout) begin
        expect_true(g >= 0, "free slave, request, HREADY high, but no selection");
        n_grant++;
      end
      if (g >= 0) begin
        expect_true(hsel_s && req_s == req_i[g] && int'(hmaster_s) == g,
                    "slave port does not carry the selected master");
      end else begin
        expect_true(!hsel_s && req_s.htrans == HTRANS_IDLE, "slave port not idle");
        n_idle++;
      end
      expect_true(hready_s == rsp_s.hreadyout, "HREADY to slave");
      expect_true(hwdata_s == hwdata_i[dp_master], "write data of the wrong master");

      @(posedge clk);
      prev_grant = g;
      if (rsp_s.hreadyout) dp_master = (g >= 0) ? g : int'(hmaster_s);
      @(negedge clk);
    end

    $display("grant=%0d hold=%0d idle=%0d", n_grant, n_hold, n_idle);
    expect_true(n_grant > 0 && n_hold > 0 && n_idle > 0, "a case was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
