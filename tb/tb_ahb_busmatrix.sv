// End-to-end test of the BusMatrix at its default size (4 masters, 4 slaves).
//
// Four behavioural masters run random SINGLE and INCR4 read/write
// transactions through the BusMatrix to four memory slaves; each master
// checks every read against its own shadow copy, so a lost, duplicated or
// misrouted transfer shows up as a data mismatch. The test runs in three
// phases:
//   1. master 0 alone on slave 0 with no wait states: every transaction must
//      start without a wait cycle and take exactly (beats + 1) cycles from
//      its first NONSEQ to its last data phase, the same-cycle arbitration
//      this BusMatrix exists for;
//   2. all masters on slave 1: DELAY responses, non-preemptive holding and
//      round-robin handovers;
//   3. all masters on random slaves with random wait states, master 0 also
//      sending reads to an unmapped address (ERROR response).
// A monitor counts each mechanism and counts a failure for one that never
// happened.
module tb_ahb_busmatrix;
  import bm_pkg::*;

  localparam int unsigned NM = 4;
  localparam int unsigned NS = 4;
  localparam int unsigned MW = 2;
  localparam int unsigned N_TRANS = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

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
  logic    [NS-1:0][MW-1:0]     hmaster_s;
  bm_rsp_t [NS-1:0]             rsp_s;

  ahb_busmatrix dut (
    .clk, .rst_n, .hsel_m, .req_m, .hwdata_m, .hreadyout_m, .hresp_m, .hrdata_m,
    .hsel_s, .req_s, .hwdata_s, .hready_s, .hmaster_s, .rsp_s
  );

  logic [NM-1:0] m_en, m_done;
  int m_fixed [NM];
  int m_delays [NM], m_zero [NM], m_err [NM], m_lat [NM], m_len [NM];
  int m_ndone [NM], m_checks [NM], m_fail [NM];
  logic waits_en, err_en;
  int s_waits [NS], s_xfers [NS], s_bad [NS];

  for (genvar m = 0; m < NM; m++) begin : g_m
    ahb_tb_master #(.MID(m), .NS(NS), .N_TRANS(N_TRANS)) u_m (
      .clk, .rst_n, .enable(m_en[m]), .fixed_slave(m_fixed[m]), .err_en(err_en && m == 0),
      .hsel(hsel_m[m]), .req(req_m[m]), .hwdata(hwdata_m[m]),
      .hready(hreadyout_m[m]), .hresp(hresp_m[m]), .hrdata(hrdata_m[m]),
      .done(m_done[m]), .delays(m_delays[m]), .zero_starts(m_zero[m]),
      .errors_seen(m_err[m]), .last_lat(m_lat[m]), .last_len(m_len[m]),
      .n_done(m_ndone[m]), .checks(m_checks[m]), .failures(m_fail[m])
    );
  end

  for (genvar s = 0; s < NS; s++) begin : g_s
    ahb_tb_slave #(.SID(s)) u_s (
      .clk, .rst_n, .waits_en, .hsel(hsel_s[s]), .req(req_s[s]), .hwdata(hwdata_s[s]),
      .hready(hready_s[s]), .rsp(rsp_s[s]),
      .n_waits(s_waits[s]), .n_xfers(s_xfers[s]), .bad_addr(s_bad[s])
    );
  end

  // Mechanism monitor.
  int n_handover, n_parallel, n_hold, cycles;
  logic [NS-1:0][MW-1:0] last_m;
  logic [NS-1:0]         seen;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_handover <= 0; n_parallel <= 0; n_hold <= 0; cycles <= 0; seen <= '0; last_m <= '0;
    end else begin
      int busy;
      cycles <= cycles + 1;
      busy = 0;
      for (int s = 0; s < NS; s++) begin
        if (hsel_s[s] && hready_s[s]) begin
          busy++;
          if (seen[s] && last_m[s] != hmaster_s[s]) n_handover <= n_handover + 1;
          seen[s]   <= 1'b1;
          last_m[s] <= hmaster_s[s];
        end
        if (hsel_s[s] && req_s[s].htrans == HTRANS_SEQ)
          for (int m = 0; m < NM; m++)
            if (m != int'(hmaster_s[s]) && req_m[m].htrans != HTRANS_IDLE &&
                req_m[m].haddr[31:28] == 4'(s))
              n_hold <= n_hold + 1;
      end
      if (busy >= 2) n_parallel <= n_parallel + 1;
    end
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    for (int m = 0; m < NM; m++) begin
      checks   += m_checks[m];
      failures += m_fail[m];
    end
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_en = '0;
    waits_en = 1'b0;
    err_en = 1'b0;
    for (int m = 0; m < NM; m++) m_fixed[m] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Phase 1: one master, idle slave, no wait states.
    m_en[0] = 1'b1;
    for (int t = 0; t < 4; t++) begin
      int n_prev;
      n_prev = m_ndone[0];
      wait (m_ndone[0] != n_prev);
      @(negedge clk);
      check(m_lat[0] == m_len[0] + 1,
            $sformatf("uncontended %0d-beat transaction took %0d cycles", m_len[0], m_lat[0]));
    end
    check(m_delays[0] == 0, "DELAY seen by a lone master");
    check(m_zero[0] >= 4, "lone master start was delayed");

    // Phase 2: everyone on slave 1.
    for (int m = 0; m < NM; m++) m_fixed[m] = 1;
    m_en = '1;
    wait (m_ndone[0] >= 12 && m_ndone[1] >= 8 && m_ndone[2] >= 8 && m_ndone[3] >= 8);

    // Phase 3: random slaves, wait states, ERROR responses.
    for (int m = 0; m < NM; m++) m_fixed[m] = -1;
    waits_en = 1'b1;
    err_en = 1'b1;
    wait (&m_done);
    repeat (4) @(posedge clk);

    for (int m = 0; m < NM; m++) begin
      checks   += m_checks[m];
      failures += m_fail[m];
      check(m_ndone[m] == N_TRANS, $sformatf("master %0d finished %0d transactions", m, m_ndone[m]));
    end
    for (int s = 0; s < NS; s++) check(s_bad[s] == 0, $sformatf("slave %0d got foreign addresses", s));

    $display("mechanisms: zero-wait starts=%0d delays=%0d handovers=%0d holds=%0d parallel=%0d waits=%0d errors=%0d cycles=%0d",
             m_zero[0] + m_zero[1] + m_zero[2] + m_zero[3],
             m_delays[0] + m_delays[1] + m_delays[2] + m_delays[3],
             n_handover, n_hold, n_parallel,
             s_waits[0] + s_waits[1] + s_waits[2] + s_waits[3], m_err[0], cycles);
    check(m_delays[1] + m_delays[2] + m_delays[3] > 0, "no DELAY response happened");
    check(n_handover > 0, "no master handover happened");
    check(n_hold > 0, "no non-preemptive hold happened");
    check(n_parallel > 0, "no parallel access happened");
    check(s_waits[0] + s_waits[1] + s_waits[2] + s_waits[3] > 0, "no slave wait state happened");
    check(m_err[0] > 0, "no ERROR response happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
