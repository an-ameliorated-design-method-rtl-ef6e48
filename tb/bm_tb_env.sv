// Random-traffic environment for one BusMatrix of NM masters and NS slaves.
//
// Every master runs N_TRANS random SINGLE/INCR4 reads and writes to random
// slaves (master 0 also to an unmapped address), with random slave wait
// states, and checks all read data. The environment reports the masters'
// summed checks and failures, adds a failure for any slave that saw an
// address outside its region, and raises done when every master is finished.
module bm_tb_env
  import bm_pkg::*;
#(
  parameter int unsigned NM      = 4,
  parameter int unsigned NS      = 4,
  parameter int unsigned N_TRANS = 20,
  localparam int unsigned MW     = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   delays
);

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

  ahb_busmatrix #(.NM(NM), .NS(NS)) dut (
    .clk, .rst_n, .hsel_m, .req_m, .hwdata_m, .hreadyout_m, .hresp_m, .hrdata_m,
    .hsel_s, .req_s, .hwdata_s, .hready_s, .hmaster_s, .rsp_s
  );

  logic [NM-1:0] m_done;
  int m_delays [NM], m_zero [NM], m_err [NM], m_lat [NM], m_len [NM];
  int m_ndone [NM], m_checks [NM], m_fail [NM];
  int s_waits [NS], s_xfers [NS], s_bad [NS];

  for (genvar m = 0; m < NM; m++) begin : g_m
    ahb_tb_master #(.MID(m), .NS(NS), .N_TRANS(N_TRANS)) u_m (
      .clk, .rst_n, .enable(1'b1), .fixed_slave(-1), .err_en(m == 0),
      .hsel(hsel_m[m]), .req(req_m[m]), .hwdata(hwdata_m[m]),
      .hready(hreadyout_m[m]), .hresp(hresp_m[m]), .hrdata(hrdata_m[m]),
      .done(m_done[m]), .delays(m_delays[m]), .zero_starts(m_zero[m]),
      .errors_seen(m_err[m]), .last_lat(m_lat[m]), .last_len(m_len[m]),
      .n_done(m_ndone[m]), .checks(m_checks[m]), .failures(m_fail[m])
    );
  end

  for (genvar s = 0; s < NS; s++) begin : g_s
    ahb_tb_slave #(.SID(s)) u_s (
      .clk, .rst_n, .waits_en(1'b1), .hsel(hsel_s[s]), .req(req_s[s]), .hwdata(hwdata_s[s]),
      .hready(hready_s[s]), .rsp(rsp_s[s]),
      .n_waits(s_waits[s]), .n_xfers(s_xfers[s]), .bad_addr(s_bad[s])
    );
  end

  always_comb begin
    done = &m_done;
    checks = 0; failures = 0; delays = 0;
    for (int m = 0; m < NM; m++) begin
      checks   += m_checks[m];
      failures += m_fail[m];
      delays   += m_delays[m];
    end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (s_bad[s] != 0) failures++;
    end
  end

endmodule
