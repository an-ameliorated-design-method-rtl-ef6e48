// Self-checking test of the improved decoder of one master port (4 slaves).
//
// Random master requests (mapped and unmapped addresses, all transfer types),
// random Active bits and random slave responses drive the decoder. A
// reference model kept here predicts Sel towards every output stage and the
// HREADYOUT, HRESP and HRDATA the master sees: the data-phase slave's
// response when a data phase is open, a DELAY (HREADYOUT low, OKAY) when the
// addressed output stage has not selected the master, a two-cycle ERROR for
// unmapped NONSEQ/SEQ transfers, and a zero-wait OKAY otherwise. As the
// BusMatrix requires of its masters, the stimulus never asks for a slave it
// does not own while a data phase is open. Each response case must occur.
module tb_bm_decoder;
  import bm_pkg::*;

  localparam int NS = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              hsel;
  bm_req_t           req;
  logic              hreadyout;
  hresp_e            hresp;
  logic [DATA_W-1:0] hrdata;
  logic [NS-1:0]     sel_o, active_i;
  bm_rsp_t [NS-1:0]  rsp_i;

  bm_decoder #(.NS(NS), .SLV_LSB(28)) dut (
    .clk, .rst_n, .hsel, .req, .hreadyout, .hresp, .hrdata, .sel_o, .active_i, .rsp_i
  );

  bit ref_dv, ref_dflt, ref_err2;
  int ref_port;

  int checks = 0, failures = 0;
  int n_delay = 0, n_pass = 0, n_err = 0, n_okay = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hsel = 1'b0; req = REQ_IDLE; active_i = '0; rsp_i = '0;
    ref_dv = 0; ref_dflt = 0; ref_err2 = 0; ref_port = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int i = 0; i < 5000; i++) begin
      int idx, port;
      bit req_v, mapped, s;
      logic [NS-1:0] e_sel;
      logic e_ready;
      hresp_e e_resp;
      logic [DATA_W-1:0] e_rdata;

      // stimulus
      hsel = ($urandom % 8) != 0;
      req.htrans = htrans_e'($urandom % 4);
      idx = ($urandom % 6 == 0) ? 4 + ($urandom % 12) : ($urandom % NS);
      if (ref_dv && ($urandom % 2 == 0)) idx = ref_port;
      req.haddr = (32'(idx) << 28) | ($urandom & 32'h0FFF_FFFC);
      req.hwrite = $urandom % 2;
      active_i = 4'($urandom);
      for (int k = 0; k < NS; k++) begin
        rsp_i[k].hreadyout = ($urandom % 3) != 0;
        rsp_i[k].hresp     = ($urandom % 5 == 0) ? HRESP_ERROR : HRESP_OKAY;
        rsp_i[k].hrdata    = $urandom;
      end

      // reference
      req_v  = hsel && req.htrans != HTRANS_IDLE;
      mapped = idx < NS;
      s      = req_v && mapped;
      port   = idx % 16;
      if (ref_dv && s) active_i[port] = 1'b1;   // the masters' protocol rule
      e_sel = '0;
      if (s) e_sel[port] = 1'b1;
      e_rdata = ref_dv ? rsp_i[ref_port].hrdata : '0;
      if (ref_dv) begin
        e_ready = rsp_i[ref_port].hreadyout; e_resp = rsp_i[ref_port].hresp; n_pass++;
      end else if (ref_dflt) begin
        e_ready = ref_err2; e_resp = HRESP_ERROR; n_err++;
      end else if (s && !active_i[port]) begin
        e_ready = 1'b0; e_resp = HRESP_OKAY; n_delay++;
      end else begin
        e_ready = 1'b1; e_resp = HRESP_OKAY; n_okay++;
      end

      #1;
      checks++;
      if (sel_o !== e_sel || hreadyout !== e_ready || hresp !== e_resp || hrdata !== e_rdata) begin
        failures++;
        $display("FAIL i=%0d sel %b/%b ready %b/%b resp %0d/%0d rdata %h/%h", i,
                 sel_o, e_sel, hreadyout, e_ready, hresp, e_resp, hrdata, e_rdata);
      end

      @(posedge clk);
      if (e_ready) begin
        ref_dv   = s;
        ref_port = port;
        ref_dflt = req_v && !mapped && req.htrans[1];
        ref_err2 = 0;
      end else if (ref_dflt) begin
        ref_err2 = 1;
      end
      @(negedge clk);
    end

    $display("okay=%0d delay=%0d pass=%0d error=%0d", n_okay, n_delay, n_pass, n_err);
    checks++;
    if (n_okay == 0 || n_delay == 0 || n_pass == 0 || n_err == 0) begin
      failures++; $display("FAIL: a response case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
