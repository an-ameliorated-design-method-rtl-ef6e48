// Behavioural AHB-Lite memory slave for the BusMatrix testbenches.
//
// A 128-word memory indexed by address bits [8:2]. Word i of slave SID starts
// at INIT_BASE | SID<<12 | i after reset, so a reader can predict what it has
// not written. Each data phase of a NONSEQ or SEQ transfer takes 0 to
// WAIT_MAX wait states (random) when waits_en is high, none otherwise. IDLE
// and BUSY transfers get a zero-wait OKAY. The model counts the wait states
// it inserts, the transfers it serves, and address phases outside its own
// address region (bad_addr, which must stay zero).
module ahb_tb_slave
  import bm_pkg::*;
#(
  parameter int unsigned SID       = 0,
  parameter int unsigned SLV_LSB   = 28,
  parameter int unsigned WAIT_MAX  = 2,
  parameter logic [31:0] INIT_BASE = 32'hC0DE_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              waits_en,
  input  logic              hsel,
  input  bm_req_t           req,
  input  logic [DATA_W-1:0] hwdata,
  input  logic              hready,
  output bm_rsp_t           rsp,
  output int                n_waits,
  output int                n_xfers,
  output int                bad_addr
);

  logic [DATA_W-1:0] mem [128];
  logic              dv_q, dw_q;
  logic [6:0]        didx_q;
  int unsigned       wcnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 128; i++) mem[i] <= INIT_BASE | (SID << 12) | i;
      dv_q <= 1'b0; dw_q <= 1'b0; didx_q <= '0; wcnt_q <= 0;
      n_waits <= 0; n_xfers <= 0; bad_addr <= 0;
    end else begin
      if (hready) begin
        if (dv_q && dw_q) mem[didx_q] <= hwdata;
        if (hsel && req.htrans[1]) begin
          dv_q   <= 1'b1;
          dw_q   <= req.hwrite;
          didx_q <= req.haddr[8:2];
          wcnt_q <= waits_en ? ($urandom % (WAIT_MAX + 1)) : 0;
          n_xfers <= n_xfers + 1;
          if (req.haddr[31:SLV_LSB] != (32 - SLV_LSB)'(SID)) bad_addr <= bad_addr + 1;
        end else begin
          dv_q   <= 1'b0;
          wcnt_q <= 0;
        end
      end else if (wcnt_q != 0) begin
        wcnt_q  <= wcnt_q - 1;
        n_waits <= n_waits + 1;
      end
    end
  end

  always_comb begin
    rsp.hreadyout = !(dv_q && wcnt_q != 0);
    rsp.hresp     = HRESP_OKAY;
    rsp.hrdata    = (dv_q && !dw_q) ? mem[didx_q] : '0;
  end

endmodule
