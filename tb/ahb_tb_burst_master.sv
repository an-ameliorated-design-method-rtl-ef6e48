// Directed AHB-Lite burst master for timing tests.
//
// On a start pulse it issues one INCR burst of len beats (4, 8 or 16; other
// lengths go out as INCR) of writes from address base, holding each address
// phase while HREADY is low, and drives IDLE after the last beat. It reports,
// in the testbench's cycle numbers (cyc), when its first and last address
// phases were accepted and when its last data phase ended, and how many
// cycles it spent in DELAY (address phase pending, no data phase open).
module ahb_tb_burst_master
  import bm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  int                cyc,
  input  logic              start,
  input  int                len,
  input  logic [31:0]       base,
  output logic              hsel,
  output bm_req_t           req,
  output logic [DATA_W-1:0] hwdata,
  input  logic              hready,
  output logic              busy,
  output int                first_acc,
  output int                last_acc,
  output int                done_at,
  output int                delays
);

  int  left;
  logic d_valid, d_last;

  assign hsel = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req <= REQ_IDLE; hwdata <= '0; left <= 0; busy <= 1'b0;
      d_valid <= 1'b0; d_last <= 1'b0;
      first_acc <= -1; last_acc <= -1; done_at <= -1; delays <= 0;
    end else if (start && !busy) begin
      req.htrans <= HTRANS_NONSEQ;
      req.haddr  <= base;
      req.hwrite <= 1'b1;
      req.hburst <= (len == 4) ? 3'b011 : (len == 8) ? 3'b101 : (len == 16) ? 3'b111 : 3'b001;
      left       <= len - 1;
      busy       <= 1'b1;
      first_acc <= -1; last_acc <= -1; done_at <= -1; delays <= 0;
    end else if (!hready) begin
      if (req.htrans != HTRANS_IDLE && !d_valid) delays <= delays + 1;
    end else begin
      if (d_valid && d_last) begin
        done_at <= cyc;
        busy    <= 1'b0;
      end
      d_valid <= req.htrans[1];
      d_last  <= req.htrans[1] && left == 0;
      hwdata  <= req.haddr ^ 32'h5A5A_0000;
      if (req.htrans == HTRANS_NONSEQ) first_acc <= cyc;
      if (req.htrans[1] && left == 0) last_acc <= cyc;
      if (req.htrans[1] && left != 0) begin
        req.htrans <= HTRANS_SEQ;
        req.haddr  <= req.haddr + 4;
        left       <= left - 1;
      end else begin
        req.htrans <= HTRANS_IDLE;
      end
    end
  end

endmodule
