// Improved decoder of one master port (no input stage in front of it).
//
// What it does: it decodes the master's address to a slave port, sends the
// master's transfer request (Sel) to that port's output stage, and returns to
// the master the response of the slave that owns the master's data phase.
// It also takes over the one job of the removed input stage that still
// matters, generating responses: if the addressed output stage has not
// selected this master (its Active bit is low), the decoder answers with a
// DELAY response, HREADYOUT low and HRESP OKAY, which holds the master's
// address phase until the output stage selects it.
//
// How it works (after the document's block diagram of the decoder):
//   - Sel = HSEL and HTRANS not IDLE and address mapped to a slave port.
//     The address decoding gives the slave port number (AddrOutPort); Sel is
//     demultiplexed onto sel_o[AddrOutPort], and Active is taken from the same
//     port.
//   - Two registers, enabled by the master's HREADY, hold Sel and the port
//     number for the data phase (DataOutPort). In a data phase the slave's
//     HREADYOUT, HRESP and HRDATA are selected by DataOutPort.
//   - With no data phase open, HREADYOUT is '0' (DELAY) when Sel is high and
//     Active is low, and '1' with OKAY otherwise.
// The master's own HREADY is the HREADYOUT this decoder drives, as on an
// AHB-Lite layer with one master.
//
// Address map (this design's choice; the document refers the decoder's
// details to the ARM BusMatrix manual): slave port s answers addresses whose
// bits [ADDR_W-1:SLV_LSB] equal s. Other addresses belong to a built-in
// default slave that gives the usual two-cycle ERROR response to NONSEQ and
// SEQ transfers and a zero-wait OKAY to IDLE and BUSY.
//
// Protocol rule this decoder relies on (the document's restriction): a master
// starts a transaction at a new slave only after an IDLE transfer, or while
// it has no open data phase, so a DELAY never hides the end of a data phase.
// An assertion checks it.
module bm_decoder
  import bm_pkg::*;
#(
  parameter int unsigned NS      = 4,
  parameter int unsigned SLV_LSB = 28,
  localparam int unsigned SW     = (NS > 1) ? $clog2(NS) : 1,
  localparam int unsigned IW     = ADDR_W - SLV_LSB
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // master side
  input  logic                   hsel,
  input  bm_req_t                req,
  output logic                   hreadyout,
  output hresp_e                 hresp,
  output logic [DATA_W-1:0]      hrdata,
  // output-stage side
  output logic [NS-1:0]          sel_o,
  input  logic [NS-1:0]          active_i,
  input  bm_rsp_t [NS-1:0]       rsp_i
);

  logic [IW-1:0] addr_idx;
  logic          mapped;
  logic [SW-1:0] addr_port;     // AddrOutPort
  logic          req_v;         // transfer request of any kind but IDLE
  logic          sel;           // Sel
  logic          act;           // Active of the addressed port

  logic          dp_valid_q;    // registered Sel: a data phase at a slave is open
  logic [SW-1:0] dp_port_q;     // DataOutPort
  logic          dflt_q;        // data phase at the default slave
  logic          err2_q;        // second cycle of an ERROR response

  assign addr_idx  = req.haddr[ADDR_W-1:SLV_LSB];
  assign mapped    = (addr_idx < IW'(NS));
  assign addr_port = SW'(addr_idx);
  assign req_v     = hsel && (req.htrans != HTRANS_IDLE);
  assign sel       = req_v && mapped;
  assign act       = active_i[addr_port];

  always_comb begin
    sel_o = '0;
    if (sel) sel_o[addr_port] = 1'b1;
  end

  // Response multiplexers (the shaded blocks of the diagram).
  always_comb begin
    hreadyout = 1'b1;
    hresp     = HRESP_OKAY;
    if (dp_valid_q) begin
      hreadyout = rsp_i[dp_port_q].hreadyout;
      hresp     = rsp_i[dp_port_q].hresp;
    end else if (dflt_q) begin
      hreadyout = err2_q;
      hresp     = HRESP_ERROR;
    end else if (sel && !act) begin
      hreadyout = 1'b0;            // DELAY
      hresp     = HRESP_OKAY;
    end
  end

  assign hrdata = dp_valid_q ? rsp_i[dp_port_q].hrdata : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid_q <= 1'b0;
      dp_port_q  <= '0;
      dflt_q     <= 1'b0;
      err2_q     <= 1'b0;
    end else begin
      if (hreadyout) begin
        dp_valid_q <= sel;
        dp_port_q  <= addr_port;
        dflt_q     <= req_v && !mapped && req.htrans[1];
        err2_q     <= 1'b0;
      end else if (dflt_q) begin
        err2_q     <= 1'b1;
      end
    end
  end

  // A request made while a data phase is still open must already own the
  // addressed slave; otherwise the DELAY would mask the slave's HREADYOUT.
  a_no_hidden_dp: assert property (@(posedge clk) disable iff (!rst_n)
                                   (dp_valid_q && sel) |-> act);

endmodule
