// Output stage of one slave port, with its Mealy-type arbiter embedded.
//
// What it does: among the masters whose decoders request this slave, the
// arbiter (bm_arbiter) selects one in the same cycle; the output stage drives
// that master's address and control onto the slave port and tells each
// decoder whether its master is selected (active_o, the "Active" signal of
// the decoder diagram). In the following data phase it drives the write data
// of the master whose address phase the slave accepted.
//
// How it works: the address/control multiplexer is steered directly by the
// combinational master select of the arbiter, so a master reaches an idle
// slave with no register in between. When no master is selected the port
// carries an IDLE transfer with HSEL low. A register, loaded when the slave's
// HREADY is high, keeps the number of the data-phase master for the write
// data multiplexer. The slave's HREADYOUT is returned to the slave as HREADY
// (one master per slave layer, as in AHB-Lite) and is also the HREADY the
// arbiter sees. The slave's response goes back to all decoders unchanged;
// each decoder picks the slave it owns a data phase at.
//
// Interface: per-master sel_i, req_i, hwdata_i in and active_o out; one
// AHB-Lite slave port (hsel_s, req_s, hwdata_s, hready_s, hmaster_s out;
// rsp_s in). hmaster_s (number of the master in the address phase) is this
// design's addition for slaves that want it.
module bm_output_stage
  import bm_pkg::*;
#(
  parameter int unsigned NM = 4,
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // decoder side
  input  logic    [NM-1:0]      sel_i,
  input  bm_req_t [NM-1:0]      req_i,
  input  logic    [NM-1:0][DATA_W-1:0] hwdata_i,
  output logic    [NM-1:0]      active_o,
  // slave side
  output logic                  hsel_s,
  output bm_req_t               req_s,
  output logic    [DATA_W-1:0]  hwdata_s,
  output logic                  hready_s,
  output logic    [MW-1:0]      hmaster_s,
  input  bm_rsp_t               rsp_s
);

  logic [NM-1:0] active;
  logic [MW-1:0] cur_master;
  logic [MW-1:0] grant_idx;
  logic [MW-1:0] dp_master_q;

  bm_arbiter #(.NM(NM)) u_arbiter (
    .clk        (clk),
    .rst_n      (rst_n),
    .sel        (sel_i),
    .hready     (rsp_s.hreadyout),
    .active     (active),
    .cur_master (cur_master)
  );

  assign active_o = active;

  always_comb begin
    grant_idx = cur_master;
    for (int i = 0; i < NM; i++) if (active[i]) grant_idx = MW'(i);
  end

  // Address and control multiplexer.
  always_comb begin
    if (|active) begin
      hsel_s = 1'b1;
      req_s  = req_i[grant_idx];
    end else begin
      hsel_s = 1'b0;
      req_s  = req_i[grant_idx];
      req_s.htrans = HTRANS_IDLE;
    end
  end

  assign hmaster_s = grant_idx;
  assign hready_s  = rsp_s.hreadyout;

  // Write data multiplexer, steered by the data-phase master.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              dp_master_q <= '0;
    else if (rsp_s.hreadyout) dp_master_q <= grant_idx;
  end

  assign hwdata_s = hwdata_i[dp_master_q];

endmodule
