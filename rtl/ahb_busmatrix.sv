// Multi-layer AHB BusMatrix without input stages.
//
// A BusMatrix lets NM AHB-Lite masters reach NS AHB-Lite slaves in parallel:
// every master has its own layer, every slave its own arbiter, and masters
// that address different slaves proceed at the same time. The classic
// BusMatrix puts a register stage (input stage) behind every master port and
// arbitrates with a Moore-type FSM, which costs one clock cycle each time a
// master starts a transaction or moves to another slave. This BusMatrix
// removes the input stages and arbitrates with Mealy-type FSMs, so a master
// that addresses an idle slave is routed to it in the same cycle.
//
// Structure: one bm_decoder per master port, one bm_output_stage (with its
// bm_arbiter) per slave port, fully crossed. Decoder m sends its request to
// output stage s on sel[m][s]; output stage s answers with active[s][m]. Every
// decoder sees the response of every slave and selects the one it owns a data
// phase at.
//
// Rules for the masters (the price of having no input stage):
//   - A master that is not yet selected gets a DELAY response (HREADYOUT low,
//     HRESP OKAY) even to the IDLE transfer it had in data phase, so it must
//     treat its address phase as accepted only when HREADYOUT is high.
//   - Arbitration is non-preemptive: a master keeps a slave for as long as it
//     keeps requesting it. To let other masters in, a master inserts at least
//     one IDLE transfer after each transaction, and it starts a transaction at
//     another slave only after such an IDLE.
//
// Timing: address and control pass combinationally from a master port to the
// selected slave port; write data follow one cycle later as AHB requires.
// All registers are clocked by clk and reset by the active-low rst_n.
// Address map: slave s owns the addresses whose bits [31:SLV_LSB] equal s;
// other addresses give an ERROR response from a built-in default slave.
//
// The structure without input stages, the DELAY response, the Mealy arbiter
// and the non-preemptive round robin follow the published design; the bus
// widths, the address map, the default slave and hmaster_s are choices of
// this implementation.
module ahb_busmatrix
  import bm_pkg::*;
#(
  parameter int unsigned NM      = 4,
  parameter int unsigned NS      = 4,
  parameter int unsigned SLV_LSB = 28,
  localparam int unsigned MW     = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // master ports
  input  logic    [NM-1:0]              hsel_m,
  input  bm_req_t [NM-1:0]              req_m,
  input  logic    [NM-1:0][DATA_W-1:0]  hwdata_m,
  output logic    [NM-1:0]              hreadyout_m,
  output hresp_e  [NM-1:0]              hresp_m,
  output logic    [NM-1:0][DATA_W-1:0]  hrdata_m,
  // slave ports
  output logic    [NS-1:0]              hsel_s,
  output bm_req_t [NS-1:0]              req_s,
  output logic    [NS-1:0][DATA_W-1:0]  hwdata_s,
  output logic    [NS-1:0]              hready_s,
  output logic    [NS-1:0][MW-1:0]      hmaster_s,
  input  bm_rsp_t [NS-1:0]              rsp_s
);

  logic [NM-1:0][NS-1:0] sel;      // sel[m][s]: master m requests slave s
  logic [NS-1:0][NM-1:0] active;   // active[s][m]: slave s selects master m
  logic [NS-1:0][NM-1:0] sel_t;    // sel, transposed for the output stages
  logic [NM-1:0][NS-1:0] active_t; // active, transposed for the decoders

  always_comb begin
    for (int m = 0; m < NM; m++) begin
      for (int s = 0; s < NS; s++) begin
        sel_t[s][m]    = sel[m][s];
        active_t[m][s] = active[s][m];
      end
    end
  end

  for (genvar m = 0; m < NM; m++) begin : g_dec
    bm_decoder #(.NS(NS), .SLV_LSB(SLV_LSB)) u_decoder (
      .clk       (clk),
      .rst_n     (rst_n),
      .hsel      (hsel_m[m]),
      .req       (req_m[m]),
      .hreadyout (hreadyout_m[m]),
      .hresp     (hresp_m[m]),
      .hrdata    (hrdata_m[m]),
      .sel_o     (sel[m]),
      .active_i  (active_t[m]),
      .rsp_i     (rsp_s)
    );
  end

  for (genvar s = 0; s < NS; s++) begin : g_out
    bm_output_stage #(.NM(NM)) u_output_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .sel_i     (sel_t[s]),
      .req_i     (req_m),
      .hwdata_i  (hwdata_m),
      .active_o  (active[s]),
      .hsel_s    (hsel_s[s]),
      .req_s     (req_s[s]),
      .hwdata_s  (hwdata_s[s]),
      .hready_s  (hready_s[s]),
      .hmaster_s (hmaster_s[s]),
      .rsp_s     (rsp_s[s])
    );

    // AHB rule at every slave port: an address phase the slave stalls stays
    // in place, with the same master, until the slave takes it. This holds
    // because the arbiter never moves a slave to another master while
    // HREADY is low and masters hold their address while stalled.
    a_addr_held: assert property (@(posedge clk) disable iff (!rst_n)
      (hsel_s[s] && req_s[s].htrans[1] && !hready_s[s])
      |=> (hsel_s[s] && req_s[s].haddr == $past(req_s[s].haddr)
           && hmaster_s[s] == $past(hmaster_s[s])));
  end

endmodule
