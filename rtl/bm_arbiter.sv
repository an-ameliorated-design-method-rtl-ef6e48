// Output arbiter of one slave port: a Mealy-type FSM with non-preemptive
// round-robin selection.
//
// The arbiter watches the transfer requests (sel, one bit per master, the
// "Sel" of each master's decoder addressed to this slave) and the HREADY of
// the slave layer. Because it is a Mealy machine, the master select vector
// (active) is a combinational function of the present requests, so a master
// on an idle slave is selected in the very cycle it drives its first NONSEQ
// address: no cycle is lost at the start of a transaction.
//
// States, as the document's state diagram gives them:
//   READY  : no master holds the slave. With a request and HREADY high, a
//            master is picked by round robin and the FSM goes to ACTION;
//            otherwise nothing happens.
//   ACTION : the current master holds the slave for as long as its request
//            stays high (non-preemptive). When it drops its request, another
//            requester is picked by round robin if HREADY is high; otherwise
//            the FSM returns to READY.
// Round robin uses a mask: requests of masters numbered above the current
// master win first; if there is none, the lowest-numbered request wins.
//
// Interface: sel[NM] and hready in, active[NM] (one-hot or zero, same cycle)
// and cur_master (the last selected master, registered) out.
// The state and the current master are updated on the rising edge of clk;
// the reset (active-low, asynchronous) enters READY with master 0 as the
// last selected master, which is this design's choice.
module bm_arbiter #(
  parameter int unsigned NM = 4,
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NM-1:0] sel,
  input  logic          hready,
  output logic [NM-1:0] active,
  output logic [MW-1:0] cur_master
);

  typedef enum logic {ST_READY = 1'b0, ST_ACTION = 1'b1} arb_state_e;

  arb_state_e  state_q, state_d;
  logic [MW-1:0] cur_q, cur_d;
  logic [NM-1:0] mask, masked;
  logic [MW-1:0] rr_pick;

  // Round-robin pick with a masking mechanism.
  always_comb begin
    for (int unsigned i = 0; i < NM; i++) mask[i] = (i > 32'(cur_q));
    masked  = sel & mask;
    rr_pick = '0;
    if (|masked) begin
      for (int i = NM - 1; i >= 0; i--) if (masked[i]) rr_pick = MW'(i);
    end else begin
      for (int i = NM - 1; i >= 0; i--) if (sel[i]) rr_pick = MW'(i);
    end
  end

  // Mealy next-state and output logic.
  always_comb begin
    state_d = state_q;
    cur_d   = cur_q;
    active  = '0;
    unique case (state_q)
      ST_READY: begin
        if (|sel && hready) begin
          active[rr_pick] = 1'b1;
          cur_d           = rr_pick;
          state_d         = ST_ACTION;
        end
      end
      ST_ACTION: begin
        if (sel[cur_q]) begin
          active[cur_q] = 1'b1;
        end else if (|sel && hready) begin
          active[rr_pick] = 1'b1;
          cur_d           = rr_pick;
        end else begin
          state_d = ST_READY;
        end
      end
      default: state_d = ST_READY;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_READY;
      cur_q   <= '0;
    end else begin
      state_q <= state_d;
      cur_q   <= cur_d;
    end
  end

  assign cur_master = cur_q;

  // At most one master is selected, and only one that requests.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(active));
  a_req:    assert property (@(posedge clk) disable iff (!rst_n) (active & ~sel) == '0);

endmodule
