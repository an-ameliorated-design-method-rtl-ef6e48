// Self-checking test of the Mealy-type non-preemptive round-robin arbiter.
//
// Random request vectors and HREADY values drive the arbiter for 4000 cycles
// while a reference model, written here from the state diagram (READY /
// ACTION) and the round-robin rule, predicts the master select vector and
// the current master in every cycle. Directed cycles at the start check the
// same-cycle (Mealy) grant, the hold of the current master and the
// round-robin order. Requests are held for several cycles at a time so that
// holds and handovers both occur; they are counted and must all happen.
module tb_bm_arbiter;

  localparam int NM = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NM-1:0] sel;
  logic          hready;
  logic [NM-1:0] active;
  logic [1:0]    cur_master;

  bm_arbiter #(.NM(NM)) dut (.clk, .rst_n, .sel, .hready, .active, .cur_master);

  // Reference model.
  bit          ref_action;
  int          ref_cur;
  logic [NM-1:0] exp_active;
  int          exp_next;
  bit          exp_action;

  function automatic int rr(input logic [NM-1:0] r, input int last);
    for (int k = 1; k <= NM; k++) begin
      int c;
      c = (last + k) % NM;
      // masters above the last one first, then from master 0 upward
      if (last + k < NM && r[c]) return c;
    end
    for (int c = 0; c < NM; c++) if (r[c]) return c;
    return -1;
  endfunction

  always_comb begin
    exp_active = '0;
    exp_next   = ref_cur;
    exp_action = ref_action;
    if (!ref_action) begin
      if (sel != 0 && hready) begin
        exp_next = rr(sel, ref_cur);
        exp_active[exp_next] = 1'b1;
        exp_action = 1'b1;
      end
    end else if (sel[ref_cur]) begin
      exp_active[ref_cur] = 1'b1;
    end else if (sel != 0 && hready) begin
      exp_next = rr(sel, ref_cur);
      exp_active[exp_next] = 1'b1;
    end else begin
      exp_action = 1'b0;
    end
  end

  int checks = 0, failures = 0;
  int n_new = 0, n_hold = 0, n_handover = 0, n_wait = 0;

  task automatic step_and_check(input logic [NM-1:0] s, input logic h);
    sel = s;
    hready = h;
    #1;
    checks++;
    if (active !== exp_active || cur_master !== 2'(ref_cur)) begin
      failures++;
      $display("FAIL t=%0t sel=%b hready=%b active=%b exp=%b cur=%0d exp_cur=%0d",
               $time, sel, hready, active, exp_active, cur_master, ref_cur);
    end
    if (ref_action && sel[ref_cur]) n_hold++;
    if (ref_action && !sel[ref_cur] && exp_active != 0) n_handover++;
    if (!ref_action && exp_active != 0) n_new++;
    if (sel != 0 && exp_active == 0) n_wait++;
    @(posedge clk);
    ref_action = exp_action;
    ref_cur    = exp_next;
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NM-1:0] s;
    sel = '0; hready = 1'b1;
    ref_action = 1'b0; ref_cur = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Directed: master 2 alone gets the slave in the same cycle.
    step_and_check(4'b0100, 1'b1);
    checks++; if (active !== 4'b0100) begin failures++; $display("FAIL: no same-cycle grant"); end
    // Master 2 keeps it while others ask, even with HREADY low.
    step_and_check(4'b1101, 1'b0);
    checks++; if (active !== 4'b0100) begin failures++; $display("FAIL: preempted"); end
    step_and_check(4'b1101, 1'b1);
    // Master 2 drops: master 3 (above 2) is next, then wrap to 0.
    step_and_check(4'b1001, 1'b1);
    checks++; if (active !== 4'b1000) begin failures++; $display("FAIL: round robin order"); end
    step_and_check(4'b0001, 1'b1);
    checks++; if (active !== 4'b0001) begin failures++; $display("FAIL: round robin wrap"); end
    step_and_check(4'b0000, 1'b1);

    // Random.
    s = '0;
    for (int i = 0; i < 4000; i++) begin
      if ($urandom % 4 == 0) s = 4'($urandom);
      step_and_check(s, ($urandom % 4) != 0);
    end

    $display("new=%0d hold=%0d handover=%0d wait=%0d", n_new, n_hold, n_handover, n_wait);
    checks++; if (n_new == 0 || n_hold == 0 || n_handover == 0 || n_wait == 0) begin
      failures++; $display("FAIL: a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
