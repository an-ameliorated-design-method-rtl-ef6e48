// Random traffic through the four BusMatrix sizes of the evaluation:
// 2x2, 4x4, 6x6 and 8x8 masters x slaves, side by side. Each must finish all
// transactions with every read correct, and its masters must have met
// contention (DELAY responses) at least once.
module tb_bm_sizes;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] done;
  int chk [4], fail [4], dly [4];

  bm_tb_env #(.NM(2), .NS(2)) u_2x2 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .delays(dly[0]));
  bm_tb_env #(.NM(4), .NS(4)) u_4x4 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .delays(dly[1]));
  bm_tb_env #(.NM(6), .NS(6)) u_6x6 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .delays(dly[2]));
  bm_tb_env #(.NM(8), .NS(8)) u_8x8 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .delays(dly[3]));

  int checks = 0, failures = 0;

  task automatic report();
    for (int i = 0; i < 4; i++) begin
      checks   += chk[i] + 1;
      failures += fail[i];
      if (dly[i] == 0) begin
        failures++;
        $display("FAIL: size %0d never saw a DELAY response", 2 * (i + 1));
      end
      $display("%0dx%0d: checks=%0d failures=%0d delays=%0d", 2 * (i + 1), 2 * (i + 1), chk[i], fail[i], dly[i]);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    report();
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    repeat (4) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
