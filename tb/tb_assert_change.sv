// Testbench for assert_change: test_expr must change within the 3 cycles after start_event.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_change;
  logic start_event = 1'b0;
  logic [1:0] test_expr = 2'd0, prev_m = 2'd0;
  int   left_m = 0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) begin
    prev_m <= test_expr;
    if (!reset_n)                 left_m <= 0;
    else if (left_m > 0)          left_m <= (test_expr != prev_m) ? 0 : left_m - 1;
    else if (start_event)         left_m <= 3;
  end
  assign fail_now = (left_m == 1 && test_expr == prev_m);

  task automatic stim();
    start_event = $urandom_range(5) == 0;
    if ($urandom_range(4) == 0) test_expr = 2'($urandom());
  endtask

  assert_change #(.WIDTH(2), .NUM_CKS(3)) dut (.reset_n, .clk, .start_event, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
