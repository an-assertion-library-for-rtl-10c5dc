// Testbench for assert_time: test_expr must hold for the 4 cycles after start_event.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_time;
  logic start_event = 1'b0, test_expr = 1'b1;
  int   left_m = 0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) begin
    if (!reset_n)         left_m <= 0;
    else if (left_m > 0)  left_m <= left_m - 1;
    else if (start_event) left_m <= 4;
  end
  assign fail_now = (left_m > 0 && !test_expr);

  task automatic stim();
    start_event = $urandom_range(9) == 0;
    test_expr   = $urandom_range(7) != 0;
  endtask

  assert_time #(.NUM_CKS(4)) dut (.reset_n, .clk, .start_event, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
