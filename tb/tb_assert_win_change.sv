// Testbench for assert_win_change: test_expr must change at least once inside a start_event/end_event window.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_win_change;
  logic start_event = 1'b0, end_event = 1'b0;
  logic [1:0] test_expr = 2'd0, prev_m = 2'd0;
  logic open_m = 1'b0;
  int   n_changes = 0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) begin
    prev_m <= test_expr;
    if (!reset_n) begin open_m <= 1'b0; n_changes <= 0; end
    else if (open_m && end_event) begin open_m <= 1'b0; n_changes <= 0; end
    else if (open_m) n_changes <= n_changes + int'(test_expr != prev_m);
    else begin open_m <= start_event; n_changes <= 0; end
  end
  assign fail_now = (open_m && end_event && n_changes == 0 && test_expr == prev_m);

  task automatic stim();
    start_event = $urandom_range(7) == 0;
    end_event   = $urandom_range(4) == 0;
    if ($urandom_range(9) == 0) test_expr = 2'($urandom());
  endtask

  assert_win_change #(.WIDTH(2)) dut (.reset_n, .clk, .start_event, .test_expr, .end_event, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
