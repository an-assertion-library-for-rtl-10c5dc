// Testbench for assert_win_unchange: test_expr may not change inside a start_event/end_event window.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_win_unchange;
  logic start_event = 1'b0, end_event = 1'b0;
  logic [1:0] test_expr = 2'd0, prev_m = 2'd0;
  logic open_m = 1'b0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) begin
    prev_m <= test_expr;
    if (!reset_n)               open_m <= 1'b0;
    else if (open_m)            open_m <= !end_event;
    else                        open_m <= start_event;
  end
  assign fail_now = (open_m && test_expr != prev_m);

  task automatic stim();
    start_event = $urandom_range(7) == 0;
    end_event   = $urandom_range(5) == 0;
    if ($urandom_range(7) == 0) test_expr = 2'($urandom());
  endtask

  assert_win_unchange #(.WIDTH(2)) dut (.reset_n, .clk, .start_event, .test_expr, .end_event, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
