// Testbench for assert_window: test_expr must stay true from the cycle after start_event through the end_event cycle.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_window;
  logic start_event = 1'b0, end_event = 1'b0, test_expr = 1'b1;
  logic open_m = 1'b0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) begin
    if (!reset_n)               open_m <= 1'b0;
    else if (open_m)            open_m <= !end_event;
    else                        open_m <= start_event;
  end
  assign fail_now = (open_m && !test_expr);

  task automatic stim();
    start_event = $urandom_range(7) == 0;
    end_event   = $urandom_range(5) == 0;
    test_expr   = $urandom_range(9) != 0;
  endtask

  assert_window  dut (.reset_n, .clk, .start_event, .test_expr, .end_event, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
