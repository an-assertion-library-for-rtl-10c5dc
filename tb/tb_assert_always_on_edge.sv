// Testbench for assert_always_on_edge: with EDGE_TYPE 1, test_expr must be true whenever sampling_event rises.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_always_on_edge;
  logic sampling_event = 1'b0, test_expr = 1'b1, prev_s = 1'b0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) prev_s <= reset_n && sampling_event;
  assign fail_now = (sampling_event && !prev_s && !test_expr);

  task automatic stim();
    sampling_event = $urandom_range(1) == 0;
    test_expr      = $urandom_range(5) != 0;
  endtask

  assert_always_on_edge #(.EDGE_TYPE(1)) dut (.reset_n, .clk, .sampling_event, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
