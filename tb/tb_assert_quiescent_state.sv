// Testbench for assert_quiescent_state: state_expr must equal 3 whenever sample_event rises.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_quiescent_state;
  logic [2:0] state_expr = 3'd3, check_value = 3'd3;
  logic       sample_event = 1'b0, prev_s = 1'b0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) prev_s <= reset_n && sample_event;
  assign fail_now = (sample_event && !prev_s && state_expr != 3'd3);

  task automatic stim();
    sample_event = $urandom_range(2) == 0;
    state_expr   = ($urandom_range(3) == 0) ? 3'($urandom()) : 3'd3;
  endtask

  assert_quiescent_state #(.WIDTH(3)) dut (.reset_n, .clk, .state_expr, .check_value, .sample_event, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
