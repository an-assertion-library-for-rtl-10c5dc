// Testbench for assert_no_transition: state 2 must never be followed by state 5.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_no_transition;
  logic [2:0] test_expr = 3'd0;
  logic [2:0] start_state = 3'd2, next_state = 3'd5;
  logic [2:0] prev_m = 3'd0;
  logic       valid_m = 1'b0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) begin
    prev_m  <= test_expr;
    valid_m <= reset_n;
  end
  assign fail_now = (valid_m && prev_m == 3'd2 && test_expr == 3'd5);

  task automatic stim();
    case ($urandom_range(5))
      0, 1:    test_expr = 3'd2;
      2:       test_expr = 3'd5;
      3:       ;
      default: test_expr = 3'($urandom());
    endcase
  endtask

  assert_no_transition #(.WIDTH(3)) dut (.reset_n, .clk, .test_expr, .start_state, .next_state, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
