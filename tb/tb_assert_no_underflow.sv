// Testbench for assert_no_underflow: after the value 3 (MIN) the next value may not drop below 3 or reach 14 (MAX) or above.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_no_underflow;
  logic [3:0] test_expr = 4'd9;
  logic [3:0] prev_m = 4'd0;
  logic       valid_m = 1'b0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) begin
    prev_m  <= test_expr;
    valid_m <= reset_n;
  end
  assign fail_now = (valid_m && prev_m == 4'd3 && (test_expr < 4'd3 || test_expr >= 4'd14));

  task automatic stim();
    case ($urandom_range(7))
      0:       test_expr = 4'($urandom());
      1:       ;
      2:       test_expr = 4'd3;
      default: test_expr = test_expr - 4'd1;
    endcase
  endtask

  assert_no_underflow #(.WIDTH(4), .MIN(3), .MAX(14)) dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
