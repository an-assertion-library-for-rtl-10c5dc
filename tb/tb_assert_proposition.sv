// Testbench for assert_proposition: test_expr must never be low, including short pulses between clock edges.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_proposition;
  logic test_expr = 1'b1;
  logic glitch_m = 1'b0;
  int   n_glitch = 0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(negedge test_expr) glitch_m <= 1'b1;
  always @(posedge clk) if (test_expr) glitch_m <= 1'b0;

  // failures that only the between-edge catch can see
  int n_glitch_only = 0;
  always @(posedge clk) if (reset_n && !escen && glitch_m && test_expr) n_glitch_only++;
  assign fail_now = (glitch_m || !test_expr);

  task automatic stim();
    case ($urandom_range(11))
      0: test_expr = 1'b0;
      1: begin
        test_expr = 1'b1;
        n_glitch++;
        fork begin #1 test_expr = 1'b0; #1 test_expr = 1'b1; end join_none
      end
      default: test_expr = 1'b1;
    endcase
  endtask

  assert_proposition  dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    checks++;
    if (n_glitch == 0 || n_glitch_only == 0) begin
      failures++;
      $display("no glitch-only failure was exercised");
    end
    $display("glitches=%0d glitch_only_failures=%0d", n_glitch, n_glitch_only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
