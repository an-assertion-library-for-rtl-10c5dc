// Testbench for assert_next: test_expr must be true 3 cycles after each start_event.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_next;
  logic start_event = 1'b0, test_expr = 1'b1;
  int   cyc = 0;
  bit   started[int];
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) begin
    if (reset_n && start_event) started[cyc] = 1'b1;
    cyc <= cyc + 1;
  end
  assign fail_now = started.exists(cyc - 3) && !test_expr;

  task automatic stim();
    start_event = $urandom_range(3) == 0;
    test_expr   = $urandom_range(4) != 0;
  endtask

  assert_next #(.NUM_CKS(3)) dut (.reset_n, .clk, .start_event, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
