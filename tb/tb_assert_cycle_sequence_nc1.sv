// Testbench for assert_cycle_sequence (mode 1): event 2 must be followed by event 1 and then event 0 in the next cycles.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_cycle_sequence_nc1;
  logic [2:0] event_sequence = 3'b000;
  logic [2:0] h1 = 3'b000, h2 = 3'b000;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) begin
    h1 <= reset_n ? event_sequence : 3'b000;
    h2 <= reset_n ? h1 : 3'b000;
  end
  assign fail_now = ((h1[2] && !event_sequence[1]) || (h2[2] && !event_sequence[0]));

  task automatic stim();
    event_sequence = 3'($urandom()) | 3'b011;
    if ($urandom_range(3) == 0) event_sequence[$urandom_range(1)] = 1'b0;
  endtask

  assert_cycle_sequence #(.NUM_CKS(3), .NECESSARY_CONDITION(1)) dut (.reset_n, .clk, .event_sequence, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
