// Testbench for ovl_rt_err_cell: a random fail strobe is checked against the
// harness's independent model of the sticky error flip-flop, the scan stage and
// the active-low error chain.
module tb_ovl_rt_err_cell;
  logic fail = 1'b0;
  logic fail_now;

  `include "tb_assert_common.svh"

  assign fail_now = fail;

  task automatic stim();
    fail = $urandom_range(7) == 0;
  endtask

  ovl_rt_err_cell dut (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
