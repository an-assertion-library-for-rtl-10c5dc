// Testbench for assert_handshake with MIN_ACK_CYCLE 1, MAX_ACK_CYCLE 4 and
// REQ_DROP 1. req and ack toggle at random, so legal handshakes and every
// violation (ack without req, repeated req, early ack, late ack, dropped req)
// occur; the reference model below follows the request in plain integers and is
// checked cycle by cycle through the shared scan harness, which also counts
// how often each violation kind was seen.
module tb_assert_handshake;
  logic req = 1'b0, ack = 1'b0;
  logic fail_now;

  `include "tb_assert_common.svh"

  logic rq_m = 1'b0, aq_m = 1'b0;
  int   age_m = -1;          // cycles since the open request rose, -1 if none
  int   n_kind[5] = '{default: 0};

  function automatic logic [4:0] kinds();
    logic rr, ar;
    int   age;
    rr  = req && !rq_m;
    ar  = ack && !aq_m;
    age = (age_m >= 0) ? age_m : (rr ? 0 : -1);
    kinds[0] = ar && age < 0;                    // ack without request
    kinds[1] = rr && age_m >= 0;                 // request repeated
    kinds[2] = ar && age >= 0 && age < 1;        // ack too early
    kinds[3] = !ar && age == 4;                  // ack too late
    kinds[4] = age_m >= 0 && !req && !ar;        // req dropped
  endfunction

  assign fail_now = (kinds() != 5'b0);

  always @(posedge clk) begin
    if (!reset_n) begin
      rq_m <= 1'b0; aq_m <= 1'b0; age_m <= -1;
    end
    else begin
      logic rr, ar;
      int   age;
      rr  = req && !rq_m;
      ar  = ack && !aq_m;
      age = (age_m >= 0) ? age_m : (rr ? 0 : -1);
      for (int i = 0; i < 5; i++) if (kinds()[i]) n_kind[i]++;
      rq_m <= req;
      aq_m <= ack;
      if (age < 0 || ar || age == 4) age_m <= -1;
      else                           age_m <= age + 1;
    end
  end

  task automatic stim();
    if ($urandom_range(3) == 0) req = !req;
    if ($urandom_range(2) == 0) ack = !ack;
  endtask

  assert_handshake #(.MIN_ACK_CYCLE(1), .MAX_ACK_CYCLE(4), .REQ_DROP(1'b1)) dut (
    .reset_n, .clk, .req, .ack, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    $display("violations: no_req=%0d repeat=%0d early=%0d late=%0d drop=%0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4]);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_kind[i] == 0) begin failures++; $display("violation kind %0d never occurred", i); end
    end
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
