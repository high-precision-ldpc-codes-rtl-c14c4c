// tb_decode_quant: whole decoding runs with the two quantisations whose
// bit-true error rates are the main fixed-point comparison for the 2-output
// update: channel LLRs on 6 bits with extrinsic messages on 7 bits (the
// high-precision case), and LLRs and messages both on 5 bits (the
// low-complexity case). Each runs in its own ldpc_decode_harness with P = 1
// on a random code of the sizes of a rate-0.82, length-4095, column-weight-4
// code; the LSB is 0.5 in both cases, so the 5-bit messages saturate at
// +-7.5 and the 7-bit ones at +-31.5. Each harness sends 30 frames at
// 4.0 dB, which must all but at most one decode to the sent codeword, and
// 10 frames at 3.5 dB, which are reported. The error rates themselves are
// printed, not judged: far more frames would be needed for that.
module tb_decode_quant;
  bit done_hi, done_lo;
  int checks_hi, checks_lo, failures_hi, failures_lo;

  ldpc_decode_harness #(.P(1), .NL(6), .NM(7)) u_hi (
    .done(done_hi), .checks(checks_hi), .failures(failures_hi));
  ldpc_decode_harness #(.P(1), .NL(5), .NM(5)) u_lo (
    .done(done_lo), .checks(checks_lo), .failures(failures_lo));

  initial begin
    wait (done_hi && done_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks_hi + checks_lo,
             failures_hi + failures_lo);
    $finish;
  end

  // outer watchdog, in case a harness never signals done
  initial begin
    #500ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_hi + checks_lo,
             failures_hi + failures_lo + 1);
    $finish;
  end
endmodule
