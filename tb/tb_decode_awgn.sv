// tb_decode_awgn: whole decoding runs over an AWGN channel with the node
// processors at their default sizes. Two decoders run side by side, each in
// an ldpc_decode_harness with its own random code of the sizes of a
// rate-0.82, length-4095, column-weight-4 code: one with the 2-output check
// node update (P = 1), one with the 3-output update (P = 2). Each harness
// sends 30 frames at 4.0 dB, which must all but at most one decode to the
// sent codeword, and 10 frames at 3.5 dB, which are reported.
module tb_decode_awgn;
  bit done1, done2;
  int checks1, checks2, failures1, failures2;
  int checks, failures;

  ldpc_decode_harness #(.P(1)) u_p1 (.done(done1), .checks(checks1), .failures(failures1));
  ldpc_decode_harness #(.P(2)) u_p2 (.done(done2), .checks(checks2), .failures(failures2));

  initial begin
    wait (done1 && done2);
    checks = checks1 + checks2;
    failures = failures1 + failures2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // outer watchdog, in case a harness never signals done
  initial begin
    #500ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks2, failures1 + failures2 + 1);
    $finish;
  end
endmodule
