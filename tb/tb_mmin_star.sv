// tb_mmin_star: exhaustive check of the M-min* operator for 5-bit magnitudes
// against the floating-point definition in ldpc_ref_pkg::mmin_ref.
module tb_mmin_star;
  import ldpc_ref_pkg::*;
  localparam int MW = 5;
  logic [MW-1:0] a, b, y;
  int checks = 0, failures = 0;

  mmin_star dut (.a, .b, .y);

  initial begin
    for (int i = 0; i < (1 << MW); i++) begin
      for (int j = 0; j < (1 << MW); j++) begin
        a = MW'(i);
        b = MW'(j);
        #1;
        checks++;
        if (int'(y) != mmin_ref(i, j)) begin
          failures++;
          if (failures < 10) $display("M-min*(%0d,%0d) = %0d, expected %0d", i, j, y, mmin_ref(i, j));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
