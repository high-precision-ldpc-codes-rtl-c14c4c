// tb_mmin_accumulator: checks the M-min* accumulator.
//
// Random reordered streams chi (edges 1..d-1, then the minimum at node_end)
// are applied back to back with the control unit's schedule. Two cycles after
// node_end theta0 must equal the in-order M-min* fold of the first d-1
// values and theta1 the fold continued with the last one, both computed with
// ldpc_ref_pkg::mmin_ref. The theta registers must then hold until the next
// node's results arrive.
module tb_mmin_accumulator;
  import ldpc_ref_pkg::*;
  localparam int MW = 5;
  localparam int T = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic acc_en, acc_first, node_end;
  logic [MW-1:0] chi, theta0, theta1;

  mmin_accumulator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit a_acc[T], a_afirst[T], a_end[T], a_chk[T];
  int a_chi[T], a_t0[T], a_t1[T];
  int degs[] = '{2, 3, 4, 6, 9, 9, 14, 20, 30};

  initial begin
    int s, e, acc, lastc;
    s = 0;
    lastc = 0;
    foreach (degs[n]) begin
      int d;
      d = degs[n];
      // edge 0 of a node carries nothing into the accumulator
      for (int k = 1; k < d; k++) begin
        a_chi[s+k] = $urandom_range(0, (1 << MW) - 1);
        a_acc[s+k] = 1'b1;
        a_afirst[s+k] = (k == 1);
      end
      acc = a_chi[s+1];
      for (int k = 2; k < d; k++) acc = mmin_ref(a_chi[s+k], acc);
      e = s + d;
      a_end[e] = 1'b1;
      a_chi[e] = $urandom_range(0, (1 << MW) - 1);
      // results visible from e+2 until the next node's e'+1
      for (int c = e + 2; c < e + 2 + d; c++) begin
        a_chk[c] = 1'b1;
        a_t0[c] = acc;
        a_t1[c] = mmin_ref(a_chi[e], acc);
      end
      s = e;
    end
    {acc_en, acc_first, node_end} = '0;
    chi = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < T; c++) begin
      @(negedge clk);
      acc_en = a_acc[c]; acc_first = a_afirst[c]; node_end = a_end[c];
      chi = MW'(a_chi[c]);
      #1;
      if (a_chk[c]) begin
        checks++;
        if (int'(theta0) != a_t0[c] || int'(theta1) != a_t1[c]) begin
          failures++;
          $display("cycle %0d: theta %0d/%0d expected %0d/%0d", c, theta0, theta1, a_t0[c], a_t1[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
