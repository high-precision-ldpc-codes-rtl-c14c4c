// tb_cn_sign_proc: checks the check node sign processor.
//
// The control signals of the serial schedule are generated here from a list
// of node degrees (back to back, non-decreasing): edges push on consecutive
// cycles, node_end comes with the next node's edge 0, fin_load one cycle
// later and the d output pops from two cycles after node_end. Each output
// sign is compared with the product rule computed from the input signs.
module tb_cn_sign_proc;
  localparam int DCN_MAX = 30;
  localparam int T = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, if_first, in_sign, node_end, fin_load, pop, out_sign;

  cn_sign_proc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit a_push[T], a_first[T], a_sign[T], a_end[T], a_load[T], a_pop[T], a_exp[T];
  int degs[] = '{2, 3, 4, 4, 5, 7, 10, 15, 22, 29, 30, 30};

  initial begin
    int s, e, par;
    int sg[];
    s = 0;
    foreach (degs[n]) begin
      int d;
      d = degs[n];
      sg = new[d];
      for (int k = 0; k < d; k++) begin
        sg[k] = $urandom_range(0, 1);
        a_push[s+k]  = 1'b1;
        a_first[s+k] = (k == 0);
        a_sign[s+k]  = sg[k][0];
      end
      e = s + d;
      a_end[e]    = 1'b1;
      a_load[e+1] = 1'b1;
      for (int j = 0; j < d; j++) begin
        par = d % 2;
        for (int k = 0; k < d; k++) if (k != j) par ^= sg[k];
        a_pop[e+2+j] = 1'b1;
        a_exp[e+2+j] = par[0];
      end
      s = e;
    end
    {push, if_first, in_sign, node_end, fin_load, pop} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < T; c++) begin
      @(negedge clk);
      push = a_push[c]; if_first = a_first[c]; in_sign = a_sign[c];
      node_end = a_end[c]; fin_load = a_load[c]; pop = a_pop[c];
      #1;
      if (a_pop[c]) begin
        checks++;
        if (out_sign != a_exp[c]) begin
          failures++;
          $display("cycle %0d: sign %0b expected %0b", c, out_sign, a_exp[c]);
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
