// tb_cn_input_forming: checks the P = 1 input forming stage.
//
// Nodes of random magnitudes (with forced ties) are streamed back to back
// with the control unit's schedule generated here. In every edge k >= 1 the
// multiplexer output must be the larger of the new magnitude and the running
// minimum (the old minimum on a tie), at node_end it must be the node's
// minimum, and one cycle after node_end min_idx_fin must give the position
// of the minimum, the later one on ties.
module tb_cn_input_forming;
  localparam int MW = 5;
  localparam int DCN_MAX = 30;
  localparam int IW = $clog2(DCN_MAX + 1);
  localparam int T = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic if_first, if_acc, node_end;
  logic [IW-1:0] k_idx, min_idx_fin;
  logic [MW-1:0] mag, chi;

  cn_input_forming dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit a_first[T], a_acc[T], a_end[T], a_ichk[T];
  int a_k[T], a_mag[T], a_chi[T], a_idx[T];
  int degs[] = '{2, 3, 5, 8, 8, 13, 21, 30};

  initial begin
    int s, e, mn, mp;
    s = 0;
    foreach (degs[n]) begin
      int d;
      d = degs[n];
      for (int k = 0; k < d; k++) begin
        a_mag[s+k] = $urandom_range(0, (1 << MW) - 1);
        if (k > 0 && $urandom_range(0, 3) == 0) a_mag[s+k] = a_mag[s+k-1];
        a_k[s+k] = k;
        a_first[s+k] = (k == 0);
        a_acc[s+k] = (k != 0);
      end
      mn = a_mag[s];
      mp = 0;
      for (int k = 1; k < d; k++) begin
        a_chi[s+k] = (a_mag[s+k] <= mn) ? mn : a_mag[s+k];
        if (a_mag[s+k] <= mn) begin
          mn = a_mag[s+k];
          mp = k;
        end
      end
      e = s + d;
      a_end[e] = 1'b1;
      a_chi[e] = mn;
      a_ichk[e+1] = 1'b1;
      a_idx[e+1] = mp;
      s = e;
    end
    {if_first, if_acc, node_end} = '0;
    k_idx = '0;
    mag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < T; c++) begin
      @(negedge clk);
      if_first = a_first[c]; if_acc = a_acc[c]; node_end = a_end[c];
      k_idx = IW'(a_k[c]); mag = MW'(a_mag[c]);
      #1;
      if (a_acc[c] || a_end[c]) begin
        checks++;
        if (int'(chi) != a_chi[c]) begin
          failures++;
          $display("cycle %0d: chi %0d expected %0d", c, chi, a_chi[c]);
        end
      end
      if (a_ichk[c]) begin
        checks++;
        if (int'(min_idx_fin) != a_idx[c]) begin
          failures++;
          $display("cycle %0d: min index %0d expected %0d", c, min_idx_fin, a_idx[c]);
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
