// tb_cn_output_select: checks the output selector. For random theta values
// and minimum positions it loads the position with fin_load, then sweeps the
// output edge index: only the stored position may receive theta0.
module tb_cn_output_select;
  localparam int MW = 5;
  localparam int DCN_MAX = 30;
  localparam int IW = $clog2(DCN_MAX + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic fin_load;
  logic [IW-1:0] min_idx_fin, out_idx;
  logic [MW-1:0] theta0, theta1, mag;

  cn_output_select dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    fin_load = 1'b0; min_idx_fin = '0; out_idx = '0; theta0 = '0; theta1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      int p, d;
      d = $urandom_range(2, DCN_MAX);
      p = $urandom_range(0, d - 1);
      @(negedge clk);
      fin_load = 1'b1;
      min_idx_fin = IW'(p);
      @(negedge clk);
      fin_load = 1'b0;
      min_idx_fin = IW'($urandom_range(0, DCN_MAX - 1)); // must be ignored now
      theta0 = MW'($urandom_range(0, (1 << MW) - 1));
      theta1 = ~theta0;
      for (int j = 0; j < d; j++) begin
        out_idx = IW'(j);
        #1;
        checks++;
        if (mag != ((j == p) ? theta0 : theta1)) begin
          failures++;
          $display("node %0d edge %0d: %0d, min at %0d", t, j, mag, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
