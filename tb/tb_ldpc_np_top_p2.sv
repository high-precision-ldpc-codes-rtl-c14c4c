// tb_ldpc_np_top_p2: end-to-end test of the top built with P = 2, i.e. with
// the generic check node processor handing out three magnitudes (3-output
// M-min*), next to the variable node processor. The same three phases as
// tb_ldpc_np_top run at full message width and degree; the expected check
// node outputs come from a model of the P-magnitude update (the P smallest
// inputs held, the rest folded in order). The internal mechanism counters of
// the P = 1 test are replaced by counters of what the stimulus exercises.
module tb_ldpc_np_top_p2;
  import ldpc_ref_pkg::*;

  localparam int NM = 6;
  localparam int NL = 6;
  localparam int MAXM = (1 << (NM - 1)) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cn_node_sync = 1'b0, cn_in_valid = 1'b0;
  logic [NM-1:0] cn_in_msg = '0;
  logic cn_out_valid, cn_out_first, cn_order_err, cn_proto_err;
  logic [NM-1:0] cn_out_msg;
  logic vn_node_sync = 1'b0, vn_in_valid = 1'b0;
  logic [NM-1:0] vn_in_msg = '0;
  logic [NL-1:0] vn_lambda = '0;
  logic vn_out_valid, vn_out_first, vn_hard_bit, vn_order_err, vn_proto_err;
  logic [NM-1:0] vn_out_msg;
  logic signed [10:0] vn_app;

  ldpc_np_top #(.P(2)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int cn_exp[$], cn_lat[$], vn_exp[$], vn_app_q[$], vn_lat[$];
  bit cn_done = 0, vn_done = 0, cn_busy = 0, vn_busy = 0;
  int n_theta0 = 0, n_theta1 = 0, n_vsat = 0;
  int n_b2b = 0, n_close = 0, n_gap = 0, n_vb2b = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters from the stimulus and the outputs
  always @(posedge clk) if (rst_n) begin
    if (cn_node_sync && cn_in_valid && cn_busy) n_b2b++;
    if (cn_node_sync && !cn_in_valid && cn_busy) n_close++;
    if (!cn_node_sync && !cn_in_valid && cn_busy) n_gap++;
    if (vn_node_sync && vn_in_valid && vn_busy) n_vb2b++;
    if (cn_node_sync) cn_busy <= cn_in_valid;
    if (vn_node_sync) vn_busy <= vn_in_valid;
  end

  // output checkers
  always @(posedge clk) if (rst_n) begin
    if (cn_order_err || cn_proto_err || vn_order_err || vn_proto_err) begin
      failures++;
      $display("unexpected error flag at cycle %0d", cyc);
    end
    if (cn_out_valid) begin
      checks++;
      if (cn_exp.size() == 0 || int'(cn_out_msg) != cn_exp[0]) begin
        failures++;
        $display("CN cycle %0d: out %h", cyc, cn_out_msg);
      end
      if (cn_exp.size() != 0) void'(cn_exp.pop_front());
      if (cn_out_first) begin
        int l;
        l = cn_lat.pop_front();
        if (l >= 0) begin
          checks++;
          if (l != cyc) begin
            failures++;
            $display("CN latency: edge 0 out at %0d, expected %0d", cyc, l);
          end
        end
      end
    end
    if (vn_out_valid) begin
      checks++;
      if (vn_exp.size() == 0 || int'(vn_out_msg) != vn_exp[0]) begin
        failures++;
        $display("VN cycle %0d: out %h", cyc, vn_out_msg);
      end
      if (vn_exp.size() != 0) void'(vn_exp.pop_front());
      if (vn_out_first) begin
        int a, l;
        a = vn_app_q.pop_front();
        l = vn_lat.pop_front();
        checks++;
        if (int'(vn_app) != a || vn_hard_bit != (a > 0)) begin
          failures++;
          $display("VN cycle %0d: app %0d expected %0d", cyc, vn_app, a);
        end
        if (l >= 0) begin
          checks++;
          if (l != cyc) begin
            failures++;
            $display("VN latency: edge 0 out at %0d, expected %0d", cyc, l);
          end
        end
      end
    end
  end

  function automatic int sm(int v, int w);
    int m;
    m = v & ((1 << (w - 1)) - 1);
    return (((v >> (w - 1)) & 1) != 0) ? -m : m;
  endfunction

  // expected outputs of the P-magnitude update; held[e] = rank of edge e
  // in the held set, -1 if it is not held
  task automatic gen_ref(input int mags[], input int signs[], input int P,
                         output int res[], output int held[]);
    int hv[$], hi[$], chi[$], th[], d, pos, acc, par;
    d = mags.size();
    for (int k = 0; k < d; k++) begin
      if (hv.size() == P) begin
        if (mags[k] <= hv[P-1]) begin
          chi.push_back(hv[P-1]);
          void'(hv.pop_back());
          void'(hi.pop_back());
        end else begin
          chi.push_back(mags[k]);
          continue;
        end
      end
      pos = 0;
      foreach (hv[i]) if (hv[i] < mags[k]) pos = i + 1;
      hv.insert(pos, mags[k]);
      hi.insert(pos, k);
    end
    acc = chi[0];
    for (int i = 1; i < chi.size(); i++) acc = mmin_ref(chi[i], acc);
    th = new[P + 1];
    for (int t = 0; t <= P; t++) begin
      th[t] = acc;
      for (int j = 0; j < P; j++) if (j != t) th[t] = mmin_ref(hv[j], th[t]);
    end
    res = new[d];
    held = new[d];
    for (int e = 0; e < d; e++) begin
      int m;
      m = th[P];
      held[e] = -1;
      for (int i = 0; i < P; i++) if (hi[i] == e) begin
        m = th[i];
        held[e] = i;
      end
      par = d % 2;
      for (int k = 0; k < d; k++) if (k != e) par ^= signs[k];
      res[e] = (par << (NM - 1)) | m;
    end
  endtask

  task automatic cn_node(int d, bit gaps);
    int mags[], signs[], res[], held[], start;
    mags = new[d];
    signs = new[d];
    for (int k = 0; k < d; k++) begin
      // small magnitudes now and then, so that clipping at zero happens
      mags[k] = ($urandom_range(0, 7) == 0) ? $urandom_range(0, 1) : $urandom_range(0, MAXM);
      signs[k] = $urandom_range(0, 1);
    end
    if (d > 3 && $urandom_range(0, 1) == 1) mags[d-2] = mags[d-1];
    gen_ref(mags, signs, 2, res, held);
    for (int j = 0; j < d; j++) begin
      cn_exp.push_back(res[j]);
      if (held[j] == 0) n_theta0++;
      if (held[j] == 1) n_theta1++;
    end
    for (int k = 0; k < d; k++) begin
      if (gaps && k == d / 2) begin
        @(negedge clk);
        cn_node_sync = 1'b0;
        cn_in_valid = 1'b0;
      end
      @(negedge clk);
      cn_node_sync = (k == 0);
      cn_in_valid = 1'b1;
      cn_in_msg = NM'((signs[k] << (NM-1)) | mags[k]);
      if (k == 0) start = cyc;
    end
    cn_lat.push_back(gaps ? -1 : start + d + 2);
  endtask

  task automatic cn_close();
    @(negedge clk);
    cn_node_sync = 1'b1;
    cn_in_valid = 1'b0;
    @(negedge clk);
    cn_node_sync = 1'b0;
  endtask

  task automatic vn_node(int d, bit gaps);
    int eps[], lam, sum, x, start;
    eps = new[d];
    lam = $urandom_range(0, (1 << NL) - 1);
    sum = sm(lam, NL);
    for (int k = 0; k < d; k++) begin
      eps[k] = $urandom_range(0, (1 << NM) - 1);
      sum += sm(eps[k], NM);
    end
    for (int j = 0; j < d; j++) begin
      x = sum - sm(eps[j], NM);
      if (x > MAXM || x < -MAXM) n_vsat++;
      if (x < 0) vn_exp.push_back((1 << (NM - 1)) | ((-x > MAXM) ? MAXM : -x));
      else       vn_exp.push_back((x > MAXM) ? MAXM : x);
    end
    vn_app_q.push_back(sum);
    for (int k = 0; k < d; k++) begin
      if (gaps && k == d / 2) begin
        @(negedge clk);
        vn_node_sync = 1'b0;
        vn_in_valid = 1'b0;
      end
      @(negedge clk);
      vn_node_sync = (k == 0);
      vn_in_valid = 1'b1;
      vn_in_msg = NM'(eps[k]);
      vn_lambda = NL'(lam);
      if (k == 0) start = cyc;
    end
    vn_lat.push_back(gaps ? -1 : start + d + 2);
  endtask

  task automatic vn_close();
    @(negedge clk);
    vn_node_sync = 1'b1;
    vn_in_valid = 1'b0;
    @(negedge clk);
    vn_node_sync = 1'b0;
  endtask

  // check node stream
  initial begin
    wait (rst_n);
    for (int d = 3; d <= 30; d++) cn_node(d, 1'b0);
    cn_close();
    repeat (40) @(negedge clk);
    for (int i = 0; i < 24; i++) cn_node(22, (i % 5) == 4);
    for (int i = 0; i < 24; i++) cn_node(23, (i % 7) == 6);
    cn_close();
    repeat (30) @(negedge clk);
    for (int i = 0; i < 20; i++) cn_node(30, 1'b0);
    cn_close();
    cn_done = 1'b1;
  end

  // variable node stream
  initial begin
    wait (rst_n);
    for (int d = 1; d <= 13; d++) vn_node(d, 1'b0);
    vn_close();
    repeat (20) @(negedge clk);
    for (int i = 0; i < 120; i++) vn_node(4, (i % 9) == 8);
    vn_close();
    repeat (20) @(negedge clk);
    for (int i = 0; i < 20; i++) vn_node(13, 1'b0);
    vn_close();
    vn_done = 1'b1;
  end

  task automatic need(int n, string what);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (cn_done && vn_done);
    repeat (50) @(negedge clk);
    checks++;
    if (cn_exp.size() != 0 || vn_exp.size() != 0) begin
      failures++;
      $display("outputs missing: CN %0d, VN %0d", cn_exp.size(), vn_exp.size());
    end
    need(n_theta0, "theta0 delivered");
    need(n_theta1, "theta1 delivered");
    need(n_b2b, "CN back-to-back boundary");
    need(n_close, "CN closing strobe");
    need(n_gap, "CN idle cycle in node");
    need(n_vb2b, "VN back-to-back boundary");
    need(n_vsat, "VN saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
