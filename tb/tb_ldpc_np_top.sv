// tb_ldpc_np_top: end-to-end test of both node processors at their default
// sizes (6-bit messages, d_CN up to 30, d_VN up to 13).
//
// The check and variable node streams run concurrently in three phases:
//  1. every degree from 2 to 30 (CN) and 1 to 13 (VN), back to back;
//  2. a slice of a rate-0.82, length-4095 code with column weight 4 and
//     check degrees 22/23: 48 check nodes and 120 variable nodes of degree 4,
//     some nodes with idle cycles inside;
//  3. the maximum degrees of a DVB-S2 class code, 30 (CN) and 13 (VN).
// Every output message is compared with the reference models, and the d + 2
// latency is checked for gap-free nodes. The testbench counts how often each
// mechanism of the design happens (minimum replaced in input forming, ties,
// M-min* correction, clipping at zero, theta0 delivered, node boundary
// without pause, closing strobe, idle cycle inside a node, VNP saturation)
// and counts a failure for any that never happened.
module tb_ldpc_np_top;
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

  ldpc_np_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int cn_exp[$], cn_lat[$], vn_exp[$], vn_app_q[$], vn_lat[$];
  bit cn_done = 0, vn_done = 0;
  int n_minrep = 0, n_tie = 0, n_corr = 0, n_clip = 0, n_theta0 = 0;
  int n_b2b = 0, n_close = 0, n_gap = 0, n_vsat = 0, n_vb2b = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters, observed inside the design
  always @(posedge clk) if (rst_n) begin
    if (dut.g_p1.u_cnp.if_acc && dut.g_p1.u_cnp.u_if.le) n_minrep++;
    if (dut.g_p1.u_cnp.if_acc && dut.g_p1.u_cnp.u_if.mag == dut.g_p1.u_cnp.u_if.min_q) n_tie++;
    if (dut.g_p1.u_cnp.u_acc.st_acc_q && !dut.g_p1.u_cnp.u_acc.st_first_q || dut.g_p1.u_cnp.u_acc.st_fin_q) begin
      if (dut.g_p1.u_cnp.u_acc.u_op.corr) n_corr++;
      if (dut.g_p1.u_cnp.u_acc.u_op.corr && dut.g_p1.u_cnp.u_acc.u_op.mn == '0) n_clip++;
    end
    if (cn_out_valid && dut.g_p1.u_cnp.out_idx == dut.g_p1.u_cnp.u_sel.sel_idx_q) n_theta0++;
    if (cn_node_sync && cn_in_valid && dut.g_p1.u_cnp.u_cu.open_q) n_b2b++;
    if (cn_node_sync && !cn_in_valid && dut.g_p1.u_cnp.u_cu.open_q) n_close++;
    if (!cn_node_sync && !cn_in_valid && dut.g_p1.u_cnp.u_cu.open_q) n_gap++;
    if (vn_node_sync && vn_in_valid && dut.u_vnp.u_cu.open_q) n_vb2b++;
    if (vn_out_valid && (int'(dut.u_vnp.ext) > MAXM || int'(dut.u_vnp.ext) < -MAXM)) n_vsat++;
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

  task automatic cn_node(int d, bit gaps);
    int mags[], signs[], om[], os[], mp, start;
    mags = new[d];
    signs = new[d];
    for (int k = 0; k < d; k++) begin
      // small magnitudes now and then, so that clipping at zero happens
      mags[k] = ($urandom_range(0, 7) == 0) ? $urandom_range(0, 1) : $urandom_range(0, MAXM);
      signs[k] = $urandom_range(0, 1);
    end
    if (d > 3 && $urandom_range(0, 1) == 1) mags[d-2] = mags[d-1];
    cn_ref(mags, signs, om, os, mp);
    for (int j = 0; j < d; j++) cn_exp.push_back((os[j] << (NM-1)) | om[j]);
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
    for (int d = 2; d <= 30; d++) cn_node(d, 1'b0);
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
    need(n_minrep, "minimum replaced");
    need(n_tie, "tie with minimum");
    need(n_corr, "M-min* correction");
    need(n_clip, "clip at zero");
    need(n_theta0, "theta0 delivered");
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
