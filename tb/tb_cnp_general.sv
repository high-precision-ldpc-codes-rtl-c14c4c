// tb_cnp_general: checks the generic (P + 1)-magnitude check node processor
// for P = 1, 2 and 3 on one shared random stream of nodes (degree 4 to 30,
// non-decreasing, with ties, idle cycles and closing strobes). The expected
// messages come from a model of the update: the P smallest magnitudes are
// held (a new value displaces the largest held one when smaller or equal),
// the others are folded in order with M-min*, theta_i folds in all held
// values but the i-th, theta_P all of them. For P = 1 the outputs must also
// equal ldpc_ref_pkg::cn_ref. Gap-free nodes must show the d + 2 latency.
module tb_cnp_general;
  import ldpc_ref_pkg::*;

  localparam int NM = 6;
  localparam int MAXM = (1 << (NM - 1)) - 1;
  localparam int NP = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic node_sync = 1'b0, in_valid = 1'b0;
  logic [NM-1:0] in_msg = '0;
  logic          ov [NP], of [NP], oe [NP], pe [NP];
  logic [NM-1:0] om [NP];

  cnp_general #(.P(1)) dut1 (.clk, .rst_n, .node_sync, .in_valid, .in_msg,
    .out_valid(ov[0]), .out_first(of[0]), .out_msg(om[0]), .order_err(oe[0]), .proto_err(pe[0]));
  cnp_general #(.P(2)) dut2 (.clk, .rst_n, .node_sync, .in_valid, .in_msg,
    .out_valid(ov[1]), .out_first(of[1]), .out_msg(om[1]), .order_err(oe[1]), .proto_err(pe[1]));
  cnp_general #(.P(3)) dut3 (.clk, .rst_n, .node_sync, .in_valid, .in_msg,
    .out_valid(ov[2]), .out_first(of[2]), .out_msg(om[2]), .order_err(oe[2]), .proto_err(pe[2]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int exp_q [NP][$];
  int lat_q [$];
  int lat_i [NP];

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (oe[p] || pe[p]) begin
        failures++;
        $display("P=%0d: unexpected error flag at cycle %0d", p + 1, cyc);
      end
      if (ov[p]) begin
        checks++;
        if (exp_q[p].size() == 0 || int'(om[p]) != exp_q[p][0]) begin
          failures++;
          $display("P=%0d cycle %0d: out %h expected %h", p + 1, cyc, om[p],
                   exp_q[p].size() ? exp_q[p][0] : -1);
        end
        if (exp_q[p].size() != 0) void'(exp_q[p].pop_front());
        if (of[p]) begin
          int l;
          l = lat_q[lat_i[p]];
          lat_i[p]++;
          if (l >= 0) begin
            checks++;
            if (l != cyc) begin
              failures++;
              $display("P=%0d latency: edge 0 out at %0d, expected %0d", p + 1, cyc, l);
            end
          end
        end
      end
    end
  end

  task automatic gen_ref(input int mags[], input int signs[], input int P,
                         output int res[]);
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
    for (int e = 0; e < d; e++) begin
      int m;
      m = th[P];
      for (int i = 0; i < P; i++) if (hi[i] == e) m = th[i];
      par = d % 2;
      for (int k = 0; k < d; k++) if (k != e) par ^= signs[k];
      res[e] = (par << (NM - 1)) | m;
    end
  endtask

  task automatic send_node(int d, bit gaps);
    int mags[], signs[], res[], om1[], os1[], mp, start;
    mags = new[d];
    signs = new[d];
    for (int k = 0; k < d; k++) begin
      mags[k] = $urandom_range(0, MAXM);
      signs[k] = $urandom_range(0, 1);
    end
    if ($urandom_range(0, 1) == 1) mags[d-1] = mags[$urandom_range(0, d - 2)];
    for (int p = 0; p < NP; p++) begin
      gen_ref(mags, signs, p + 1, res);
      foreach (res[j]) exp_q[p].push_back(res[j]);
    end
    // the P = 1 model must agree with the 2-output reference
    cn_ref(mags, signs, om1, os1, mp);
    gen_ref(mags, signs, 1, res);
    foreach (res[j]) begin
      checks++;
      if (res[j] != ((os1[j] << (NM - 1)) | om1[j])) begin
        failures++;
        $display("reference models disagree");
      end
    end
    for (int k = 0; k < d; k++) begin
      if (gaps && k == d / 2) begin
        @(negedge clk);
        node_sync = 1'b0;
        in_valid = 1'b0;
      end
      @(negedge clk);
      node_sync = (k == 0);
      in_valid = 1'b1;
      in_msg = NM'((signs[k] << (NM - 1)) | mags[k]);
      if (k == 0) start = cyc;
    end
    lat_q.push_back(gaps ? -1 : start + d + 2);
  endtask

  task automatic close_node();
    @(negedge clk);
    node_sync = 1'b1;
    in_valid = 1'b0;
    @(negedge clk);
    node_sync = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 4; d <= 30; d += 2) begin
      send_node(d, 1'b0);
      send_node(d, (d % 6) == 0);
    end
    close_node();
    repeat (40) @(negedge clk);
    for (int i = 0; i < 5; i++) send_node(7, 1'b0);
    close_node();
    repeat (40) @(negedge clk);
    checks++;
    if (exp_q[0].size() + exp_q[1].size() + exp_q[2].size() != 0) begin
      failures++;
      $display("outputs missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
