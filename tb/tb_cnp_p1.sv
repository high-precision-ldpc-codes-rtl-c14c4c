// tb_cnp_p1: self-checking testbench of the P = 1 check node processor.
//
// Streams check nodes of non-decreasing degree (2 up to DCN_MAX) with random
// sign-magnitude messages, mostly back to back, some with idle cycles inside
// and some closed by a node_sync with in_valid low. Every output message is
// compared with ldpc_ref_pkg::cn_ref, and for nodes received without gaps
// the distance from edge 0 in to edge 0 out is checked against d + 2 cycles.
module tb_cnp_p1;
  import ldpc_ref_pkg::*;

  localparam int NM = 6;
  localparam int DCN_MAX = 30;

  logic clk = 1'b0, rst_n = 1'b0;
  logic node_sync = 1'b0, in_valid = 1'b0;
  logic [NM-1:0] in_msg = '0;
  logic out_valid, out_first, order_err, proto_err;
  logic [NM-1:0] out_msg;

  cnp_p1 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int exp_q[$];
  int lat_q[$];      // expected cycle of edge 0 output, -1 = not checked
  int nodes_out = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (order_err || proto_err) begin
      failures++;
      $display("unexpected error flag at cycle %0d", cyc);
    end
    if (out_valid) begin
      int e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cyc);
      end else begin
        e = exp_q.pop_front();
        if (int'(out_msg) != e) begin
          failures++;
          $display("cycle %0d: out %h expected %h", cyc, out_msg, e);
        end
      end
      if (out_first) begin
        int l;
        nodes_out++;
        l = lat_q.pop_front();
        if (l >= 0) begin
          checks++;
          if (l != cyc) begin
            failures++;
            $display("latency: edge 0 out at %0d, expected %0d", cyc, l);
          end
        end
      end
    end
  end

  task automatic send_node(int d, bit gaps);
    int mags[], signs[], om[], os[], mp;
    int start;
    mags = new[d];
    signs = new[d];
    for (int k = 0; k < d; k++) begin
      mags[k]  = $urandom_range(0, (1 << (NM-1)) - 1);
      signs[k] = $urandom_range(0, 1);
    end
    if (d > 3 && $urandom_range(0, 1) == 1) mags[d-2] = mags[d-1]; // ties
    cn_ref(mags, signs, om, os, mp);
    for (int j = 0; j < d; j++) exp_q.push_back((os[j] << (NM-1)) | om[j]);
    for (int k = 0; k < d; k++) begin
      if (gaps && k == d / 2) begin
        @(negedge clk);
        node_sync = 1'b0;
        in_valid  = 1'b0;
      end
      @(negedge clk);
      node_sync = (k == 0);
      in_valid  = 1'b1;
      in_msg    = NM'((signs[k] << (NM-1)) | mags[k]);
      if (k == 0) start = cyc;
    end
    lat_q.push_back(gaps ? -1 : start + d + 2);
  endtask

  task automatic close_node();
    @(negedge clk);
    node_sync = 1'b1;
    in_valid  = 1'b0;
    @(negedge clk);
    node_sync = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // back-to-back nodes of growing degree
    for (int d = 2; d <= DCN_MAX; d += 2) send_node(d, 1'b0);
    close_node();
    repeat (40) @(negedge clk);
    // nodes with an idle cycle in the middle, then equal degrees
    for (int d = 3; d <= DCN_MAX; d += 9) send_node(d, 1'b1);
    for (int i = 0; i < 4; i++) send_node(DCN_MAX, 1'b0);
    close_node();
    repeat (DCN_MAX + 10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    $display("nodes output: %0d", nodes_out);
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
