// tb_vnp_serial: checks the serial variable node processor.
//
// Variable nodes of degree 1..DVN_MAX with random channel LLRs and random
// check-to-variable messages (large ones included, so that the saturation of
// the output magnitude is exercised) are sent back to back in
// non-decreasing degree order, then a set with idle cycles. Each output is
// compared with lambda + sum of the other messages, saturated to the
// sign-magnitude range; the a-posteriori sum, the hard decision and the
// d + 2 cycle latency of gap-free nodes are checked too.
module tb_vnp_serial;
  localparam int NM = 6;
  localparam int NL = 6;
  localparam int DVN_MAX = 13;
  localparam int MAXM = (1 << (NM - 1)) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic node_sync = 1'b0, in_valid = 1'b0;
  logic [NM-1:0] in_msg = '0;
  logic [NL-1:0] lambda = '0;
  logic out_valid, out_first, hard_bit, order_err, proto_err;
  logic [NM-1:0] out_msg;
  logic signed [NM+4+1-1:0] app;

  vnp_serial dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, sat_seen = 0;
  int exp_q[$], app_q[$], lat_q[$];

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
        if ((e & MAXM) == MAXM) sat_seen++;
      end
      if (out_first) begin
        int a, l;
        a = app_q.pop_front();
        l = lat_q.pop_front();
        checks += 2;
        if (int'(app) != a || hard_bit != (a > 0)) begin
          failures++;
          $display("cycle %0d: app %0d expected %0d", cyc, app, a);
        end
        if (l >= 0 && l != cyc) begin
          failures++;
          $display("latency: edge 0 out at %0d, expected %0d", cyc, l);
        end
      end
    end
  end

  function automatic int sm(int v, int w);
    int m;
    m = v & ((1 << (w - 1)) - 1);
    return (((v >> (w - 1)) & 1) != 0) ? -m : m;
  endfunction

  task automatic send_node(int d, bit gaps);
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
      if (x < 0) exp_q.push_back((1 << (NM - 1)) | ((-x > MAXM) ? MAXM : -x));
      else       exp_q.push_back((x > MAXM) ? MAXM : x);
    end
    app_q.push_back(sum);
    for (int k = 0; k < d; k++) begin
      if (gaps && k == d / 2) begin
        @(negedge clk);
        node_sync = 1'b0;
        in_valid = 1'b0;
      end
      @(negedge clk);
      node_sync = (k == 0);
      in_valid = 1'b1;
      in_msg = NM'(eps[k]);
      lambda = (k == 0) ? NL'(lam) : NL'($urandom);
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
    for (int d = 1; d <= DVN_MAX; d++) begin
      send_node(d, 1'b0);
      send_node(d, 1'b0);
    end
    close_node();
    repeat (20) @(negedge clk);
    for (int d = 2; d <= DVN_MAX; d += 3) send_node(d, 1'b1);
    close_node();
    repeat (DVN_MAX + 10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || sat_seen == 0) begin
      failures++;
      $display("%0d outputs missing, %0d saturated", exp_q.size(), sat_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
