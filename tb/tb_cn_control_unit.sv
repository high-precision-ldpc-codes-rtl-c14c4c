// tb_cn_control_unit: checks the control unit of the serial check node
// processor (DCN_MAX reduced to 8 so that an over-long node can be sent).
//
// Legal phase: nodes of degree 2..8 back to back, one node with an idle
// cycle inside, closing strobes. The combinational input-side controls are
// checked on every cycle; fin_load/fin_deg and the output-side controls are
// checked against a schedule computed here (outputs start two cycles after
// node_end and last d cycles), which also gives the d + 2 latency for nodes
// sent without gaps. Error phase: a node of degree 1, a message outside any
// node and a node longer than DCN_MAX must raise proto_err; a node shorter
// than its predecessor must raise order_err. No flag may rise in the legal
// phase.
module tb_cn_control_unit;
  localparam int DCN_MAX = 8;
  localparam int IW = $clog2(DCN_MAX + 1);
  localparam int T = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic node_sync, in_valid;
  logic if_first, if_acc, acc_first, node_end, fin_load, out_valid, out_first;
  logic order_err, proto_err;
  logic [IW-1:0] k_idx, fin_deg, out_idx;

  cn_control_unit #(.DCN_MAX(DCN_MAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, c = 0;
  bit a_fl[T], a_ov[T];
  int a_fdeg[T], a_oidx[T];
  int open_k = -1;    // edges received in the open node, -1 = none open
  int ord_seen = 0, proto_seen = 0;
  bit legal = 1'b1;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("cycle %0d: %s", c, what);
    end
  endtask

  // one cycle: drive, check the combinational controls and the schedule
  task automatic step(bit sync, bit valid);
    @(negedge clk);
    node_sync = sync;
    in_valid = valid;
    #1;
    chk(if_first == (sync && valid), "if_first");
    chk(node_end == (sync && open_k >= 0), "node_end");
    chk(if_acc == (valid && !sync && open_k >= 1 && open_k < DCN_MAX), "if_acc");
    chk(acc_first == (valid && !sync && open_k == 1), "acc_first");
    if (valid && !sync && open_k >= 1) chk(int'(k_idx) == open_k, "k_idx");
    if (sync && valid) chk(k_idx == '0, "k_idx at edge 0");
    if (legal) begin
      chk(fin_load == a_fl[c], "fin_load");
      if (a_fl[c]) chk(int'(fin_deg) == a_fdeg[c], "fin_deg");
      chk(out_valid == a_ov[c], "out_valid");
      if (a_ov[c]) begin
        chk(int'(out_idx) == a_oidx[c], "out_idx");
        chk(out_first == (a_oidx[c] == 0), "out_first");
      end
      chk(!order_err && !proto_err, "no error flag in legal phase");
    end
    if (sync && open_k >= 0 && legal) begin
      a_fl[c+1] = 1'b1;
      a_fdeg[c+1] = open_k;
      for (int j = 0; j < open_k; j++) begin
        a_ov[c+2+j] = 1'b1;
        a_oidx[c+2+j] = j;
      end
    end
    if (sync) open_k = valid ? 1 : -1;
    else if (valid && open_k >= 0 && open_k < DCN_MAX) open_k++;
    c++;
  endtask

  task automatic node(int d, bit gap);
    for (int k = 0; k < d; k++) begin
      if (gap && k == 1) step(1'b0, 1'b0);
      step(k == 0, 1'b1);
    end
  endtask

  always @(posedge clk) if (rst_n && !legal) begin
    if (order_err) ord_seen++;
    if (proto_err) proto_seen++;
  end

  initial begin
    node_sync = 1'b0;
    in_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 2; d <= DCN_MAX; d++) node(d, 1'b0);
    step(1'b1, 1'b0);
    repeat (10) step(1'b0, 1'b0);
    node(4, 1'b1);
    node(4, 1'b0);
    step(1'b1, 1'b0);
    repeat (12) step(1'b0, 1'b0);
    // error phase
    legal = 1'b0;
    node(1, 1'b0);
    step(1'b1, 1'b0);
    repeat (3) step(1'b0, 1'b0);
    chk(proto_seen > 0, "degree-1 node not flagged");
    proto_seen = 0;
    step(1'b0, 1'b1);
    repeat (2) step(1'b0, 1'b0);
    chk(proto_seen > 0, "message outside a node not flagged");
    proto_seen = 0;
    node(DCN_MAX + 2, 1'b0);
    step(1'b1, 1'b0);
    repeat (2) step(1'b0, 1'b0);
    chk(proto_seen > 0, "over-long node not flagged");
    repeat (12) step(1'b0, 1'b0);
    node(6, 1'b0);
    node(2, 1'b0);
    step(1'b1, 1'b0);
    repeat (12) step(1'b0, 1'b0);
    chk(ord_seen > 0, "degree order violation not flagged");
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
