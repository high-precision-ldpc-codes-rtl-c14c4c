// cn_control_unit: control unit of the serial check node processor.
//
// The whole processor is steered by one strobe, node_sync, that marks the
// first message of a new check node; this follows the processor's design.
// How a node is closed is this design's choice: a node ends when the next
// node_sync arrives, and node_sync with in_valid low closes the current node
// without opening another (use it after the last node or before a pause).
// Cycles with in_valid low inside a node are idle cycles and are skipped.
//
// Input side, combinational from the current inputs:
//   if_first  - this message is edge 0 of a new node (MIN register load)
//   if_acc    - this message is edge k >= 1 (goes through input forming)
//   acc_first - this message is edge 1 (starts the M-min* accumulation)
//   k_idx     - edge index of this message within its node
//   node_end  - the open node is complete; its last edge came earlier
// One cycle after node_end, fin_load loads the output registers (theta, the
// node sign, min index) and fin_deg gives the degree of the finished node.
// Output side: from two cycles after node_end, out_valid is high for deg
// cycles with out_idx counting the edges 0..deg-1, so that the first output
// of a node with d_CN edges received back to back leaves d_CN + 2 cycles
// after its first input, the processor's latency.
// Nodes must come in non-decreasing degree order, as the processor assumes,
// or a node's outputs would overlap the previous node's: order_err flags it.
// proto_err flags a node of degree below MIN_DEG or above DCN_MAX, or a message
// outside any node.
module cn_control_unit #(
  parameter int unsigned DCN_MAX = ldpc_pkg::DCN_MAX_DEF,
  parameter int unsigned MIN_DEG = 2,
  localparam int unsigned IW     = $clog2(DCN_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          node_sync,
  input  logic          in_valid,
  output logic          if_first,
  output logic          if_acc,
  output logic          acc_first,
  output logic [IW-1:0] k_idx,
  output logic          node_end,
  output logic          fin_load,
  output logic [IW-1:0] fin_deg,
  output logic          out_valid,
  output logic          out_first,
  output logic [IW-1:0] out_idx,
  output logic          order_err,
  output logic          proto_err
);

  logic          open_q;     // a node is being received
  logic [IW-1:0] cnt_q;      // messages received so far in the open node
  logic          pend_q;     // node_end happened last cycle
  logic [IW-1:0] pend_deg_q;
  logic          act_q;      // outputs of a node are being delivered
  logic [IW-1:0] oc_q;       // output edge index
  logic [IW-1:0] odeg_q;     // degree of the node being delivered
  logic          over;

  assign if_first  = in_valid && node_sync;
  assign if_acc    = in_valid && !node_sync && open_q && !over;
  assign acc_first = if_acc && (cnt_q == IW'(1));
  assign k_idx     = if_first ? '0 : cnt_q;
  assign node_end  = node_sync && open_q;
  assign over      = (32'(cnt_q) >= DCN_MAX);
  assign fin_load  = pend_q;
  assign fin_deg   = pend_deg_q;
  assign out_valid = act_q;
  assign out_first = act_q && (oc_q == '0);
  assign out_idx   = oc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q     <= 1'b0;
      cnt_q      <= '0;
      pend_q     <= 1'b0;
      pend_deg_q <= '0;
      act_q      <= 1'b0;
      oc_q       <= '0;
      odeg_q     <= '0;
      order_err  <= 1'b0;
      proto_err  <= 1'b0;
    end else begin
      order_err <= 1'b0;
      proto_err <= 1'b0;
      // input side
      if (node_sync) begin
        open_q <= in_valid;
        cnt_q  <= in_valid ? IW'(1) : '0;
      end else if (in_valid && open_q && !over) begin
        cnt_q <= cnt_q + IW'(1);
      end
      if (in_valid && !node_sync && (!open_q || over)) proto_err <= 1'b1;
      if (node_end && (32'(cnt_q) < MIN_DEG))                proto_err <= 1'b1;
      pend_q     <= node_end;
      pend_deg_q <= cnt_q;
      // output side
      if (pend_q) begin
        if (act_q && (oc_q != odeg_q - IW'(1))) order_err <= 1'b1;
        act_q  <= 1'b1;
        oc_q   <= '0;
        odeg_q <= pend_deg_q;
      end else if (act_q) begin
        if (oc_q == odeg_q - IW'(1)) act_q <= 1'b0;
        oc_q <= oc_q + IW'(1);
      end
    end
  end

endmodule
