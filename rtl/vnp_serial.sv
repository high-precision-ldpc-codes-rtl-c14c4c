// vnp_serial: serial variable node processor.
//
// It computes the variable-to-check messages of one variable node,
//   mu_ij = lambda_j + sum over k in M(j)\i of eps_kj,
// from a serial stream of its check-to-variable messages eps. An adder
// accumulates lambda plus all incoming messages; the messages wait in a
// circular buffer and, once the node is complete, each output is the total
// minus the edge's own message, saturated to the message width. The total
// itself (the a-posteriori LLR) and the hard decision are output alongside.
// LLRs follow the convention of the check node sign rule, L = log(P(1)/P(0)),
// so a positive total decides bit 1 (a zero total decides 0). The update rule is the decoder's; the document gives only the
// function of a serial VNP, so this accumulate-then-subtract structure, the
// two's-complement internal arithmetic, the saturation and the latency of
// d_VN + 2 cycles (matching the check node processor) are this design's own.
//
// Interface: like cnp_p1 (node_sync on edge 0, in_valid on every edge, a node
// closes on the next node_sync), plus lambda, the channel LLR of the node in
// sign-magnitude form, sampled with node_sync && in_valid. Nodes must come in
// non-decreasing degree order. Outputs: out_msg per edge while out_valid,
// app and hard_bit constant over a node's output cycles.
module vnp_serial #(
  parameter int unsigned NM      = ldpc_pkg::NM_DEF,
  parameter int unsigned NL      = ldpc_pkg::NL_DEF,
  parameter int unsigned DVN_MAX = ldpc_pkg::DVN_MAX_DEF,
  localparam int unsigned IW     = $clog2(DVN_MAX + 1),
  localparam int unsigned SW     = ((NL > NM) ? NL : NM) + IW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 node_sync,
  input  logic                 in_valid,
  input  logic [NM-1:0]        in_msg,
  input  logic [NL-1:0]        lambda,
  output logic                 out_valid,
  output logic                 out_first,
  output logic [NM-1:0]        out_msg,
  output logic signed [SW-1:0] app,
  output logic                 hard_bit,
  output logic                 order_err,
  output logic                 proto_err
);

  localparam int unsigned DEPTH = DVN_MAX + 2;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam logic signed [SW-1:0] MAXM = SW'((1 << (NM - 1)) - 1);

  // The shared control unit also provides edge indices and the degree;
  // this processor only needs the strobes, so k_idx, acc_first, fin_deg and
  // out_idx stay unconnected inside (lint reports them as unused).
  logic          if_first, if_acc, acc_first, node_end, fin_load;
  logic [IW-1:0] k_idx, fin_deg, out_idx;

  cn_control_unit #(.DCN_MAX(DVN_MAX), .MIN_DEG(1)) u_cu (
    .clk, .rst_n, .node_sync, .in_valid,
    .if_first, .if_acc, .acc_first, .k_idx, .node_end,
    .fin_load, .fin_deg, .out_valid, .out_first, .out_idx,
    .order_err, .proto_err
  );

  function automatic logic signed [SW-1:0] sm2tc_m(input logic [NM-1:0] v);
    logic signed [SW-1:0] m;
    m = SW'(v[NM-2:0]);
    return v[NM-1] ? -m : m;
  endfunction

  function automatic logic signed [SW-1:0] sm2tc_l(input logic [NL-1:0] v);
    logic signed [SW-1:0] m;
    m = SW'(v[NL-2:0]);
    return v[NL-1] ? -m : m;
  endfunction

  logic [NM-1:0]        buf_q [DEPTH];
  logic [AW-1:0]        wr_q, rd_q;
  logic signed [SW-1:0] sum_q, tot_pre_q, tot_q;
  logic signed [SW-1:0] ext, mag;
  logic                 push;

  assign push = if_first || if_acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q     <= '0;
      tot_pre_q <= '0;
      tot_q     <= '0;
      wr_q      <= '0;
      rd_q      <= '0;
    end else begin
      if (if_first)    sum_q <= sm2tc_l(lambda) + sm2tc_m(in_msg);
      else if (if_acc) sum_q <= sum_q + sm2tc_m(in_msg);
      if (node_end) tot_pre_q <= sum_q;
      if (fin_load) tot_q     <= tot_pre_q;
      if (push) wr_q <= (32'(wr_q) == DEPTH - 1) ? '0 : wr_q + AW'(1);
      if (out_valid) rd_q <= (32'(rd_q) == DEPTH - 1) ? '0 : rd_q + AW'(1);
    end
  end

  // Message buffer, written without reset (contents are only read after
  // being written).
  always_ff @(posedge clk) begin
    if (push) buf_q[wr_q] <= in_msg;
  end

  always_comb begin
    ext = tot_q - sm2tc_m(buf_q[rd_q]);
    mag = (ext < 0) ? -ext : ext;
    if (mag > MAXM) mag = MAXM;
    out_msg = {ext < 0, mag[NM-2:0]};
  end

  assign app      = tot_q;
  assign hard_bit = tot_q > 0;

endmodule
