// ldpc_np_top: the two serial node processors of an LDPC decoder, side by side.
//
// The check node processor is the low-complexity serial design (2-output
// M-min* magnitudes, exact signs, latency d_CN + 2); vnp_serial is a serial
// variable node processor for the same message format. The message memories
// and the interconnect that would join them into a complete decoder are not
// part of this RTL, so both processors keep their own stream ports: the cn_*
// ports carry variable-to-check messages in and check-to-variable messages
// out, the vn_* ports the reverse plus the channel LLR and the a-posteriori
// output. Both streams use the same protocol: node_sync on edge 0 of a node,
// in_valid on every edge, a node closes on the next node_sync, nodes in
// non-decreasing degree order. Defaults: 6-bit messages, d_CN up to 30,
// d_VN up to 13.
//
// P selects the check node update: P = 1 (default) builds the optimised
// 2-magnitude processor cnp_p1; P = 2 or 3 builds cnp_general, which hands
// out P + 1 different magnitudes with the same ports and timing.
module ldpc_np_top #(
  parameter int unsigned NM      = ldpc_pkg::NM_DEF,
  parameter int unsigned NL      = ldpc_pkg::NL_DEF,
  parameter int unsigned DCN_MAX = ldpc_pkg::DCN_MAX_DEF,
  parameter int unsigned DVN_MAX = ldpc_pkg::DVN_MAX_DEF,
  parameter int unsigned CORR_TH = ldpc_pkg::CORR_TH_DEF,
  parameter int unsigned P       = 1,
  localparam int unsigned SW     = ((NL > NM) ? NL : NM) + $clog2(DVN_MAX + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // check node processor
  input  logic                 cn_node_sync,
  input  logic                 cn_in_valid,
  input  logic [NM-1:0]        cn_in_msg,
  output logic                 cn_out_valid,
  output logic                 cn_out_first,
  output logic [NM-1:0]        cn_out_msg,
  output logic                 cn_order_err,
  output logic                 cn_proto_err,
  // variable node processor
  input  logic                 vn_node_sync,
  input  logic                 vn_in_valid,
  input  logic [NM-1:0]        vn_in_msg,
  input  logic [NL-1:0]        vn_lambda,
  output logic                 vn_out_valid,
  output logic                 vn_out_first,
  output logic [NM-1:0]        vn_out_msg,
  output logic signed [SW-1:0] vn_app,
  output logic                 vn_hard_bit,
  output logic                 vn_order_err,
  output logic                 vn_proto_err
);

  if (P == 1) begin : g_p1
    cnp_p1 #(.NM(NM), .DCN_MAX(DCN_MAX), .CORR_TH(CORR_TH)) u_cnp (
      .clk, .rst_n,
      .node_sync(cn_node_sync), .in_valid(cn_in_valid), .in_msg(cn_in_msg),
      .out_valid(cn_out_valid), .out_first(cn_out_first), .out_msg(cn_out_msg),
      .order_err(cn_order_err), .proto_err(cn_proto_err)
    );
  end else begin : g_pn
    cnp_general #(.NM(NM), .DCN_MAX(DCN_MAX), .P(P), .CORR_TH(CORR_TH)) u_cnp (
      .clk, .rst_n,
      .node_sync(cn_node_sync), .in_valid(cn_in_valid), .in_msg(cn_in_msg),
      .out_valid(cn_out_valid), .out_first(cn_out_first), .out_msg(cn_out_msg),
      .order_err(cn_order_err), .proto_err(cn_proto_err)
    );
  end

  vnp_serial #(.NM(NM), .NL(NL), .DVN_MAX(DVN_MAX)) u_vnp (
    .clk, .rst_n,
    .node_sync(vn_node_sync), .in_valid(vn_in_valid), .in_msg(vn_in_msg),
    .lambda(vn_lambda),
    .out_valid(vn_out_valid), .out_first(vn_out_first), .out_msg(vn_out_msg),
    .app(vn_app), .hard_bit(vn_hard_bit),
    .order_err(vn_order_err), .proto_err(vn_proto_err)
  );

endmodule
