// cnp_p1: serial check node processor computing P + 1 = 2 magnitudes.
//
// The processor takes the variable-to-check messages of one check node as a
// serial stream, one sign-magnitude message per cycle, and returns the
// check-to-variable messages in the same edge order. Signs follow the exact
// product rule. Magnitudes follow the 2-output M-min* rule: the edge with the
// least reliable input receives theta0, the M-min* of all other inputs, and
// every other edge receives theta1, the M-min* of all inputs. Only one M-min*
// operator is needed, because the input forming stage holds back the minimum
// and feeds it to the accumulator last.
//
// Blocks: cn_control_unit (driven only by node_sync), cn_sign_proc,
// cn_input_forming, mmin_accumulator and cn_output_select. The architecture
// and its latency of d_CN + 2 cycles follow the processor's design; the
// message format (MSB = sign, 1 = negative), the in_valid qualifier, closing
// the last node with node_sync while in_valid is low, and the out_first
// marker are this design's choices.
//
// Interface: in_msg with node_sync on the first edge of a node and in_valid
// on every edge; out_msg valid while out_valid, out_first on edge 0. Nodes
// must be streamed in non-decreasing degree order (order_err flags a
// violation); a node of degree d occupies d input cycles and can be followed
// immediately by the next node. Timing: the output of edge 0 appears d + 2
// cycles after its input when the node's edges and the following node_sync
// arrive on consecutive cycles.
module cnp_p1 #(
  parameter int unsigned NM      = ldpc_pkg::NM_DEF,
  parameter int unsigned DCN_MAX = ldpc_pkg::DCN_MAX_DEF,
  parameter int unsigned CORR_TH = ldpc_pkg::CORR_TH_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          node_sync,
  input  logic          in_valid,
  input  logic [NM-1:0] in_msg,
  output logic          out_valid,
  output logic          out_first,
  output logic [NM-1:0] out_msg,
  output logic          order_err,
  output logic          proto_err
);

  localparam int unsigned MW = NM - 1;
  localparam int unsigned IW = $clog2(DCN_MAX + 1);

  logic          if_first, if_acc, acc_first, node_end, fin_load;
  logic [IW-1:0] k_idx, fin_deg, out_idx, min_idx_fin;
  logic [MW-1:0] chi, theta0, theta1, out_mag;
  logic          out_sign;

  cn_control_unit #(.DCN_MAX(DCN_MAX)) u_cu (
    .clk, .rst_n, .node_sync, .in_valid,
    .if_first, .if_acc, .acc_first, .k_idx, .node_end,
    .fin_load, .fin_deg, .out_valid, .out_first, .out_idx,
    .order_err, .proto_err
  );

  cn_sign_proc #(.DCN_MAX(DCN_MAX)) u_sign (
    .clk, .rst_n,
    .push(if_first || if_acc), .if_first, .in_sign(in_msg[NM-1]),
    .node_end, .fin_load, .pop(out_valid), .out_sign
  );

  cn_input_forming #(.MW(MW), .DCN_MAX(DCN_MAX)) u_if (
    .clk, .rst_n, .if_first, .if_acc, .node_end, .k_idx,
    .mag(in_msg[MW-1:0]), .chi, .min_idx_fin
  );

  mmin_accumulator #(.MW(MW), .CORR_TH(CORR_TH)) u_acc (
    .clk, .rst_n, .acc_en(if_acc), .acc_first, .node_end, .chi,
    .theta0, .theta1
  );

  cn_output_select #(.MW(MW), .DCN_MAX(DCN_MAX)) u_sel (
    .clk, .rst_n, .fin_load, .min_idx_fin, .out_idx,
    .theta0, .theta1, .mag(out_mag)
  );

  assign out_msg = {out_sign, out_mag};

  // fin_deg is only used by the assertion below.
  a_deg_range: assert property (@(posedge clk) disable iff (!rst_n)
    fin_load |-> (fin_deg >= IW'(2)) && (32'(fin_deg) <= DCN_MAX))
    else $error("check node degree out of range");

endmodule
