// cn_input_forming: input forming stage of the P = 1 check node processor.
//
// It reorders the incoming stream of magnitudes so that the least reliable
// one comes last. A comparator tests each new magnitude against the MIN
// register, which holds the smallest magnitude seen so far in the node. If
// the new one is smaller or equal, the old MIN goes on to the accumulator and
// the new one takes its place; otherwise the new one goes on. When the node
// ends, the two-way multiplexer sends the final MIN, so the accumulator sees
// all magnitudes but the minimum first and the minimum last. This structure
// (comparator, MIN register, two-way multiplexer) follows the processor's
// design; keeping the edge index of the minimum in a register beside MIN is
// how this design lets the output selector find the minimum's edge. On ties
// the later edge becomes the minimum, as the "<=" comparison implies.
//
// Interface: control from cn_control_unit (if_first, if_acc, node_end,
// k_idx); chi is the multiplexer output, valid in if_acc and node_end cycles.
// min_idx_fin holds, from the cycle after node_end, the edge index of the
// finished node's minimum. Timing: chi is combinational, MIN is registered.
module cn_input_forming #(
  parameter int unsigned MW      = ldpc_pkg::NM_DEF - 1,
  parameter int unsigned DCN_MAX = ldpc_pkg::DCN_MAX_DEF,
  localparam int unsigned IW     = $clog2(DCN_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          if_first,
  input  logic          if_acc,
  input  logic          node_end,
  input  logic [IW-1:0] k_idx,
  input  logic [MW-1:0] mag,
  output logic [MW-1:0] chi,
  output logic [IW-1:0] min_idx_fin
);

  logic [MW-1:0] min_q;
  logic [IW-1:0] min_idx_q;
  logic          le;

  assign le  = (mag <= min_q);
  assign chi = (if_acc && !le) ? mag : min_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_q       <= '0;
      min_idx_q   <= '0;
      min_idx_fin <= '0;
    end else begin
      if (if_first || (if_acc && le)) begin
        min_q     <= mag;
        min_idx_q <= k_idx;
      end
      if (node_end) min_idx_fin <= min_idx_q;
    end
  end

endmodule
