// cn_output_select: output selector of the P = 1 check node processor.
//
// It expands the two computed magnitudes back to one magnitude per edge:
// the edge that carried the least reliable input gets theta0 (computed
// without it), every other edge gets theta1 (computed over all inputs). The
// two-way selection follows the processor's design; the register that keeps
// the minimum's edge index during the output phase, and the comparison with
// the output edge counter, are this design's way of driving the selection.
//
// Interface: fin_load (from the control unit) loads min_idx_fin; out_idx is
// the edge being output. Timing: mag is combinational from the registers.
module cn_output_select #(
  parameter int unsigned MW      = ldpc_pkg::NM_DEF - 1,
  parameter int unsigned DCN_MAX = ldpc_pkg::DCN_MAX_DEF,
  localparam int unsigned IW     = $clog2(DCN_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fin_load,
  input  logic [IW-1:0] min_idx_fin,
  input  logic [IW-1:0] out_idx,
  input  logic [MW-1:0] theta0,
  input  logic [MW-1:0] theta1,
  output logic [MW-1:0] mag
);

  logic [IW-1:0] sel_idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sel_idx_q <= '0;
    else if (fin_load) sel_idx_q <= min_idx_fin;
  end

  assign mag = (out_idx == sel_idx_q) ? theta0 : theta1;

endmodule
