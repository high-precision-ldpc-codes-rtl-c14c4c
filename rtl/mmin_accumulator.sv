// mmin_accumulator: M-min* accumulator of the P = 1 check node processor.
//
// A register takes the input forming output chi; one M-min* operator then
// folds it into the accumulator register, which feeds back to the operator's
// second input. Edge 1 of a node starts a new accumulation (the operator is
// bypassed and chi is loaded as it is), later edges are combined, so the
// accumulator ends with theta0 = M-min* over all magnitudes but the minimum.
// When the final MIN arrives (node_end), the operator output
// theta1 = M-min*(theta0, MIN) is captured in the theta1 register while the
// accumulator value goes to the theta0 register. This follows the processor's
// structure of one operator, one accumulator register and the two theta
// registers; the exact enable scheme is this design's own.
//
// Interface: acc_en (if_acc), acc_first and node_end from the control unit,
// chi from input forming. Timing: theta0/theta1 are valid from the second
// cycle after node_end and hold until the next node's node_end + 1 cycle.
module mmin_accumulator #(
  parameter int unsigned MW      = ldpc_pkg::NM_DEF - 1,
  parameter int unsigned CORR_TH = ldpc_pkg::CORR_TH_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          acc_en,
  input  logic          acc_first,
  input  logic          node_end,
  input  logic [MW-1:0] chi,
  output logic [MW-1:0] theta0,
  output logic [MW-1:0] theta1
);

  logic [MW-1:0] st_q;       // register between input forming and operator
  logic          st_acc_q;
  logic          st_first_q;
  logic          st_fin_q;
  logic [MW-1:0] acc_q;
  logic [MW-1:0] op_y;

  mmin_star #(.MW(MW), .CORR_TH(CORR_TH)) u_op (
    .a(st_q), .b(acc_q), .y(op_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= '0;
      st_acc_q   <= 1'b0;
      st_first_q <= 1'b0;
      st_fin_q   <= 1'b0;
      acc_q      <= '0;
      theta0     <= '0;
      theta1     <= '0;
    end else begin
      st_acc_q   <= acc_en;
      st_first_q <= acc_first;
      st_fin_q   <= node_end;
      if (acc_en || node_end) st_q <= chi;
      if (st_acc_q) acc_q <= st_first_q ? st_q : op_y;
      if (st_fin_q) begin
        theta0 <= acc_q;
        theta1 <= op_y;
      end
    end
  end

endmodule
