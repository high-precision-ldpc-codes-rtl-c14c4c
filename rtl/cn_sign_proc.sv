// cn_sign_proc: check node sign processor.
//
// It applies the exact sign rule of the check node update:
//   -sign(eps_ij) = product over k in N(i)\j of -sign(mu_ik).
// With sign bits s (1 = negative), the bit of -sign(mu) is ~s. A running
// register accumulates the parity T of ~s over the node; when the node ends,
// T is moved to the node register, and each output sign is T ^ s_j, which
// removes edge j's own contribution (~s_j) and applies the outer minus.
// The signs themselves wait in a delay line until their edge is output.
// Structure (running loop register, node register, delay line sized on the
// maximum degree) follows the processor's sign section; the delay line is a
// circular buffer of DCN_MAX + 2 bits here, two more than the maximum degree,
// because an edge's sign stays inside for d_CN + 2 cycles while the next node
// streams in behind it. For the same reason the node register is split into
// two stages (tot_pre at node_end, tot at fin_load), so that the previous
// node's last output still sees its own parity; this is this design's choice.
//
// Interface: push (edge accepted), if_first (edge 0), node_end, fin_load and
// pop (output edge) from the control unit. Timing: out_sign is combinational
// from the node register and the buffer head, valid while pop is high.
module cn_sign_proc #(
  parameter int unsigned DCN_MAX = ldpc_pkg::DCN_MAX_DEF,
  localparam int unsigned DEPTH  = DCN_MAX + 2,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  logic if_first,
  input  logic in_sign,
  input  logic node_end,
  input  logic fin_load,
  input  logic pop,
  output logic out_sign
);

  logic [DEPTH-1:0] buf_q;
  logic [AW-1:0]    wr_q, rd_q;
  logic             run_q, tot_pre_q, tot_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      tot_pre_q <= 1'b0;
      tot_q     <= 1'b0;
      wr_q      <= '0;
      rd_q      <= '0;
      buf_q     <= '0;
    end else begin
      if (node_end) tot_pre_q <= run_q;
      if (fin_load) tot_q     <= tot_pre_q;
      if (push) begin
        run_q        <= if_first ? ~in_sign : (run_q ^ ~in_sign);
        buf_q[wr_q]  <= in_sign;
        wr_q         <= (32'(wr_q) == DEPTH - 1) ? '0 : wr_q + AW'(1);
      end
      if (pop) rd_q <= (32'(rd_q) == DEPTH - 1) ? '0 : rd_q + AW'(1);
    end
  end

  assign out_sign = tot_q ^ buf_q[rd_q];

endmodule
