// cnp_general: serial check node processor delivering P + 1 magnitudes.
//
// It generalises cnp_p1 to the update in which the P least reliable inputs
// of a node each get a dedicated magnitude and all other edges share one:
//   theta_i (i < P): M-min* over all inputs except the i-th smallest,
//   theta_P        : M-min* over all inputs.
// Signs use the exact product rule (cn_sign_proc) and the whole processor is
// steered by node_sync (cn_control_unit), as in cnp_p1.
//
// Input forming keeps the P smallest magnitudes seen so far, sorted, with
// their edge indices. A new magnitude that is smaller than or equal to the
// largest one held takes its place in the sorted set and the displaced one
// goes to the accumulator; otherwise the new magnitude goes there itself
// (while fewer than P are held, every magnitude is kept). One M-min* operator
// folds the accumulator stream into A, the M-min* of all inputs outside the
// held set. When the node ends, the held set is frozen and the P + 1 thetas
// are formed from A and the held values by short chains of M-min* operators
// (P*P operators in all) and registered; an output multiplexer with P + 1
// inputs then hands theta_i to the edge of the i-th held value and theta_P to
// every other edge. The division into sign processor, input forming, M-min*
// accumulator, theta registers and output multiplexer follows the generic
// architecture; how the held set is kept and how the thetas are derived from
// A is this design's own, chosen so that the latency stays d_CN + 2 cycles.
// The structure suits small P (up to 3); a node needs more than P edges.
//
// Interface and timing: identical to cnp_p1. The default P = 1 gives the
// same results as cnp_p1.
module cnp_general #(
  parameter int unsigned NM      = ldpc_pkg::NM_DEF,
  parameter int unsigned DCN_MAX = ldpc_pkg::DCN_MAX_DEF,
  parameter int unsigned P       = 1,
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

  // acc_first_p1 marks edge 1, the start of accumulation for P = 1 only;
  // here accumulation starts at edge P, derived from k_idx below.
  logic          if_first, if_acc, acc_first_p1, node_end, fin_load;
  logic [IW-1:0] k_idx, fin_deg, out_idx;
  logic          out_sign;
  logic [MW-1:0] mag;

  assign mag = in_msg[MW-1:0];

  cn_control_unit #(.DCN_MAX(DCN_MAX), .MIN_DEG(P + 1)) u_cu (
    .clk, .rst_n, .node_sync, .in_valid,
    .if_first, .if_acc, .acc_first(acc_first_p1), .k_idx, .node_end,
    .fin_load, .fin_deg, .out_valid, .out_first, .out_idx,
    .order_err, .proto_err
  );

  cn_sign_proc #(.DCN_MAX(DCN_MAX)) u_sign (
    .clk, .rst_n,
    .push(if_first || if_acc), .if_first, .in_sign(in_msg[NM-1]),
    .node_end, .fin_load, .pop(out_valid), .out_sign
  );

  // ---------------- input forming: sorted set of the P smallest ----------
  logic [MW-1:0] h_q    [P];
  logic [IW-1:0] hidx_q [P];
  logic [MW-1:0] h_d    [P];
  logic [IW-1:0] hidx_d [P];
  logic          push_e;          // edge accepted this cycle
  logic          full;            // P values held
  logic          to_acc;          // a value goes to the accumulator
  logic [MW-1:0] chi;
  logic          ins;             // the new value enters the held set
  int unsigned   pos;             // its position in the sorted set

  assign push_e = if_first || if_acc;
  // k_idx counts the edges already held: the set is full from edge P on
  assign full   = (32'(k_idx) >= P);

  always_comb begin
    ins = push_e && (!full || (mag <= h_q[P-1]));
    to_acc = push_e && full;
    chi = (ins) ? h_q[P-1] : mag;
    pos = 0;
    for (int unsigned i = 0; i < P; i++) begin
      if (32'(k_idx) > i && h_q[i] < mag) pos = i + 1;
    end
    for (int unsigned i = 0; i < P; i++) begin
      h_d[i]    = h_q[i];
      hidx_d[i] = hidx_q[i];
    end
    if (ins) begin
      for (int unsigned i = 1; i < P; i++) begin
        if (i > pos) begin
          h_d[i]    = h_q[i-1];
          hidx_d[i] = hidx_q[i-1];
        end
      end
      h_d[pos]    = mag;
      hidx_d[pos] = k_idx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < P; i++) begin
        h_q[i]    <= '0;
        hidx_q[i] <= '0;
      end
    end else if (push_e) begin
      for (int unsigned i = 0; i < P; i++) begin
        h_q[i]    <= h_d[i];
        hidx_q[i] <= hidx_d[i];
      end
    end
  end

  // ---------------- M-min* accumulator -----------------------------------
  logic [MW-1:0] st_q, acc_q, op_y;
  logic          st_v_q, st_first_q;

  mmin_star #(.MW(MW), .CORR_TH(CORR_TH)) u_op (.a(st_q), .b(acc_q), .y(op_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= '0;
      st_v_q     <= 1'b0;
      st_first_q <= 1'b0;
      acc_q      <= '0;
    end else begin
      st_v_q     <= to_acc;
      st_first_q <= to_acc && (32'(k_idx) == P);
      if (to_acc) st_q <= chi;
      if (st_v_q) acc_q <= st_first_q ? st_q : op_y;
    end
  end

  // ---------------- theta computation and registers ----------------------
  logic [MW-1:0] fh_q    [P];     // held set frozen at node_end
  logic [IW-1:0] fidx_q  [P];
  logic [MW-1:0] theta_d [P+1];
  logic [MW-1:0] theta_q [P+1];
  logic [IW-1:0] sel_q   [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < P; i++) begin
        fh_q[i]   <= '0;
        fidx_q[i] <= '0;
      end
    end else if (node_end) begin
      for (int unsigned i = 0; i < P; i++) begin
        fh_q[i]   <= h_q[i];
        fidx_q[i] <= hidx_q[i];
      end
    end
  end

  // theta_t: fold acc_q with the held values in order, skipping value t
  for (genvar t = 0; t <= P; t++) begin : g_theta
    logic [MW-1:0] chain [P+1];
    assign chain[0] = acc_q;
    for (genvar j = 0; j < P; j++) begin : g_step
      if (j == t) begin : g_skip
        assign chain[j+1] = chain[j];
      end else begin : g_op
        mmin_star #(.MW(MW), .CORR_TH(CORR_TH)) u_op (
          .a(fh_q[j]), .b(chain[j]), .y(chain[j+1])
        );
      end
    end
    assign theta_d[t] = chain[P];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned t = 0; t <= P; t++) theta_q[t] <= '0;
      for (int unsigned i = 0; i < P; i++)  sel_q[i]   <= '0;
    end else if (fin_load) begin
      for (int unsigned t = 0; t <= P; t++) theta_q[t] <= theta_d[t];
      for (int unsigned i = 0; i < P; i++)  sel_q[i]   <= fidx_q[i];
    end
  end

  // ---------------- output multiplexer -----------------------------------
  logic [MW-1:0] out_mag;
  always_comb begin
    out_mag = theta_q[P];
    for (int unsigned i = 0; i < P; i++) begin
      if (out_idx == sel_q[i]) out_mag = theta_q[i];
    end
  end

  assign out_msg = {out_sign, out_mag};

  a_deg_range: assert property (@(posedge clk) disable iff (!rst_n)
    fin_load |-> (32'(fin_deg) > P) && (32'(fin_deg) <= DCN_MAX))
    else $error("check node degree out of range");

endmodule
