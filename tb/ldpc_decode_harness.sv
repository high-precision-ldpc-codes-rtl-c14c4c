// ldpc_decode_harness: iterative decoding over an AWGN channel around one
// ldpc_np_top. P selects the check node update; NM and NL set the message
// and channel LLR widths (6 and 6 by default, the processors' defaults).
//
// The harness holds the message memories and the flooding schedule that a
// decoder around the processors would provide. The code is a random
// quasi-regular LDPC code with the sizes of a rate-0.82 code of length 4095:
// 738 checks, every variable node of degree 4, so 594 checks of degree 22 and
// 144 of degree 23 (no check on short cycles is made). Check nodes are
// streamed in increasing degree order, as the processors require.
// Each frame sends the all-zero codeword with BPSK (0 -> +1) over AWGN; the
// channel LLRs L = log(P(1)/P(0)) = -2y/sigma^2 are quantised with an LSB of
// 0.5 to NL-bit sign-magnitude, saturating at +-(2^(NL-1)-1) LSBs.
// EBN0_DB and EBN0_LO_DB set the two operating points. An iteration runs every check node through
// the CNP and then every variable node through the VNP; the hard decisions
// of the VNP are checked against all parity checks and the frame stops when
// they hold or after MAX_IT iterations.
// Checks at EBN0_DB: the frames must be decoded to the transmitted codeword
// (at most one frame may fail to converge), no frame may converge to a
// wrong codeword, and every processor output stream must have the expected
// length. A second set of frames at EBN0_LO_DB only reports the bit errors
// left, apart from the wrong-codeword and stream-length checks. done rises
// when all frames are finished; checks and failures are then final.
module ldpc_decode_harness #(
  parameter int  P          = 1,
  parameter int  NM         = 6,
  parameter int  NL         = 6,
  parameter real EBN0_DB    = 4.0,
  parameter real EBN0_LO_DB = 3.5
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int MAXL = (1 << (NL - 1)) - 1;
  localparam int SW = ((NL > NM) ? NL : NM) + 4 + 1;
  localparam int N = 4095;
  localparam int M = 738;
  localparam int DV = 4;
  localparam int E = N * DV;
  localparam int N23 = E - 22 * M;      // checks of degree 23
  localparam int FRAMES = 30;      // at EBN0_DB
  localparam int FRAMES_LO = 10;   // at EBN0_LO_DB, reported only
  localparam int MAX_IT = 20;
  localparam real RATE = 0.82;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cn_node_sync = 1'b0, cn_in_valid = 1'b0;
  logic [NM-1:0] cn_in_msg = '0;
  logic cn_out_valid, cn_out_first, cn_order_err, cn_proto_err;
  logic [NM-1:0] cn_out_msg;
  logic vn_node_sync = 1'b0, vn_in_valid = 1'b0;
  logic [NM-1:0] vn_in_msg = '0;
  logic [NL-1:0] vn_lambda = '0;
  logic vn_out_valid, vn_out_first, vn_hard_bit, vn_order_err, vn_proto_err;
  logic [NM-1:0] vn_out_msg;
  logic signed [SW-1:0] vn_app;

  ldpc_np_top #(.NM(NM), .NL(NL), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  int edge_vn [E];          // variable node of each edge, edges in check order
  int cn_start [M + 1];     // first edge of each check
  int vn_edges [N][DV];     // edges of each variable node
  int vn_fill [N];
  int eps [E], mu [E];
  int lam [N];
  bit hard [N];
  int cn_out_q[$], vn_out_q[$], vn_hard_q[$];

  always @(posedge clk) if (rst_n) begin
    if (cn_out_valid) cn_out_q.push_back(int'(cn_out_msg));
    if (vn_out_valid) vn_out_q.push_back(int'(vn_out_msg));
    if (vn_out_valid && vn_out_first) vn_hard_q.push_back(int'(vn_hard_bit));
    if (cn_order_err || cn_proto_err || vn_order_err || vn_proto_err) begin
      failures++;
      $display("error flag raised");
    end
  end

  function automatic int degree(int c);
    return (c < M - N23) ? 22 : 23;
  endfunction

  // random socket assignment with no variable node twice in one check
  task automatic build_code();
    int s, tries;
    bit dup;
    s = 0;
    for (int c = 0; c < M; c++) begin
      cn_start[c] = s;
      s += degree(c);
    end
    cn_start[M] = s;
    for (int e = 0; e < E; e++) edge_vn[e] = e / DV;
    for (int e = E - 1; e > 0; e--) begin
      int r, t;
      r = $urandom_range(0, e);
      t = edge_vn[e]; edge_vn[e] = edge_vn[r]; edge_vn[r] = t;
    end
    tries = 0;
    do begin
      dup = 1'b0;
      for (int c = 0; c < M; c++)
        for (int a = cn_start[c]; a < cn_start[c+1]; a++)
          for (int b = cn_start[c]; b < a; b++)
            if (edge_vn[a] == edge_vn[b]) begin
              int r, t;
              dup = 1'b1;
              r = $urandom_range(0, E - 1);
              t = edge_vn[a]; edge_vn[a] = edge_vn[r]; edge_vn[r] = t;
            end
      tries++;
    end while (dup && tries < 100);
    checks++;
    if (dup) begin
      failures++;
      $display("code construction failed");
    end
    for (int j = 0; j < N; j++) vn_fill[j] = 0;
    for (int e = 0; e < E; e++) begin
      vn_edges[edge_vn[e]][vn_fill[edge_vn[e]]] = e;
      vn_fill[edge_vn[e]]++;
    end
  endtask

  // channel LLR in LSBs to NL-bit sign-magnitude
  function automatic int to_sm(int v);
    if (v > MAXL) v = MAXL;
    if (v < -MAXL) v = -MAXL;
    return (v < 0) ? ((1 << (NL - 1)) | -v) : v;
  endfunction

  // NL-bit sign-magnitude LLR re-coded as the first NM-bit message
  function automatic int llr_to_msg(int v);
    int mag;
    mag = v & MAXL;
    if (mag > (1 << (NM - 1)) - 1) mag = (1 << (NM - 1)) - 1;
    return (((v >> (NL - 1)) & 1) != 0) ? ((1 << (NM - 1)) | mag) : mag;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  task automatic cn_phase();
    cn_out_q.delete();
    for (int c = 0; c < M; c++)
      for (int e = cn_start[c]; e < cn_start[c+1]; e++) begin
        @(negedge clk);
        cn_node_sync = (e == cn_start[c]);
        cn_in_valid = 1'b1;
        cn_in_msg = NM'(mu[e]);
      end
    @(negedge clk);
    cn_node_sync = 1'b1;
    cn_in_valid = 1'b0;
    @(negedge clk);
    cn_node_sync = 1'b0;
    repeat (30) @(negedge clk);
    checks++;
    if (cn_out_q.size() != E) begin
      failures++;
      $display("CN phase returned %0d messages", cn_out_q.size());
    end
    for (int e = 0; e < E; e++) eps[e] = cn_out_q[e];
  endtask

  task automatic vn_phase();
    int k;
    vn_out_q.delete();
    vn_hard_q.delete();
    for (int j = 0; j < N; j++)
      for (int i = 0; i < DV; i++) begin
        @(negedge clk);
        vn_node_sync = (i == 0);
        vn_in_valid = 1'b1;
        vn_in_msg = NM'(eps[vn_edges[j][i]]);
        vn_lambda = NL'(lam[j]);
      end
    @(negedge clk);
    vn_node_sync = 1'b1;
    vn_in_valid = 1'b0;
    @(negedge clk);
    vn_node_sync = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (vn_out_q.size() != E || vn_hard_q.size() != N) begin
      failures++;
      $display("VN phase returned %0d messages", vn_out_q.size());
    end
    k = 0;
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < DV; i++) begin
        mu[vn_edges[j][i]] = vn_out_q[k];
        k++;
      end
      hard[j] = vn_hard_q[j][0];
    end
  endtask

  function automatic int unsat();
    int u;
    u = 0;
    for (int c = 0; c < M; c++) begin
      bit p;
      p = 1'b0;
      for (int e = cn_start[c]; e < cn_start[c+1]; e++) p ^= hard[edge_vn[e]];
      u += p;
    end
    return u;
  endfunction

  // decode nfr frames at ebn0; returns frames not converged, frames
  // converged to a wrong word, channel bit errors and decoded bit errors
  task automatic run_point(real ebn0, int nfr, output int not_conv,
                           output int wrong, output int raw_total,
                           output int err_total);
    real sigma;
    not_conv = 0;
    wrong = 0;
    raw_total = 0;
    err_total = 0;
    sigma = $sqrt(1.0 / (2.0 * RATE * (10.0 ** (ebn0 / 10.0))));
    for (int f = 0; f < nfr; f++) begin
      int raw, it, errs;
      bit conv;
      raw = 0;
      for (int j = 0; j < N; j++) begin
        real y, l;
        int q;
        y = 1.0 + sigma * gauss();
        l = -2.0 * y / (sigma * sigma);
        q = $rtoi((l < 0.0) ? (l / 0.5 - 0.5) : (l / 0.5 + 0.5));
        lam[j] = to_sm(q);
        if (l > 0.0) raw++;
        for (int i = 0; i < DV; i++) mu[vn_edges[j][i]] = llr_to_msg(lam[j]);
      end
      raw_total += raw;
      conv = 1'b0;
      it = 0;
      while (!conv && it < MAX_IT) begin
        cn_phase();
        vn_phase();
        it++;
        conv = (unsat() == 0);
      end
      errs = 0;
      for (int j = 0; j < N; j++) errs += hard[j];
      err_total += errs;
      $display("P=%0d NL=%0d NM=%0d %.2f dB frame %0d: %0d channel errors, %0d iterations, %0d errors left, %s",
               P, NL, NM, ebn0, f, raw, it, errs, conv ? "converged" : "not converged");
      if (!conv) not_conv++;
      else if (errs != 0) wrong++;
    end
  endtask

  initial begin
    int not_conv, wrong, raw_total, err_total;
    build_code();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_point(EBN0_DB, FRAMES, not_conv, wrong, raw_total, err_total);
    $display("P=%0d NL=%0d NM=%0d %.2f dB: %0d frames, channel BER %.2e, decoded BER %.2e, %0d not converged",
             P, NL, NM, EBN0_DB, FRAMES, real'(raw_total) / (FRAMES * N),
             real'(err_total) / (FRAMES * N), not_conv);
    checks += 3;
    if (raw_total == 0) begin
      failures++;
      $display("channel produced no errors");
    end
    if (not_conv > 1) begin
      failures++;
      $display("%0d frames did not converge", not_conv);
    end
    if (wrong != 0) begin
      failures++;
      $display("%0d frames converged to a wrong codeword", wrong);
    end
    run_point(EBN0_LO_DB, FRAMES_LO, not_conv, wrong, raw_total, err_total);
    $display("P=%0d NL=%0d NM=%0d %.2f dB: %0d frames, channel BER %.2e, decoded BER %.2e, %0d not converged",
             P, NL, NM, EBN0_LO_DB, FRAMES_LO, real'(raw_total) / (FRAMES_LO * N),
             real'(err_total) / (FRAMES_LO * N), not_conv);
    checks++;
    if (wrong != 0) begin
      failures++;
      $display("%0d frames converged to a wrong codeword", wrong);
    end
    done = 1'b1;
  end

  initial begin
    repeat ((FRAMES + FRAMES_LO) * MAX_IT * (2 * E + 200) + 10000) @(posedge clk);
    failures++;
    $display("P=%0d: decoding watchdog expired", P);
    done = 1'b1;
  end
endmodule
