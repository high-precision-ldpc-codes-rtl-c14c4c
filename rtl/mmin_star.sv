// mmin_star: the binary M-min* operator of modified Min-Sum decoding.
//
// Function: out = max(0, min(a, b) - corr(|a - b|)), with corr the quantised
// form of the correction term log(1 + exp(-d)). The operator itself follows
// the decoding rule; its fixed-point form is this design's choice: the
// correction is one LSB while |a - b| < CORR_TH and zero otherwise (the
// default CORR_TH = 3 matches log(1+exp(-d)) rounded to an LSB of 0.5), and
// the result is clipped at zero so that a magnitude never turns negative.
//
// Interface: two unsigned magnitudes a and b of MW bits, result y of MW bits.
// Timing: purely combinational.
module mmin_star #(
  parameter int unsigned MW      = ldpc_pkg::NM_DEF - 1,
  parameter int unsigned CORR_TH = ldpc_pkg::CORR_TH_DEF
) (
  input  logic [MW-1:0] a,
  input  logic [MW-1:0] b,
  output logic [MW-1:0] y
);

  logic [MW-1:0] mn;
  logic [MW-1:0] diff;
  logic          corr;

  always_comb begin
    if (a <= b) begin
      mn   = a;
      diff = b - a;
    end else begin
      mn   = b;
      diff = a - b;
    end
    corr = (32'(diff) < CORR_TH);
    if (corr && (mn != '0)) y = mn - MW'(1);
    else if (corr)          y = '0;
    else                    y = mn;
  end

endmodule
