// ldpc_ref_pkg: reference models used by the testbenches.
//
// mmin_ref evaluates the M-min* operator from its definition,
// min(a, b) - log(1 + exp(-|a - b|)), in floating point with an LSB of 0.5,
// rounds the correction to whole LSBs and clips the result at zero.
// cn_ref computes the expected output messages of the 2-output check node
// update for one node: the stream is reordered as the input forming stage
// does (the running minimum is held back, ties go to the later edge), theta0
// is the in-order M-min* fold of the reordered stream, theta1 folds the
// minimum in last, and the signs follow the product rule with "-sign"
// factors, i.e. s_out(j) = parity of the other sign bits plus the degree.
package ldpc_ref_pkg;

  function automatic int mmin_ref(int a, int b);
    real d, c;
    int  mn, corr;
    mn   = (a < b) ? a : b;
    d    = ((a > b) ? (a - b) : (b - a)) * 0.5;
    c    = $ln(1.0 + $exp(-d)) / 0.5;
    corr = $rtoi(c + 0.5);
    mn   = mn - corr;
    return (mn < 0) ? 0 : mn;
  endfunction

  // mags/signs: inputs of one node; omags/osigns: expected outputs.
  task automatic cn_ref(input int mags[], input int signs[],
                        output int omags[], output int osigns[],
                        output int min_pos);
    int d, mn, acc, th0, th1, par;
    int chi[$];
    d = mags.size();
    omags  = new[d];
    osigns = new[d];
    mn = mags[0];
    min_pos = 0;
    chi.delete();
    for (int k = 1; k < d; k++) begin
      if (mags[k] <= mn) begin
        chi.push_back(mn);
        mn = mags[k];
        min_pos = k;
      end else begin
        chi.push_back(mags[k]);
      end
    end
    acc = chi[0];
    for (int i = 1; i < chi.size(); i++) acc = mmin_ref(chi[i], acc);
    th0 = acc;
    th1 = mmin_ref(mn, th0);
    for (int j = 0; j < d; j++) begin
      par = d % 2;
      for (int k = 0; k < d; k++) if (k != j) par ^= signs[k];
      omags[j]  = (j == min_pos) ? th0 : th1;
      osigns[j] = par;
    end
  endtask

endpackage
