// ldpc_pkg: constants shared by the serial LDPC node processors.
//
// Messages travel in sign-magnitude form: bit NM-1 is the sign (1 = negative
// value) and bits NM-2..0 hold the magnitude, as in the check node processor
// datapath where N-bit messages are split into one sign bit and N-1 magnitude
// bits. The defaults are the configuration the node processors were sized
// for: 6-bit messages, check node degree up to 30 and variable node degree up
// to 13 (a DVB-S2 class code). The quantisation step of a magnitude LSB and the
// M-min* correction threshold derived from it are this design's own choice.
package ldpc_pkg;

  // Default extrinsic message width N_m (sign + magnitude).
  localparam int unsigned NM_DEF      = 6;
  // Default channel LLR width.
  localparam int unsigned NL_DEF      = 6;
  // Maximum check node degree the processor is dimensioned for.
  localparam int unsigned DCN_MAX_DEF = 30;
  // Maximum variable node degree the processor is dimensioned for.
  localparam int unsigned DVN_MAX_DEF = 13;
  // M-min* correction: the quantised value of log(1+exp(-d)) with an LSB of
  // 0.5 is one LSB for d = 0, 1, 2 LSBs and zero from d = 3 LSBs on.
  localparam int unsigned CORR_TH_DEF = 3;

endpackage
