// hdc_pkg: constants and helpers shared by the hyperdimensional (HDC) sensor-fusion
// processor and its testbenches.
//
// The default sizes are those of the emotion-recognition configuration: hypervector
// dimension D = 2000, F = 4 folds in the front end, an ngram of N = 3, ternary
// features (X = 3 values) from M = 3 modalities of 32, 77 and 105 channels, and two
// binary decisions (valence, arousal). The associative-memory fold count G = 200 and
// the pseudo-random generator used to fill the continuous item memory are choices of
// this design, not given by the source architecture.
package hdc_pkg;

  localparam int unsigned D_DEF      = 2000;  // hypervector dimension
  localparam int unsigned F_DEF      = 4;     // folds in HV generator, spatial encoder, fuser
  localparam int unsigned G_DEF      = 200;   // folds in the associative memory (own choice)
  localparam int unsigned N_DEF      = 3;     // ngram length of the temporal encoder
  localparam int unsigned X_DEF      = 3;     // discrete feature values {-1, 0, +1}
  localparam int unsigned M_DEF      = 3;     // modalities: GSR, ECG, EEG
  localparam int unsigned GROUPS_DEF = 2;     // decisions: valence, arousal
  localparam int unsigned CPG_DEF    = 2;     // classes per decision: low, high
  localparam logic [31:0] CIM_SEED_DEF = 32'h2545_F491;

  // Feature codes for the ternary case are 0:+1, 1:0, 2:-1. The CiM vectors are ordered
  // from +1 to -1, so the last CiM (code X-1) is the one for -1, which also seeds the
  // rule-90 iM chain.

  // Controller states of the encoding pipeline.
  typedef enum logic [2:0] {
    S_IDLE,      // waiting for a feature sample
    S_IM_INIT,   // load first iM fold: rule90(seed fold)
    S_CHAN,      // one channel per cycle into the spatial encoder
    S_FUSE_LAST, // fuse the majority of the last modality
    S_WRITE,     // write the fused fold into hvout
    S_TE_WAIT,   // wait for the associative memory to release the query
    S_AM_START   // start the associative memory on the new temporal HV
  } ctrl_state_e;

  // xorshift32 step; used only at elaboration time to fill the CiM constants.
  function automatic logic [31:0] xorshift32(input logic [31:0] s);
    logic [31:0] x;
    x = s;
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

endpackage
