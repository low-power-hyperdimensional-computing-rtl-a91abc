// hdc_top: hyperdimensional-computing sensor-fusion classifier with rule-90 item
// memory generation and vector folding.
//
// A sample of T ternary features (one 2-bit code per channel, channels ordered by
// modality as in MOD_CH) is accepted with in_valid && in_ready. The front end works on
// one fold of D/F bits at a time: the HV generator binds each channel's rule-90
// identifier fold to the CiM fold of its feature value, the spatial encoder bundles the
// channels of each modality by majority, and the fuser bundles the M modality folds by
// majority into fold f of the D-bit hvout. After all F folds the temporal encoder shifts
// hvout into its N ngram registers and their XOR becomes the query of the associative
// memory, which compares it with the Y prototypes, D/G bits per cycle, while the front
// end already encodes the next sample. `dec_valid` pulses when `decision` (per group,
// the index of the nearest class: bit 0 valence, bit 1 arousal, 1 = high) and
// `distances` are updated. Prototypes are written whole with proto_we.
//
// Timing at the defaults: a new sample every F*(T+3)+3 = 871 cycles (one sample per
// 1 ms at 909 kHz allows 909); dec_valid follows Y*G+2 = 802 cycles after the search
// starts, which is 2 cycles after the sample's encoding ends. The
// block structure, sizes and folding follow the source architecture; the controller,
// interfaces, encodings and G are this design's own (see each block).
module hdc_top
  import hdc_pkg::*;
#(
  parameter int unsigned D        = D_DEF,
  parameter int unsigned F        = F_DEF,
  parameter int unsigned G        = G_DEF,
  parameter int unsigned N        = N_DEF,
  parameter int unsigned X        = X_DEF,
  parameter int unsigned M        = M_DEF,
  parameter int unsigned MOD_CH [M] = '{32, 77, 105},
  parameter int unsigned GROUPS   = GROUPS_DEF,
  parameter int unsigned CPG      = CPG_DEF,
  parameter logic [31:0] CIM_SEED = CIM_SEED_DEF,
  localparam int unsigned T       = sum_ch(),
  localparam int unsigned C_MAX   = max_ch(),
  localparam int unsigned Y       = GROUPS * CPG,
  localparam int unsigned FW      = (X > 1) ? $clog2(X) : 1,
  localparam int unsigned YW      = (Y > 1) ? $clog2(Y) : 1,
  localparam int unsigned CB      = (CPG > 1) ? $clog2(CPG) : 1,
  localparam int unsigned DW      = $clog2(D + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [T-1:0][FW-1:0]      in_features,
  input  logic                      proto_we,
  input  logic [YW-1:0]             proto_addr,
  input  logic [D-1:0]              proto_wdata,
  output logic                      dec_valid,
  output logic [GROUPS-1:0][CB-1:0] decision,
  output logic [Y-1:0][DW-1:0]      distances
);

  function automatic int unsigned sum_ch();
    int unsigned s = 0;
    for (int unsigned m = 0; m < M; m++) s += MOD_CH[m];
    return s;
  endfunction

  function automatic int unsigned max_ch();
    int unsigned s = 0;
    for (int unsigned m = 0; m < M; m++) if (MOD_CH[m] > s) s = MOD_CH[m];
    return s;
  endfunction

  localparam int unsigned W      = D / F;
  localparam int unsigned FOLD_W = (F > 1) ? $clog2(F) : 1;
  localparam int unsigned CH_W   = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned NW     = $clog2(C_MAX + 1);

  logic              hv_load, im_init, im_step;
  logic [FOLD_W-1:0] fold;
  logic [CH_W-1:0]   chan;
  logic              se_valid, se_first;
  logic [NW-1:0]     se_mod_n;
  logic              fu_add, fu_first, fu_write;
  logic              te_shift, te_filled;
  logic              am_start, am_busy;
  logic [W-1:0]      bound, se_maj;
  logic [D-1:0]      hvout, te_hv;

  hdc_controller #(
    .F(F), .M(M), .MOD_CH(MOD_CH), .T(T), .C_MAX(C_MAX)
  ) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .am_busy, .te_filled,
    .hv_load, .im_init, .im_step, .fold, .chan,
    .se_valid, .se_first, .se_mod_n,
    .fu_add, .fu_first, .fu_write,
    .te_shift, .am_start
  );

  hv_generator #(
    .D(D), .F(F), .X(X), .T(T), .CIM_SEED(CIM_SEED)
  ) u_hvgen (
    .clk, .rst_n, .load(hv_load), .features_in(in_features),
    .im_init, .im_step, .fold, .chan, .bound
  );

  spatial_encoder #(.W(W), .C_MAX(C_MAX)) u_se (
    .clk, .rst_n, .valid(se_valid), .first(se_first), .bound,
    .mod_n(se_mod_n), .maj(se_maj)
  );

  fuser #(.D(D), .F(F), .M(M)) u_fuser (
    .clk, .rst_n, .add(fu_add), .first(fu_first), .in(se_maj),
    .write(fu_write), .fold, .hvout
  );

  temporal_encoder #(.D(D), .N(N)) u_te (
    .clk, .rst_n, .shift(te_shift), .hv_in(hvout), .hv_out(te_hv),
    .filled(te_filled)
  );

  associative_memory #(
    .D(D), .G(G), .GROUPS(GROUPS), .CPG(CPG)
  ) u_am (
    .clk, .rst_n, .proto_we, .proto_addr, .proto_wdata,
    .start(am_start), .query(te_hv), .busy(am_busy), .done(dec_valid),
    .decision, .distances
  );

endmodule
