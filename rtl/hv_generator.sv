// hv_generator: maps one channel's feature into hyperdimensional space per cycle,
// one fold of D/F bits at a time.
//
// It holds three things. The feature register keeps the T feature codes of the current
// sample (loaded when `load` is high). The continuous item memory (CiM) is X constant
// D-bit vectors, one per feature value, so it costs no storage; the vector selected by
// a channel's code is cut to the current fold. The item memory (iM) is a single
// D/F-bit register: `im_init` loads it with rule90(seed fold), the seed being the CiM of
// value -1 (the last code), and each `im_step` advances it by one more rule-90 step, so
// channel c of fold f sees rule90^(c+1)(seed fold f). The output `bound` is
// iM XOR CiM[feature[chan]] for the current fold and channel; it is combinational from
// the iM register, the feature register and the `fold`/`chan` indices.
//
// Following the source architecture: constant CiMs, seeding from the -1 CiM, a single
// iM fold register regenerated by rule 90 for sequential channel access, and binding by
// XOR. Own choices: the CiM contents (a pseudo-random base vector made of successive
// xorshift32 words, bits [32j+31:32j] = word j+1; level k flips the first
// k*(D/2)/(X-1) bits, so the two ends are D/2 apart), the feature
// code order (0:+1, 1:0, 2:-1) and the first channel using one rule-90 step of the seed.
module hv_generator
  import hdc_pkg::*;
#(
  parameter int unsigned D        = D_DEF,
  parameter int unsigned F        = F_DEF,
  parameter int unsigned X        = X_DEF,
  parameter int unsigned T        = 214,
  parameter logic [31:0] CIM_SEED = CIM_SEED_DEF,
  localparam int unsigned W       = D / F,
  localparam int unsigned FW      = (X > 1) ? $clog2(X) : 1,
  localparam int unsigned FOLD_W  = (F > 1) ? $clog2(F) : 1,
  localparam int unsigned CH_W    = (T > 1) ? $clog2(T) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,         // capture a new feature sample
  input  logic [T-1:0][FW-1:0]    features_in,
  input  logic                    im_init,      // iM <= rule90(seed fold)
  input  logic                    im_step,      // iM <= rule90(iM)
  input  logic [FOLD_W-1:0]       fold,         // fold being processed
  input  logic [CH_W-1:0]         chan,         // channel whose feature is bound
  output logic [W-1:0]            bound         // iM fold XOR CiM fold
);

  typedef logic [X-1:0][D-1:0] cim_t;

  localparam int unsigned NWORD = (D + 31) / 32;

  function automatic cim_t gen_cim();
    cim_t                   c;
    logic [NWORD*32-1:0]    words;
    logic [D-1:0]           base;
    logic [D-1:0]           mask;
    logic [31:0]            s;
    int unsigned            flips;
    s = CIM_SEED;
    for (int unsigned j = 0; j < NWORD; j++) begin
      s = xorshift32(s);
      words[j*32 +: 32] = s;
    end
    base = words[D-1:0];
    for (int unsigned k = 0; k < X; k++) begin
      flips = (X > 1) ? (k * (D / 2)) / (X - 1) : 0;
      mask  = ~({D{1'b1}} << flips);
      c[k]  = base ^ mask;
    end
    return c;
  endfunction

  localparam cim_t CIM = gen_cim();

  logic [T-1:0][FW-1:0] feat_q;
  logic [W-1:0]         im_q;
  logic [W-1:0]         ca_in;
  logic [W-1:0]         ca_out;
  logic [W-1:0]         seed_fold;
  logic [W-1:0]         cim_fold;
  logic [FW-1:0]        code;

  always_comb begin
    seed_fold = CIM[X-1][fold*W +: W];
    ca_in     = im_init ? seed_fold : im_q;
    code      = feat_q[chan];
    cim_fold  = CIM[code][fold*W +: W];
    bound     = im_q ^ cim_fold;
  end

  ca_rule90 #(.W(W)) u_rule90 (.cur(ca_in), .nxt(ca_out));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      feat_q <= '0;
      im_q   <= '0;
    end else begin
      if (load) feat_q <= features_in;
      if (im_init || im_step) im_q <= ca_out;
    end
  end

endmodule
