// spatial_encoder: bundles the bound hypervector folds of the channels of one modality.
//
// There is one saturating counter per bit of the D/F-bit fold. Each cycle with `valid`
// high adds the incoming fold bit-wise; with `first` also high the counters are cleared
// and loaded with the fold instead, which starts a new modality without a bubble. The
// output `maj` is the bit-wise majority of the counters held now: bit i is 1 when
// 2*count > mod_n, where `mod_n` is the number of channels summed for that modality
// (ties give 0). It is combinational from the counters, so the fuser can take the
// majority of modality m in the same cycle in which the first channel of modality m+1
// is being loaded.
//
// One channel per cycle and a saturating counter sized by the largest modality follow
// the source architecture (6 bits for 105 EEG channels, clog2(C/2)). The counter width
// here is clog2(C/2+2), which also gives 6 at C = 105 and always reaches the majority
// threshold; the tie rule and the clear-and-load control are this design's choices.
module spatial_encoder #(
  parameter int unsigned W     = 500,   // fold width D/F
  parameter int unsigned C_MAX = 105,   // channels in the largest modality
  localparam int unsigned CW   = $clog2(C_MAX / 2 + 2),
  localparam int unsigned NW   = $clog2(C_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,   // add `bound` this cycle
  input  logic          first,   // first channel of a modality: clear and load
  input  logic [W-1:0]  bound,
  input  logic [NW-1:0] mod_n,   // channel count of the modality held in the counters
  output logic [W-1:0]  maj
);

  localparam logic [CW-1:0] CMAX = '1;

  logic [W-1:0][CW-1:0] acc_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q <= '0;
    end else if (valid) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (first)
          acc_q[i] <= CW'(bound[i]);
        else if (bound[i] && acc_q[i] != CMAX)
          acc_q[i] <= acc_q[i] + 1'b1;
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < W; i++)
      maj[i] = (2 * int'(acc_q[i]) > int'(mod_n));
  end

endmodule
