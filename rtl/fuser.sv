// fuser: bundles the M modality hypervectors into one observation and assembles the
// full D-bit output hvout from its D/F-bit folds.
//
// One small counter per fold bit adds the spatial encoder's majority fold when `add` is
// high (`first` clears and loads instead). With `write` high the majority of these
// counters (bit i is 1 when 2*count > M, ties give 0) is stored into fold `fold` of the
// hvout register, bits [fold*W +: W]. hvout holds its value until that fold is written
// again, so the temporal encoder can read it once all F folds of a sample are in.
//
// From the source architecture: the D/F accumulator with clog2(M)-bit counts, majority
// bundling with equal weight per modality and the unfolded hvout[D] register at the end.
// The counter width clog2(M+1), the tie rule and the control pins are own choices.
module fuser #(
  parameter int unsigned D = 2000,
  parameter int unsigned F = 4,
  parameter int unsigned M = 3,
  localparam int unsigned W      = D / F,
  localparam int unsigned MW     = $clog2(M + 1),
  localparam int unsigned FOLD_W = (F > 1) ? $clog2(F) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              add,     // add `in` to the counters
  input  logic              first,   // first modality of a fold: clear and load
  input  logic [W-1:0]      in,      // majority fold of one modality
  input  logic              write,   // store the fused fold into hvout
  input  logic [FOLD_W-1:0] fold,
  output logic [D-1:0]      hvout
);

  logic [W-1:0][MW-1:0] acc_q;
  logic [W-1:0]         maj;
  logic [D-1:0]         hv_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q <= '0;
    end else if (add) begin
      for (int unsigned i = 0; i < W; i++)
        acc_q[i] <= first ? MW'(in[i]) : acc_q[i] + MW'(in[i]);
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < W; i++)
      maj[i] = (2 * int'(acc_q[i]) > int'(M));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) hv_q <= '0;
    else if (write) hv_q[fold*W +: W] <= maj;
  end

  assign hvout = hv_q;

endmodule
