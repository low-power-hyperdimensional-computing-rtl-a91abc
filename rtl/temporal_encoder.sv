// temporal_encoder: binds the last N fused hypervectors into one ngram hypervector.
//
// N registers of D bits form a chain. On `shift`, ngram[0] takes the new fused vector
// and ngram[k] takes ngram[k-1] rotated right by one bit, so ngram[k] holds the sample
// of k steps ago permuted k times. The output is the XOR of all N registers and is
// combinational from them. `filled` rises once N samples have been shifted in, i.e.
// when every register holds a real sample; the registers reset to zero.
//
// The unfolded chain of N registers, the permutation between neighbours and binding by
// XOR follow the source architecture (Figure 2.1 prints a right shift). Reading the
// shift as a cyclic rotation, the zero reset and the `filled` flag are own choices.
module temporal_encoder #(
  parameter int unsigned D = 2000,
  parameter int unsigned N = 3,
  localparam int unsigned NC_W = $clog2(N + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,   // take a new fused hypervector
  input  logic [D-1:0] hv_in,
  output logic [D-1:0] hv_out,  // XOR of the N ngram registers
  output logic         filled   // N samples have been taken
);

  logic [N-1:0][D-1:0] ngram_q;
  logic [NC_W-1:0]     cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ngram_q <= '0;
      cnt_q   <= '0;
    end else if (shift) begin
      ngram_q[0] <= hv_in;
      for (int unsigned k = 1; k < N; k++)
        ngram_q[k] <= {ngram_q[k-1][0], ngram_q[k-1][D-1:1]};
      if (cnt_q != NC_W'(N)) cnt_q <= cnt_q + 1'b1;
    end
  end

  always_comb begin
    hv_out = '0;
    for (int unsigned k = 0; k < N; k++)
      hv_out = hv_out ^ ngram_q[k];
  end

  assign filled = (cnt_q == NC_W'(N));

endmodule
