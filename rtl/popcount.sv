// popcount: number of ones in a W-bit vector (the "binary adder" of the associative
// memory). Combinational; written as a plain sum, which synthesis maps to an adder tree.
module popcount #(
  parameter int unsigned W  = 10,
  localparam int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  in,
  output logic [CW-1:0] count
);

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < W; i++)
      count = count + CW'(in[i]);
  end

endmodule
