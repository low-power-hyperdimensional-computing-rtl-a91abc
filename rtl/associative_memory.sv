// associative_memory: finds, for each decision, the stored class prototype nearest in
// Hamming distance to the query hypervector.
//
// Y = GROUPS*CPG prototypes of D bits are written whole through `proto_we`. A `start`
// pulse begins a search over the query, which must stay stable while `busy` is high.
// Each cycle one prototype fold of W = D/G bits is XORed with the matching query fold,
// the ones are counted, and the count is added to that class's distance register:
// class 0 folds 0..G-1, then class 1, and so on, Y*G cycles in all. One cycle later the
// classes of each group (CPG consecutive classes, e.g. {valence low, valence high}) are
// compared, the index of the smallest distance (lowest index on a tie) is stored in
// `decision`, and `done` pulses for one cycle. `distances` shows the last results.
//
// Prototype storage, XOR per prototype, a single fold-wide binary adder with a
// multiplexer in front and distance registers behind, and nearest-class decision
// follow the source architecture. G = 200 (10-bit folds, 800 cycles for 4 classes, just
// under the 868 cycles the front end needs per sample) is this design's reading of
// "G is chosen so the AM takes as many cycles as the SE". The write port, the class
// grouping and the tie rule are own choices.
module associative_memory #(
  parameter int unsigned D      = 2000,
  parameter int unsigned G      = 200,
  parameter int unsigned GROUPS = 2,
  parameter int unsigned CPG    = 2,
  localparam int unsigned Y     = GROUPS * CPG,
  localparam int unsigned W     = D / G,
  localparam int unsigned DW    = $clog2(D + 1),
  localparam int unsigned PW    = $clog2(W + 1),
  localparam int unsigned YW    = (Y > 1) ? $clog2(Y) : 1,
  localparam int unsigned GW    = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned CB    = (CPG > 1) ? $clog2(CPG) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        proto_we,
  input  logic [YW-1:0]               proto_addr,
  input  logic [D-1:0]                proto_wdata,
  input  logic                        start,
  input  logic [D-1:0]                query,
  output logic                        busy,
  output logic                        done,
  output logic [GROUPS-1:0][CB-1:0]   decision,
  output logic [Y-1:0][DW-1:0]        distances
);

  logic [D-1:0]         proto_q [Y];
  logic [Y-1:0][DW-1:0] dist_q;
  logic [YW-1:0]        y_q;
  logic [GW-1:0]        g_q;
  logic                 run_q;
  logic                 cmp_q;
  logic [GROUPS-1:0][CB-1:0] dec_q;
  logic                 done_q;

  logic [W-1:0]  diff;
  logic [PW-1:0] pc;
  logic [GROUPS-1:0][CB-1:0] dec_d;

  always_ff @(posedge clk) begin
    if (proto_we) proto_q[proto_addr] <= proto_wdata;
  end

  always_comb diff = proto_q[y_q][g_q*W +: W] ^ query[g_q*W +: W];

  popcount #(.W(W)) u_pc (.in(diff), .count(pc));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dist_q <= '0;
      y_q    <= '0;
      g_q    <= '0;
      run_q  <= 1'b0;
      cmp_q  <= 1'b0;
      dec_q  <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      cmp_q  <= 1'b0;
      if (start && !run_q && !cmp_q) begin
        run_q <= 1'b1;
        y_q   <= '0;
        g_q   <= '0;
      end else if (run_q) begin
        dist_q[y_q] <= ((g_q == '0) ? '0 : dist_q[y_q]) + DW'(pc);
        if (g_q == GW'(G - 1)) begin
          g_q <= '0;
          if (y_q == YW'(Y - 1)) begin
            run_q <= 1'b0;
            cmp_q <= 1'b1;
          end else begin
            y_q <= y_q + 1'b1;
          end
        end else begin
          g_q <= g_q + 1'b1;
        end
      end
      if (cmp_q) begin
        dec_q  <= dec_d;
        done_q <= 1'b1;
      end
    end
  end

  // Nearest class within each group; the lowest index wins a tie.
  always_comb begin
    for (int unsigned gr = 0; gr < GROUPS; gr++) begin
      dec_d[gr] = '0;
      for (int unsigned c = 1; c < CPG; c++)
        if (dist_q[gr*CPG + c] < dist_q[gr*CPG + int'(dec_d[gr])])
          dec_d[gr] = CB'(c);
    end
  end

  assign busy      = run_q || cmp_q;
  assign done      = done_q;
  assign decision  = dec_q;
  assign distances = dist_q;

  // A search may only be started while the memory is idle.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy)
    else $error("associative_memory: start while busy");

endmodule
