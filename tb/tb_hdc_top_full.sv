// tb_hdc_top_full: the HDC classifier at its default sizes (D = 2000, F = 4, G = 200,
// N = 3, 32 + 77 + 105 = 214 ternary channels, valence and arousal decisions).
//
// Random prototypes are loaded and NSAMPLES random feature samples are offered back to
// back. Every decision and Hamming distance is compared with the bit-level reference
// model in hdc_ref_pkg. Timing checks: samples are accepted exactly every
// F*(T+3)+3 = 871 cycles, which is within the 909 cycles that one classification per
// millisecond at 909 kHz allows; the search takes Y*G+2 = 802 cycles and overlaps the
// encoding of the next sample without ever stalling it.
module tb_hdc_top_full;
  import hdc_ref_pkg::*;

  localparam int unsigned D = 2000, F = 4, G = 200, N = 3, X = 3, M = 3;
  localparam int unsigned GROUPS = 2, CPG = 2;
  localparam int unsigned MOD_CH [M] = '{32, 77, 105};
  localparam int unsigned T = 214, Y = GROUPS * CPG, DW = $clog2(D + 1);
  localparam int unsigned NSAMPLES = 20;
  localparam int unsigned BUDGET = 909;  // cycles per classification at 909 kHz, 1 ms

  typedef hdc_model #(.D(D), .F(F), .N(N), .X(X), .GROUPS(GROUPS), .CPG(CPG)) model_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [T-1:0][1:0] in_features = '0;
  logic proto_we = 1'b0;
  logic [1:0] proto_addr = '0;
  logic [D-1:0] proto_wdata = '0;
  logic dec_valid;
  logic [GROUPS-1:0][0:0] decision;
  logic [Y-1:0][DW-1:0] distances;

  hdc_top dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int unsigned hd[Y]; int unsigned dec[GROUPS]; } exp_t;
  exp_t exp_q[$];
  longint unsigned start_cyc = 0, last_accept = 0;
  int unsigned n_stall = 0, n_overlap = 0, n_decisions = 0, n_interval = 0;
  model_t model;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.state_q == hdc_pkg::S_TE_WAIT && dut.am_busy) n_stall++;
    if (dut.am_busy && dut.u_ctrl.state_q == hdc_pkg::S_CHAN) n_overlap++;
    if (dut.am_start) start_cyc = cyc;
    if (dec_valid) begin
      exp_t e;
      n_decisions++;
      check(cyc - start_cyc == 64'(Y * G + 2), $sformatf("search latency %0d", cyc - start_cyc));
      if (exp_q.size() == 0) check(0, "unexpected decision");
      else begin
        e = exp_q.pop_front();
        for (int y = 0; y < Y; y++)
          check(distances[y] == DW'(e.hd[y]),
                $sformatf("distance %0d: got %0d exp %0d", y, distances[y], e.hd[y]));
        for (int g = 0; g < GROUPS; g++)
          check(decision[g] == 1'(e.dec[g]),
                $sformatf("decision %0d: got %0d exp %0d", g, decision[g], e.dec[g]));
      end
    end
  end

  initial begin
    int unsigned codes[];
    bit [D-1:0] hv;
    exp_t e;
    int unsigned mc[$];
    foreach (MOD_CH[m]) mc.push_back(MOD_CH[m]);
    model = new(mc);
    codes = new[T];

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int y = 0; y < Y; y++) begin
      for (int i = 0; i < D; i++) model.proto[y][i] = 1'($urandom);
      @(negedge clk);
      proto_we = 1'b1; proto_addr = 2'(y); proto_wdata = model.proto[y];
    end
    @(negedge clk) proto_we = 1'b0;

    for (int s = 0; s < NSAMPLES; s++) begin
      @(negedge clk);
      for (int c = 0; c < T; c++) begin
        codes[c] = $urandom_range(0, X - 1);
        in_features[c] = 2'(codes[c]);
      end
      in_valid = 1'b1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      #1 in_valid = 1'b0;
      // accepted on the edge just passed; cyc has already counted it
      if (s > 0) begin
        check(cyc - 1 - last_accept == 64'(F * (T + 3) + 3),
              $sformatf("sample interval %0d", cyc - 1 - last_accept));
        check(cyc - 1 - last_accept <= 64'(BUDGET),
              $sformatf("sample interval %0d over budget", cyc - 1 - last_accept));
        n_interval++;
      end
      last_accept = cyc - 1;
      hv = model.encode(codes);
      model.te_push(hv);
      if (model.samples >= N) begin
        model.classify(model.te_out(), e.hd, e.dec);
        exp_q.push_back(e);
      end
    end
    repeat (2 * (Y * G + F * (T + 3)) + 20) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d decisions missing", exp_q.size()));
    check(n_decisions == NSAMPLES - N + 1, $sformatf("%0d decisions", n_decisions));
    check(n_stall == 0, $sformatf("%0d stall cycles at default sizes", n_stall));
    check(n_overlap > 0, "search never overlapped encoding");
    $display("decisions=%0d intervals=%0d overlap_cycles=%0d stall_cycles=%0d",
             n_decisions, n_interval, n_overlap, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
