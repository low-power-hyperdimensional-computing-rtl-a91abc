// hdc_bench_point: drives one configuration of hdc_top with back-to-back random
// samples and compares every decision and distance with the reference model. Used by
// the workload testbenches, which instantiate it once per configuration; it is not a
// testbench on its own. It reports its check and failure counts and raises `finished`
// when all decisions have come back. It also checks the sample interval: exactly
// F*(T+3)+3 cycles when the search does not stall the encoder, and never more than
// BUDGET cycles (the cycle budget of one classification, 0 = not checked).
module hdc_bench_point #(
  parameter int unsigned D = 2000,
  parameter int unsigned F = 4,
  parameter int unsigned G = 200,
  parameter int unsigned N = 3,
  parameter int unsigned X = 3,
  parameter int unsigned M = 3,
  parameter int unsigned MOD_CH [M] = '{32, 77, 105},
  parameter int unsigned GROUPS = 2,
  parameter int unsigned CPG = 2,
  parameter int unsigned NSAMPLES = 4,
  parameter longint unsigned BUDGET = 0,
  parameter string NAME = "point"
) (
  input  logic        clk,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned stalls,
  output logic        finished
);
  import hdc_ref_pkg::*;

  function automatic int unsigned sum_ch();
    int unsigned s = 0;
    for (int unsigned m = 0; m < M; m++) s += MOD_CH[m];
    return s;
  endfunction

  localparam int unsigned T = sum_ch();
  localparam int unsigned Y = GROUPS * CPG, DW = $clog2(D + 1);
  localparam int unsigned FW = (X > 1) ? $clog2(X) : 1;
  localparam int unsigned YW = (Y > 1) ? $clog2(Y) : 1;
  localparam int unsigned CB = (CPG > 1) ? $clog2(CPG) : 1;

  typedef hdc_model #(.D(D), .F(F), .N(N), .X(X), .GROUPS(GROUPS), .CPG(CPG)) model_t;

  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [T-1:0][FW-1:0] in_features = '0;
  logic proto_we = 1'b0;
  logic [YW-1:0] proto_addr = '0;
  logic [D-1:0] proto_wdata = '0;
  logic dec_valid;
  logic [GROUPS-1:0][CB-1:0] decision;
  logic [Y-1:0][DW-1:0] distances;

  hdc_top #(.D(D), .F(F), .G(G), .N(N), .X(X), .M(M), .MOD_CH(MOD_CH),
            .GROUPS(GROUPS), .CPG(CPG)) dut (.*);

  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int unsigned hd[Y]; int unsigned dec[GROUPS]; } exp_t;
  exp_t exp_q[$];
  int unsigned n_decisions = 0;
  model_t model;

  initial begin
    checks = 0; failures = 0; stalls = 0; finished = 1'b0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0d: %s", NAME, cyc, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.state_q == hdc_pkg::S_TE_WAIT && dut.am_busy) stalls++;
    if (dec_valid) begin
      exp_t e;
      n_decisions++;
      if (exp_q.size() == 0) check(0, "unexpected decision");
      else begin
        e = exp_q.pop_front();
        for (int y = 0; y < Y; y++)
          check(distances[y] == DW'(e.hd[y]), $sformatf("distance %0d", y));
        for (int g = 0; g < GROUPS; g++)
          check(decision[g] == CB'(e.dec[g]), $sformatf("decision %0d", g));
      end
    end
  end

  initial begin
    int unsigned codes[];
    bit [D-1:0] hv;
    exp_t e;
    int unsigned mc[$];
    longint unsigned last_accept = 0;
    int unsigned stall_before = 0;
    foreach (MOD_CH[m]) mc.push_back(MOD_CH[m]);
    model = new(mc);
    codes = new[T];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int y = 0; y < Y; y++) begin
      for (int i = 0; i < D; i++) model.proto[y][i] = 1'($urandom);
      @(negedge clk);
      proto_we = 1'b1; proto_addr = YW'(y); proto_wdata = model.proto[y];
    end
    @(negedge clk) proto_we = 1'b0;
    for (int s = 0; s < NSAMPLES; s++) begin
      @(negedge clk);
      for (int c = 0; c < T; c++) begin
        codes[c] = $urandom_range(0, X - 1);
        in_features[c] = FW'(codes[c]);
      end
      in_valid = 1'b1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      #1 in_valid = 1'b0;
      if (s > 0) begin
        if (stalls == stall_before)
          check(cyc - 1 - last_accept == 64'(F * (T + 3) + 3),
                $sformatf("sample interval %0d", cyc - 1 - last_accept));
        if (BUDGET != 0)
          check(cyc - 1 - last_accept <= BUDGET,
                $sformatf("sample interval %0d over budget %0d", cyc - 1 - last_accept, BUDGET));
      end
      stall_before = stalls;
      last_accept = cyc - 1;
      hv = model.encode(codes);
      model.te_push(hv);
      if (model.samples >= N) begin
        model.classify(model.te_out(), e.hd, e.dec);
        exp_q.push_back(e);
      end
    end
    while (exp_q.size() != 0 && cyc < last_accept + 64'(4 * (Y * G + F * (T + 3)) + 100))
      @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d decisions missing", exp_q.size()));
    check(n_decisions == NSAMPLES - N + 1, $sformatf("%0d decisions", n_decisions));
    $display("%s: T=%0d F=%0d G=%0d interval=%0d cycles, decisions=%0d, stall cycles=%0d",
             NAME, T, F, G, F * (T + 3) + 3, n_decisions, stalls);
    finished = 1'b1;
  end

endmodule
