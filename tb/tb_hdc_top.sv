// tb_hdc_top: end-to-end test of the HDC classifier at reduced sizes.
//
// D = 120, F = 4, G = 40, N = 3, three modalities of 5, 7 and 9 channels, two binary
// decisions. Random feature samples are offered with random gaps (often none), random
// prototypes are loaded, and every decision and every Hamming distance is compared with
// the bit-level reference model in hdc_ref_pkg. With G = 40 the associative memory
// needs 4*40+2 cycles per query, more than the 99 cycles the front end needs per sample,
// so back-to-back samples make the temporal encoder stall; samples with long gaps do
// not. Cycle counts checked: F*(T+3)+1 cycles from acceptance to the ngram shift,
// Y*G+2 cycles from the search start to dec_valid, and F*(T+3)+3 cycles between two
// accepted samples when nothing stalls. The run counts how often each mechanism
// occurred (fold write, modality switch inside a fold, counter saturation, stall,
// overlap of search and encoding, warm-up sample without decision, each decision
// value) and fails if any never did.
module tb_hdc_top;
  import hdc_ref_pkg::*;

  localparam int unsigned D = 120, F = 4, G = 40, N = 3, X = 3, M = 3;
  localparam int unsigned GROUPS = 2, CPG = 2;
  localparam int unsigned MOD_CH [M] = '{5, 7, 9};
  localparam int unsigned T = 21, Y = GROUPS * CPG, DW = $clog2(D + 1);
  localparam int unsigned NSAMPLES = 60;

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

  hdc_top #(.D(D), .F(F), .G(G), .N(N), .X(X), .M(M), .MOD_CH(MOD_CH),
            .GROUPS(GROUPS), .CPG(CPG)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected results, in order
  typedef struct { int unsigned hd[Y]; int unsigned dec[GROUPS]; } exp_t;
  exp_t exp_q[$];
  longint unsigned accept_q[$];  // acceptance cycles of samples whose shift is pending
  longint unsigned start_cyc;
  longint unsigned last_accept = 0;
  bit back_to_back = 0;

  // mechanism counters
  int unsigned n_fold_write = 0, n_mod_switch = 0, n_saturate = 0, n_stall = 0;
  int unsigned n_overlap = 0, n_warmup = 0, n_decisions = 0, n_interval = 0;
  int unsigned n_dec_val [GROUPS][2];

  model_t model;
  int unsigned n_stall_at_shift = 0;
  int unsigned stall_before = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // monitor: stalls, saturation, overlap, shift timing, search timing, decisions
  always @(posedge clk) if (rst_n) begin
    if (dut.fu_write) n_fold_write++;
    if (dut.fu_add && dut.se_valid) n_mod_switch++;
    if (dut.u_ctrl.state_q == hdc_pkg::S_TE_WAIT && dut.am_busy) n_stall++;
    if (dut.am_busy && dut.u_ctrl.state_q == hdc_pkg::S_CHAN) n_overlap++;
    if (dut.se_valid && !dut.se_first)
      for (int i = 0; i < D / F; i++)
        if (dut.bound[i] && dut.u_se.acc_q[i] == '1) n_saturate++;
    if (dut.te_shift) begin
      if (accept_q.size() == 0) check(0, "shift without accepted sample");
      else begin
        longint unsigned a;
        a = accept_q.pop_front();
        if (n_stall_at_shift == n_stall)
          check(cyc - a == F * (T + 3) + 1, $sformatf("shift latency %0d", cyc - a));
        n_stall_at_shift = n_stall;
      end
    end
    if (dut.am_start) start_cyc = cyc;
    if (dec_valid) begin
      exp_t e;
      n_decisions++;
      check(cyc - start_cyc == Y * G + 2, $sformatf("search latency %0d", cyc - start_cyc));
      if (exp_q.size() == 0) check(0, "unexpected decision");
      else begin
        e = exp_q.pop_front();
        for (int y = 0; y < Y; y++)
          check(distances[y] == DW'(e.hd[y]),
                $sformatf("distance %0d: got %0d exp %0d", y, distances[y], e.hd[y]));
        for (int g = 0; g < GROUPS; g++) begin
          check(decision[g] == 1'(e.dec[g]),
                $sformatf("decision %0d: got %0d exp %0d", g, decision[g], e.dec[g]));
          n_dec_val[g][decision[g]]++;
        end
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
    foreach (n_dec_val[g, v]) n_dec_val[g][v] = 0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // prototypes: random
    for (int y = 0; y < Y; y++) begin
      for (int i = 0; i < D; i++) model.proto[y][i] = 1'($urandom);
      @(negedge clk);
      proto_we = 1'b1; proto_addr = 2'(y); proto_wdata = model.proto[y];
    end
    @(negedge clk) proto_we = 1'b0;

    for (int s = 0; s < NSAMPLES; s++) begin
      int gap;
      gap = ($urandom_range(0, 3) == 0) ? $urandom_range(60, 120) : 0;
      repeat (gap) @(posedge clk);
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
      if (s > 0 && gap == 0 && n_stall == stall_before) begin
        check(cyc - 1 - last_accept == F * (T + 3) + 3,
              $sformatf("sample interval %0d", cyc - 1 - last_accept));
        n_interval++;
      end
      stall_before = n_stall;
      last_accept = cyc - 1;
      accept_q.push_back(cyc - 1);
      hv = model.encode(codes);
      model.te_push(hv);
      if (model.samples >= N) begin
        model.classify(model.te_out(), e.hd, e.dec);
        exp_q.push_back(e);
      end else n_warmup++;
    end
    // drain
    repeat (2 * (Y * G + F * (T + 3)) + 20) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d decisions missing", exp_q.size()));

    $display("mechanisms: fold_write=%0d mod_switch=%0d saturate=%0d stall=%0d overlap=%0d warmup=%0d decisions=%0d intervals=%0d",
             n_fold_write, n_mod_switch, n_saturate, n_stall, n_overlap, n_warmup,
             n_decisions, n_interval);
    check(n_fold_write > 0, "no fold write");
    check(n_mod_switch > 0, "no modality switch");
    check(n_saturate > 0, "no counter saturation");
    check(n_stall > 0, "no stall");
    check(n_overlap > 0, "no overlap of search and encoding");
    check(n_warmup > 0, "no warm-up sample");
    check(n_interval > 0, "no unstalled interval measured");
    for (int g = 0; g < GROUPS; g++)
      for (int v = 0; v < 2; v++)
        check(n_dec_val[g][v] > 0, $sformatf("decision %0d never %0d", g, v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
