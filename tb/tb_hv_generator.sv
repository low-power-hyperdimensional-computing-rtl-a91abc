// tb_hv_generator: checks the bound fold iM XOR CiM[feature] for every channel and
// fold, at the default sizes (D = 2000, F = 4, three values, 214 channels) and at a
// keyword-spotting-like size (D = 100, F = 2, 20 values, 34 channels).
//
// The expected iM fold of channel c is rule90^(c+1) of the seed fold, computed cell by
// cell with wrap-around; the CiM vectors come from the reference model in hdc_ref_pkg.
// It also checks the CiM spacing: level k differs from level 0 in k*(D/2)/(X-1) bits,
// so the two ends are D/2 apart. The sweep uses one cycle per channel after one
// initialisation cycle per fold, as the controller does.
module tb_hv_generator;
  import hdc_ref_pkg::*;

  localparam int unsigned DA = 2000, FA = 4, XA = 3, TA = 214, WA = DA / FA;
  localparam int unsigned DB = 100,  FB = 2, XB = 20, TB = 34, WB = DB / FB;

  typedef hdc_model #(.D(DA), .F(FA), .X(XA)) model_a_t;
  typedef hdc_model #(.D(DB), .F(FB), .X(XB), .N(20), .GROUPS(1), .CPG(10)) model_b_t;

  logic clk = 1'b0, rst_n = 1'b0;

  logic load_a = 0, init_a = 0, step_a = 0;
  logic [TA-1:0][1:0] feat_a = '0;
  logic [1:0] fold_a = '0;
  logic [7:0] chan_a = '0;
  logic [WA-1:0] bound_a;

  logic load_b = 0, init_b = 0, step_b = 0;
  logic [TB-1:0][4:0] feat_b = '0;
  logic [0:0] fold_b = '0;
  logic [5:0] chan_b = '0;
  logic [WB-1:0] bound_b;

  hv_generator #(.D(DA), .F(FA), .X(XA), .T(TA)) dut_a (
    .clk, .rst_n, .load(load_a), .features_in(feat_a), .im_init(init_a), .im_step(step_a),
    .fold(fold_a), .chan(chan_a), .bound(bound_a));
  hv_generator #(.D(DB), .F(FB), .X(XB), .T(TB)) dut_b (
    .clk, .rst_n, .load(load_b), .features_in(feat_b), .im_init(init_b), .im_step(step_b),
    .fold(fold_b), .chan(chan_b), .bound(bound_b));

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [WA-1:0] r90a(logic [WA-1:0] v);
    logic [WA-1:0] r;
    for (int i = 0; i < WA; i++) r[i] = v[(i + WA - 1) % WA] ^ v[(i + 1) % WA];
    return r;
  endfunction

  function automatic logic [WB-1:0] r90b(logic [WB-1:0] v);
    logic [WB-1:0] r;
    for (int i = 0; i < WB; i++) r[i] = v[(i + WB - 1) % WB] ^ v[(i + 1) % WB];
    return r;
  endfunction

  model_a_t ma;
  model_b_t mb;

  initial begin
    int unsigned codes_a [TA];
    int unsigned codes_b [TB];
    int unsigned q[$];
    logic [WA-1:0] ima;
    logic [WB-1:0] imb;
    int unsigned hd;
    q.push_back(TA);
    ma = new(q);
    q.delete();
    q.push_back(TB);
    mb = new(q);

    // CiM spacing
    for (int k = 0; k < XB; k++) begin
      hd = 0;
      for (int i = 0; i < DB; i++) hd += (mb.cim[k][i] != mb.cim[0][i]);
      check(hd == k * (DB / 2) / (XB - 1), $sformatf("CiM level %0d distance %0d", k, hd));
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      for (int c = 0; c < TA; c++) begin
        codes_a[c] = $urandom_range(0, XA - 1);
        feat_a[c] = 2'(codes_a[c]);
      end
      for (int c = 0; c < TB; c++) begin
        codes_b[c] = $urandom_range(0, XB - 1);
        feat_b[c] = 5'(codes_b[c]);
      end
      load_a = 1; load_b = 1;
      @(negedge clk);
      load_a = 0; load_b = 0;
      feat_a = '0; feat_b = '0;  // the generator must use its own copy
      for (int f = 0; f < FA; f++) begin
        fold_a = 2'(f);
        fold_b = 1'(f % FB);
        init_a = 1;
        init_b = (f < FB);
        @(negedge clk);
        init_a = 0; init_b = 0;
        ima = r90a(ma.cim[XA-1][f*WA +: WA]);
        if (f < FB) imb = r90b(mb.cim[XB-1][f*WB +: WB]);
        for (int c = 0; c < TA; c++) begin
          chan_a = 8'(c);
          chan_b = 6'(c % TB);
          #1;
          check(bound_a == (ima ^ ma.cim[codes_a[c]][f*WA +: WA]),
                $sformatf("A fold %0d channel %0d", f, c));
          if (f < FB && c < TB)
            check(bound_b == (imb ^ mb.cim[codes_b[c]][f*WB +: WB]),
                  $sformatf("B fold %0d channel %0d", f, c));
          step_a = 1;
          step_b = (f < FB && c < TB);
          @(negedge clk);
          step_a = 0; step_b = 0;
          ima = r90a(ima);
          if (f < FB && c < TB) imb = r90b(imb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
