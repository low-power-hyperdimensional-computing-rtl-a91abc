// tb_temporal_encoder: checks the ngram chain at the default D = 2000, N = 3 and at
// D = 64, N = 20 (the keyword-spotting ngram length). Random hypervectors are shifted
// in with random idle cycles between; after each shift the output must equal
// XOR over k of (sample k steps ago rotated right k times), where the rotation is
// built bit by bit, and `filled` must rise exactly with the N-th sample.
module tb_temporal_encoder;

  localparam int unsigned DA = 2000, NA = 3;
  localparam int unsigned DB = 64, NB = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic shift_a = 1'b0, shift_b = 1'b0;
  logic [DA-1:0] in_a = '0, out_a;
  logic [DB-1:0] in_b = '0, out_b;
  logic filled_a, filled_b;

  temporal_encoder #(.D(DA), .N(NA)) dut_a (.clk, .rst_n, .shift(shift_a), .hv_in(in_a),
                                            .hv_out(out_a), .filled(filled_a));
  temporal_encoder #(.D(DB), .N(NB)) dut_b (.clk, .rst_n, .shift(shift_b), .hv_in(in_b),
                                            .hv_out(out_b), .filled(filled_b));

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [DA-1:0] hist_a [$];
  logic [DB-1:0] hist_b [$];

  function automatic logic [DA-1:0] exp_a();
    logic [DA-1:0] r = '0, v;
    for (int k = 0; k < NA && k < hist_a.size(); k++) begin
      v = hist_a[hist_a.size() - 1 - k];
      for (int j = 0; j < k; j++) v = {v[0], v[DA-1:1]};
      r ^= v;
    end
    return r;
  endfunction

  function automatic logic [DB-1:0] exp_b();
    logic [DB-1:0] r = '0, v, w;
    for (int k = 0; k < NB && k < hist_b.size(); k++) begin
      v = hist_b[hist_b.size() - 1 - k];
      for (int i = 0; i < DB; i++) w[i] = v[(i + k) % DB];
      r ^= w;
    end
    return r;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(out_a == '0 && out_b == '0 && !filled_a && !filled_b, "reset state");
    for (int s = 0; s < 40; s++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      for (int i = 0; i < DA; i++) in_a[i] = 1'($urandom);
      for (int i = 0; i < DB; i++) in_b[i] = 1'($urandom);
      shift_a = 1'b1; shift_b = 1'b1;
      @(negedge clk);
      shift_a = 1'b0; shift_b = 1'b0;
      hist_a.push_back(in_a);
      hist_b.push_back(in_b);
      check(out_a == exp_a(), $sformatf("D=2000 output after sample %0d", s));
      check(out_b == exp_b(), $sformatf("D=64 N=20 output after sample %0d", s));
      check(filled_a == (s + 1 >= NA), $sformatf("filled N=3 after sample %0d", s));
      check(filled_b == (s + 1 >= NB), $sformatf("filled N=20 after sample %0d", s));
      // output holds while no shift
      in_a = ~in_a;
      @(negedge clk);
      check(out_a == exp_a(), "output holds without shift");
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
