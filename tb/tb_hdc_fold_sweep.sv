// tb_hdc_fold_sweep: the fold-factor sweep of the emotion-recognition configuration
// (D = 2000, 214 channels, N = 3) at F = 1, 2, 8, 16, 50, 100 and 1000, next to the
// default F = 4 that tb_hdc_top_full covers. For every fold factor the sample interval
// must stay within the clock budget of a 1 ms classification at the clock periods
// 4400/F ns listed for it (1e6 ns / period = 227*F cycles), and every decision must
// match the reference model. G is picked per point, as the largest divisor of D whose
// search (4*G+2 cycles) still fits in the encoding time, so none of them stalls.
module tb_hdc_fold_sweep;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned NP = 7;
  int unsigned ck [NP], fl [NP], st [NP];
  logic [NP-1:0] fin;

  hdc_bench_point #(.F(1),    .G(50),   .BUDGET(227),    .NAME("F=1"))
    p0 (.clk, .checks(ck[0]), .failures(fl[0]), .stalls(st[0]), .finished(fin[0]));
  hdc_bench_point #(.F(2),    .G(100),  .BUDGET(454),    .NAME("F=2"))
    p1 (.clk, .checks(ck[1]), .failures(fl[1]), .stalls(st[1]), .finished(fin[1]));
  hdc_bench_point #(.F(8),    .G(400),  .BUDGET(1818),   .NAME("F=8"))
    p2 (.clk, .checks(ck[2]), .failures(fl[2]), .stalls(st[2]), .finished(fin[2]));
  hdc_bench_point #(.F(16),   .G(500),  .BUDGET(3636),   .NAME("F=16"))
    p3 (.clk, .checks(ck[3]), .failures(fl[3]), .stalls(st[3]), .finished(fin[3]));
  hdc_bench_point #(.F(50),   .G(2000), .BUDGET(11363),  .NAME("F=50"))
    p4 (.clk, .checks(ck[4]), .failures(fl[4]), .stalls(st[4]), .finished(fin[4]));
  hdc_bench_point #(.F(100),  .G(2000), .BUDGET(22727),  .NAME("F=100"))
    p5 (.clk, .checks(ck[5]), .failures(fl[5]), .stalls(st[5]), .finished(fin[5]));
  hdc_bench_point #(.F(1000), .G(2000), .BUDGET(227272), .NAME("F=1000"))
    p6 (.clk, .checks(ck[6]), .failures(fl[6]), .stalls(st[6]), .finished(fin[6]));

  initial begin
    int unsigned checks, failures;
    wait (&fin);
    checks = 0; failures = 0;
    for (int p = 0; p < NP; p++) begin
      checks += ck[p];
      failures += fl[p];
      checks++;
      if (st[p] != 0) begin
        failures++;
        $display("FAIL: point %0d stalled for %0d cycles", p, st[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

endmodule
