// tb_hdc_kws: the keyword-spotting configuration of the same processor: D = 10000,
// ngram N = 20, two modalities (4 "consonant" features and 30 LPC-spectrogram rows),
// 20 feature levels and one decision among 10 keyword classes. The fold factors are not
// given for this configuration; F = 4 as in the emotion design and G = 10, so the
// search (102 cycles) hides under the 151-cycle encoding. 24 random samples are run;
// after the 20-sample warm-up every decision and distance is compared with the
// reference model.
module tb_hdc_kws;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned KWS_CH [2] = '{4, 30};
  int unsigned ck, fl, st;
  logic fin;

  hdc_bench_point #(.D(10000), .F(4), .G(10), .N(20), .X(20), .M(2), .MOD_CH(KWS_CH),
                    .GROUPS(1), .CPG(10), .NSAMPLES(24), .NAME("KWS"))
    p0 (.clk, .checks(ck), .failures(fl), .stalls(st), .finished(fin));

  initial begin
    int unsigned checks, failures;
    wait (fin);
    checks = ck + 1;
    failures = fl;
    if (st != 0) begin
      failures++;
      $display("FAIL: stalled for %0d cycles", st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

endmodule
