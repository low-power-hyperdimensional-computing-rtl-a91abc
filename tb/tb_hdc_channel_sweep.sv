// tb_hdc_channel_sweep: the classifier built for different channel counts at D = 2000,
// F = 4, N = 3, with valence and arousal decisions: 3 channels (one per modality), 64
// channels (split 10/23/31 in the proportions of the 214-channel set) and 214 channels
// (32/77/105). Only the spatial-encoder counters and the feature register grow with the
// channel count; the item memory stays one 500-bit fold. Each point checks every
// decision against the reference model and the F*(T+3)+3-cycle sample interval; G is
// picked per point so the search hides under the encoding.
module tb_hdc_channel_sweep;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned NP = 3;
  localparam int unsigned CH3 [3]   = '{1, 1, 1};
  localparam int unsigned CH64 [3]  = '{10, 23, 31};
  localparam int unsigned CH214 [3] = '{32, 77, 105};
  int unsigned ck [NP], fl [NP], st [NP];
  logic [NP-1:0] fin;

  hdc_bench_point #(.MOD_CH(CH3),   .G(5),   .NSAMPLES(8), .NAME("T=3"))
    p0 (.clk, .checks(ck[0]), .failures(fl[0]), .stalls(st[0]), .finished(fin[0]));
  hdc_bench_point #(.MOD_CH(CH64),  .G(50),  .NSAMPLES(6), .NAME("T=64"))
    p1 (.clk, .checks(ck[1]), .failures(fl[1]), .stalls(st[1]), .finished(fin[1]));
  hdc_bench_point #(.MOD_CH(CH214), .G(200), .NSAMPLES(6), .BUDGET(909), .NAME("T=214"))
    p2 (.clk, .checks(ck[2]), .failures(fl[2]), .stalls(st[2]), .finished(fin[2]));

  initial begin
    int unsigned checks, failures;
    wait (&fin);
    checks = 0; failures = 0;
    for (int p = 0; p < NP; p++) begin
      checks += ck[p] + 1;
      failures += fl[p];
      if (st[p] != 0) begin
        failures++;
        $display("FAIL: point %0d stalled for %0d cycles", p, st[p]);
      end
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
