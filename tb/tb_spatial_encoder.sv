// tb_spatial_encoder: checks the per-modality majority of the spatial encoder with
// W = 64 bits and counters sized for C_MAX = 105 channels (6 bits, saturating at 63).
//
// Modalities of random size (including 32, 77, 105 and even sizes that can tie) are
// streamed in back to back, one channel per cycle, the first channel of each modality
// restarting the counters. Before each restart the majority output is compared with a
// plain count: bit i is 1 when 2*ones > n. Half of the modalities use biased inputs so
// that many bits see more than 63 ones and the counters saturate; the test counts
// those saturation events and fails if there were none.
module tb_spatial_encoder;

  localparam int unsigned W = 64, C_MAX = 105;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0, first = 1'b0;
  logic [W-1:0] bound = '0, maj;
  logic [6:0] mod_n = '0;

  spatial_encoder #(.W(W), .C_MAX(C_MAX)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, n_sat = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int unsigned cnt [W];
    int unsigned n, bias;
    logic [W-1:0] expv;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 60; m++) begin
      case (m % 6)
        0: n = 32;
        1: n = 77;
        2: n = 105;
        3: n = 2 * $urandom_range(1, 52);
        default: n = $urandom_range(1, C_MAX);
      endcase
      bias = (m % 2) ? 95 : 50;  // percent of ones
      for (int i = 0; i < W; i++) cnt[i] = 0;
      for (int c = 0; c < n; c++) begin
        for (int i = 0; i < W; i++) begin
          bound[i] = ($urandom_range(0, 99) < bias);
          cnt[i] += bound[i];
        end
        valid = 1'b1;
        first = (c == 0);
        @(negedge clk);
      end
      valid = 1'b0;
      first = 1'b0;
      mod_n = 7'(n);
      #1;
      for (int i = 0; i < W; i++) begin
        expv[i] = (2 * cnt[i] > n);
        if (cnt[i] > 63) n_sat++;
      end
      check(maj == expv, $sformatf("modality %0d of %0d channels", m, n));
      // idle cycle: counters hold
      @(negedge clk);
      check(maj == expv, "counters hold while not valid");
    end
    check(n_sat > 0, "no saturation exercised");
    $display("saturated counters: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
