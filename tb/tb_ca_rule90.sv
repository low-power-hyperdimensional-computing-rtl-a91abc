// tb_ca_rule90: checks one rule-90 step on a 500-bit grid (one fold at the default
// sizes) and on a 25-bit grid. The expected vector is built cell by cell as
// left neighbour XOR right neighbour with wrap-around. Also checks that iterating the
// 25-bit grid from a one-hot seed gives the known Sierpinski pattern for a few steps.
module tb_ca_rule90;

  localparam int unsigned WA = 500, WB = 25;

  logic [WA-1:0] a_cur, a_nxt;
  logic [WB-1:0] b_cur, b_nxt;

  ca_rule90 #(.W(WA)) dut_a (.cur(a_cur), .nxt(a_nxt));
  ca_rule90 #(.W(WB)) dut_b (.cur(b_cur), .nxt(b_nxt));

  int unsigned checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [WA-1:0] ea;
    logic [WB-1:0] eb;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < WA; i++) a_cur[i] = 1'($urandom);
      for (int i = 0; i < WB; i++) b_cur[i] = 1'($urandom);
      #1;
      for (int i = 0; i < WA; i++) ea[i] = a_cur[(i + WA - 1) % WA] ^ a_cur[(i + 1) % WA];
      for (int i = 0; i < WB; i++) eb[i] = b_cur[(i + WB - 1) % WB] ^ b_cur[(i + 1) % WB];
      check(a_nxt == ea, $sformatf("W=500 step %0d", t));
      check(b_nxt == eb, $sformatf("W=25 step %0d", t));
    end
    // one-hot seed in the middle: after k steps the ones sit at 12-k .. 12+k, where
    // the cell at offset j is 1 iff binomial(k, (j+k)/2) is odd and j+k is even
    b_cur = '0;
    b_cur[12] = 1'b1;
    for (int k = 1; k <= 8; k++) begin
      #1;
      eb = '0;
      for (int j = -k; j <= k; j += 2)
        if ((((j + k) / 2) & ~k) == 0) eb[12 + j] = 1'b1;  // Lucas: C(k,m) odd iff m&~k==0
      check(b_nxt == eb, $sformatf("Sierpinski row %0d", k));
      b_cur = b_nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
