// tb_fuser: checks the fuser with D = 2000, F = 4 and M = 3 modalities, and with
// D = 40, F = 4 and M = 2 (the keyword-spotting case, where a tie gives 0).
//
// For every fold, M random modality folds are added (the first one with `first`),
// then `write` stores the majority into that fold of hvout. The expected hvout is kept
// by the testbench: bit i of the fold is 1 when more than half of the M inputs had it
// set. Folds are written in a random order and the other folds must keep their value.
module tb_fuser;

  localparam int unsigned DA = 2000, FA = 4, MA = 3, WA = DA / FA;
  localparam int unsigned DB = 40, FB = 4, MB = 2, WB = DB / FB;

  logic clk = 1'b0, rst_n = 1'b0;
  logic add_a = 0, first_a = 0, write_a = 0;
  logic [WA-1:0] in_a = '0;
  logic [1:0] fold_a = '0;
  logic [DA-1:0] hv_a;
  logic add_b = 0, first_b = 0, write_b = 0;
  logic [WB-1:0] in_b = '0;
  logic [1:0] fold_b = '0;
  logic [DB-1:0] hv_b;

  fuser #(.D(DA), .F(FA), .M(MA)) dut_a (.clk, .rst_n, .add(add_a), .first(first_a),
    .in(in_a), .write(write_a), .fold(fold_a), .hvout(hv_a));
  fuser #(.D(DB), .F(FB), .M(MB)) dut_b (.clk, .rst_n, .add(add_b), .first(first_b),
    .in(in_b), .write(write_b), .fold(fold_b), .hvout(hv_b));

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [DA-1:0] ea;
    logic [DB-1:0] eb;
    int unsigned ca [WA];
    int unsigned cb [WB];
    int unsigned f;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ea = '0; eb = '0;
    check(hv_a == ea && hv_b == eb, "reset value");
    for (int s = 0; s < 24; s++) begin
      f = $urandom_range(0, FA - 1);
      fold_a = 2'(f); fold_b = 2'(f);
      for (int i = 0; i < WA; i++) ca[i] = 0;
      for (int i = 0; i < WB; i++) cb[i] = 0;
      for (int m = 0; m < MA; m++) begin
        for (int i = 0; i < WA; i++) begin in_a[i] = 1'($urandom); ca[i] += in_a[i]; end
        for (int i = 0; i < WB; i++) begin in_b[i] = 1'($urandom); cb[i] += in_b[i]; end
        add_a = 1; first_a = (m == 0);
        add_b = (m < MB); first_b = (m == 0);
        if (m >= MB) for (int i = 0; i < WB; i++) cb[i] -= in_b[i];
        @(negedge clk);
        add_a = 0; add_b = 0; first_a = 0; first_b = 0;
      end
      write_a = 1; write_b = 1;
      @(negedge clk);
      write_a = 0; write_b = 0;
      for (int i = 0; i < WA; i++) ea[f*WA + i] = (2 * ca[i] > MA);
      for (int i = 0; i < WB; i++) eb[f*WB + i] = (2 * cb[i] > MB);
      check(hv_a == ea, $sformatf("M=3 hvout after fold %0d", f));
      check(hv_b == eb, $sformatf("M=2 hvout after fold %0d", f));
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
