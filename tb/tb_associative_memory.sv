// tb_associative_memory: checks Hamming distances, nearest-class decisions and timing
// of the associative memory at the default sizes (D = 2000, G = 200, valence and
// arousal with two classes each) and at a keyword-spotting-like size (D = 100, G = 10,
// one group of ten classes).
//
// Prototypes are random; queries are random or a prototype with a few bits flipped,
// and some prototypes are written as copies of others to force ties, which must go to
// the lower class index. Distances are counted bit by bit in the testbench. Each search
// must raise `done` exactly Y*G+2 cycles after `start` and keep `busy` high until then.
module tb_associative_memory;

  localparam int unsigned DA = 2000, GA = 200, GRA = 2, CPA = 2, YA = GRA * CPA;
  localparam int unsigned DB = 100,  GB = 10,  GRB = 1, CPB = 10, YB = GRB * CPB;
  localparam int unsigned DWA = $clog2(DA + 1), DWB = $clog2(DB + 1);

  logic clk = 1'b0, rst_n = 1'b0;

  logic we_a = 0, start_a = 0, busy_a, done_a;
  logic [1:0] addr_a = '0;
  logic [DA-1:0] wdata_a = '0, query_a = '0;
  logic [GRA-1:0][0:0] dec_a;
  logic [YA-1:0][DWA-1:0] dist_a;

  logic we_b = 0, start_b = 0, busy_b, done_b;
  logic [3:0] addr_b = '0;
  logic [DB-1:0] wdata_b = '0, query_b = '0;
  logic [GRB-1:0][3:0] dec_b;
  logic [YB-1:0][DWB-1:0] dist_b;

  associative_memory #(.D(DA), .G(GA), .GROUPS(GRA), .CPG(CPA)) dut_a (
    .clk, .rst_n, .proto_we(we_a), .proto_addr(addr_a), .proto_wdata(wdata_a),
    .start(start_a), .query(query_a), .busy(busy_a), .done(done_a),
    .decision(dec_a), .distances(dist_a));
  associative_memory #(.D(DB), .G(GB), .GROUPS(GRB), .CPG(CPB)) dut_b (
    .clk, .rst_n, .proto_we(we_b), .proto_addr(addr_b), .proto_wdata(wdata_b),
    .start(start_b), .query(query_b), .busy(busy_b), .done(done_b),
    .decision(dec_b), .distances(dist_b));

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, n_tie = 0;
  int unsigned n_dec_a [GRA][CPA];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [DA-1:0] pa [YA];
  logic [DB-1:0] pb [YB];

  initial begin
    int unsigned ea [YA];
    int unsigned eb [YB];
    int unsigned best, cyc;
    bit seen_b;
    foreach (n_dec_a[g, c]) n_dec_a[g][c] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int q = 0; q < 24; q++) begin
      // (re)write prototypes
      for (int y = 0; y < YA; y++) begin
        for (int i = 0; i < DA; i++) pa[y][i] = 1'($urandom);
        if (q % 4 == 3 && y % 2 == 1) pa[y] = pa[y-1];  // tie within a group
      end
      for (int y = 0; y < YB; y++) begin
        for (int i = 0; i < DB; i++) pb[y][i] = 1'($urandom);
        if (q % 4 == 3 && y > 0) pb[y] = pb[0];          // all tied
      end
      for (int y = 0; y < YB; y++) begin
        we_a = (y < YA); addr_a = 2'(y % YA); if (y < YA) wdata_a = pa[y];
        we_b = 1; addr_b = 4'(y); wdata_b = pb[y];
        @(negedge clk);
      end
      we_a = 0; we_b = 0;
      // query
      if (q % 2 == 0) begin
        query_a = pa[$urandom_range(0, YA - 1)];
        for (int k = 0; k < 50; k++) query_a[$urandom_range(0, DA - 1)] ^= 1'b1;
        query_b = pb[$urandom_range(0, YB - 1)];
        for (int k = 0; k < 5; k++) query_b[$urandom_range(0, DB - 1)] ^= 1'b1;
      end else begin
        for (int i = 0; i < DA; i++) query_a[i] = 1'($urandom);
        for (int i = 0; i < DB; i++) query_b[i] = 1'($urandom);
      end
      for (int y = 0; y < YA; y++) begin
        ea[y] = 0;
        for (int i = 0; i < DA; i++) ea[y] += (pa[y][i] != query_a[i]);
      end
      for (int y = 0; y < YB; y++) begin
        eb[y] = 0;
        for (int i = 0; i < DB; i++) eb[y] += (pb[y][i] != query_b[i]);
      end
      start_a = 1; start_b = 1;
      @(negedge clk);
      start_a = 0; start_b = 0;
      cyc = 1;
      seen_b = 0;
      while (!done_a) begin
        if (done_b) begin
          check(!seen_b && cyc == YB * GB + 2, $sformatf("B latency %0d", cyc));
          seen_b = 1;
        end
        check(busy_b == (cyc < YB * GB + 2), $sformatf("B busy at %0d", cyc));
        check(busy_a, "A busy during search");
        @(negedge clk);
        cyc++;
        if (cyc > 2000) break;
      end
      check(seen_b, "B never done");
      check(cyc == YA * GA + 2, $sformatf("A latency %0d", cyc));
      check(!busy_a, "A idle when done");
      for (int y = 0; y < YA; y++)
        check(dist_a[y] == DWA'(ea[y]), $sformatf("A distance %0d", y));
      for (int g = 0; g < GRA; g++) begin
        best = (ea[g*CPA + 1] < ea[g*CPA]) ? 1 : 0;
        if (ea[g*CPA + 1] == ea[g*CPA]) n_tie++;
        check(dec_a[g] == 1'(best), $sformatf("A decision %0d (query %0d)", g, q));
        n_dec_a[g][dec_a[g]]++;
      end
      best = 0;
      for (int y = 1; y < YB; y++) if (eb[y] < eb[best]) best = y;
      check(dec_b[0] == 4'(best), $sformatf("B decision (query %0d)", q));
      @(negedge clk);
    end
    foreach (n_dec_a[g, c]) check(n_dec_a[g][c] > 0, $sformatf("group %0d never chose %0d", g, c));
    check(n_tie > 0, "no tie exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
