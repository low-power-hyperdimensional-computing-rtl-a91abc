// hdc_ref_pkg: bit-level reference model of the HDC sensor-fusion classifier, used by
// the testbenches. It works on whole D-bit vectors with plain integer counts (no
// saturation, no folding of the counters) and spells every step out bit by bit, so it
// shares no code with the RTL. Only the documented construction is shared: the CiM
// base vector is made of successive xorshift32 words (bit i = bit i%32 of word
// i/32+1) and level k flips its first k*(D/2)/(X-1) bits; the iM of channel c in
// fold f is rule90^(c+1) of fold f of the last (-1) CiM; majority means 2*count > n;
// ngram k is the sample of k steps ago rotated right k times.
package hdc_ref_pkg;

  class hdc_model #(
    int unsigned D = 2000, int unsigned F = 4, int unsigned N = 3,
    int unsigned X = 3, int unsigned GROUPS = 2, int unsigned CPG = 2,
    bit [31:0] SEED = 32'h2545_F491
  );
    localparam int unsigned W = D / F;
    localparam int unsigned Y = GROUPS * CPG;

    int unsigned mod_ch[$];
    int unsigned t_total;
    bit [D-1:0]  cim [X];
    bit [D-1:0]  ngram [N];
    bit [D-1:0]  proto [Y];
    int unsigned samples;

    function new(int unsigned mc[$]);
      bit [31:0] s;
      bit [D-1:0] base;
      int unsigned nflip;
      mod_ch  = mc;
      t_total = 0;
      foreach (mc[m]) t_total += mc[m];
      s = SEED;
      for (int i = 0; i < D; i++) begin
        if (i % 32 == 0) begin
          s = s ^ {s[18:0], 13'b0};
          s = s ^ {17'b0, s[31:17]};
          s = s ^ {s[26:0], 5'b0};
        end
        base[i] = s[i % 32];
      end
      for (int k = 0; k < X; k++) begin
        nflip = (X > 1) ? (k * (D / 2)) / (X - 1) : 0;
        for (int i = 0; i < D; i++) cim[k][i] = (i < nflip) ? !base[i] : base[i];
      end
      for (int k = 0; k < N; k++) ngram[k] = '0;
      samples = 0;
    endfunction

    // One rule-90 step applied separately inside every W-bit fold, with wrap-around.
    static function bit [D-1:0] rule90_folds(bit [D-1:0] v);
      bit [D-1:0] r;
      for (int f = 0; f < F; f++)
        for (int i = 0; i < W; i++)
          r[f*W + i] = v[f*W + (i + W - 1) % W] ^ v[f*W + (i + 1) % W];
      return r;
    endfunction

    // Fused hypervector of one sample (codes: one per channel).
    function bit [D-1:0] encode(int unsigned codes[]);
      bit [D-1:0] im, bound, fused;
      int unsigned cnt [D];
      int unsigned fcnt [D];
      int unsigned c;
      im = rule90_folds(cim[X-1]);
      for (int i = 0; i < D; i++) fcnt[i] = 0;
      c = 0;
      foreach (mod_ch[m]) begin
        for (int i = 0; i < D; i++) cnt[i] = 0;
        for (int k = 0; k < mod_ch[m]; k++) begin
          bound = im ^ cim[codes[c]];
          for (int i = 0; i < D; i++) cnt[i] += bound[i];
          im = rule90_folds(im);
          c++;
        end
        for (int i = 0; i < D; i++) fcnt[i] += (2 * cnt[i] > mod_ch[m]) ? 1 : 0;
      end
      for (int i = 0; i < D; i++) fused[i] = (2 * fcnt[i] > mod_ch.size());
      return fused;
    endfunction

    function void te_push(bit [D-1:0] hv);
      for (int k = N - 1; k > 0; k--)
        for (int i = 0; i < D; i++) ngram[k][i] = ngram[k-1][(i + 1) % D];
      ngram[0] = hv;
      samples++;
    endfunction

    function bit [D-1:0] te_out();
      bit [D-1:0] r = '0;
      for (int k = 0; k < N; k++) r ^= ngram[k];
      return r;
    endfunction

    function void classify(bit [D-1:0] q, output int unsigned hd[Y],
                           output int unsigned dec[GROUPS]);
      for (int y = 0; y < Y; y++) begin
        hd[y] = 0;
        for (int i = 0; i < D; i++) hd[y] += (q[i] != proto[y][i]) ? 1 : 0;
      end
      for (int g = 0; g < GROUPS; g++) begin
        dec[g] = 0;
        for (int c = 1; c < CPG; c++)
          if (hd[g*CPG + c] < hd[g*CPG + dec[g]]) dec[g] = c;
      end
    endfunction
  endclass

endpackage
