// fc_tb_pkg: knowledge base builder and reference model for the testbenches.
//
// mem[] is the image of the knowledge base memory (32K x 15 bit) that a
// testbench loads into the on-chip ROM or the off-chip memory model. The
// build_* tasks place random but well-formed knowledge bases in it:
// descriptors at 4*kb, tables and rule sets allocated upwards from word 256.
// ref_output() computes the crisp output of a control cycle straight from the
// memory image with integer and real arithmetic, independently of the RTL:
// membership look-up, MIN over all antecedents of a rule, MAX or bounded-sum
// aggregation per output MF, clipped output MFs combined by MAX or bounded sum,
// then centre of gravity or mean of maxima rounded to the nearest integer
// (0 when the fuzzy output is empty).
package fc_tb_pkg;
  import fc_pkg::*;

  kword_t mem [1 << KAW];
  int     next_free;

  // Statistics of the last ref_output() call.
  int ref_rules_fired;
  int ref_weight_sat;
  int ref_empty;

  function automatic void mem_clear();
    for (int i = 0; i < (1 << KAW); i++) mem[i] = '0;
    next_free = 256;
  endfunction

  function automatic int alloc(int words);
    int a = next_free;
    next_free += words;
    if (next_free > (1 << KAW)) $fatal(1, "knowledge base image full");
    return a;
  endfunction

  function automatic kword_t mf_word(int lbl, int nxt, int mu);
    return kword_t'(((nxt & 1) << 11) | ((lbl & 7) << 8) | (mu & 255));
  endfunction

  // Random look-up table of 256 entries at base; input tables use labels 0..7
  // (0 = left of the first value), output tables labels 0..7.
  function automatic void fill_mf_table(int base);
    for (int v = 0; v < 256; v++)
      mem[(base + v) % (1 << KAW)] = mf_word($urandom_range(0, 7), $urandom_range(0, 1),
                                             $urandom_range(0, 255));
  endfunction

  function automatic int member(int lv, kword_t e);
    int lbl = int'(e[10:8]);
    int nxt = int'(e[11]);
    int mu  = int'(e[7:0]);
    if (lv == 0) return 255;
    if (lv == lbl) return mu;
    if (nxt == 1 && lv == lbl + 1) return 255 - mu;
    return 0;
  endfunction

  // Build knowledge base kb with nr rules over ni inputs. Rules pick, with
  // probability 3/4 per antecedent, a value that the planned input vector
  // hits, so that a fair share of rules fire. Tables may be shared by passing
  // imf/omf_page >= 0: imf is the start of 4*nc consecutive tables, or, with
  // seg_shared set, of 4 tables that every segment uses. The IMF directory
  // (one word per segment) is allocated here. Returns nothing; the KBD is
  // written at 4*kb.
  function automatic void build_kb(int kb, int nr, int ni, int link, int algo,
                                   int in_vec[256], int imf = -1, int omf_page = -1,
                                   bit seg_shared = 0);
    int nc = (ni + 3) / 4;
    int sr, dir;
    if (imf < 0) begin
      int nt = seg_shared ? 4 : nc * 4;
      imf = alloc(256 * nt);
      for (int k = 0; k < nt; k++) fill_mf_table(imf + 256 * k);
    end
    dir = alloc(nc);
    for (int s = 0; s < nc; s++) mem[dir + s] = kword_t'(seg_shared ? imf : imf + 1024 * s);
    mem[4 * kb + 1] = kword_t'(dir);
    if (omf_page < 0) begin
      next_free = (next_free + 255) & ~255;
      omf_page  = alloc(256) / 256;
      fill_mf_table(omf_page * 256);
    end
    sr = alloc(nr * nc);
    for (int r = 0; r < nr; r++) begin
      int omf = $urandom_range(0, 7);
      for (int s = 0; s < nc; s++) begin
        int w = omf << 12;
        for (int l = 0; l < 4; l++) begin
          int k = s * 4 + l;
          int lv;
          if (k >= ni) lv = 0;
          else begin
            kword_t e = mem[imf_addr(kb, k, in_vec[k])];
            case ($urandom_range(0, 7))
              0, 1, 2: lv = int'(e[10:8]);
              3, 4:    lv = int'(e[10:8]) + int'(e[11]);
              5:       lv = 0;
              default: lv = $urandom_range(0, 7);
            endcase
            if (lv > 7) lv = 7;
          end
          w |= lv << (3 * l);
        end
        mem[sr + s * nr + r] = kword_t'(w);
      end
    end
    mem[4 * kb + 0] = kword_t'(((link & 1) << 14) | ((nc - 1) << 8) | (nr - 1));
    mem[4 * kb + 2] = kword_t'(((algo & 7) << 7) | (omf_page & 127));
    mem[4 * kb + 3] = kword_t'(sr);
  endfunction

  // address of the IMF entry of input k at value v of knowledge base kb,
  // through the KB's IMF directory
  function automatic int imf_addr(int kb, int k, int v);
    int dir = int'(mem[4 * kb + 1]);
    int t   = int'(mem[(dir + k / 4) % (1 << KAW)]);
    return (t + 256 * (k % 4) + v) % (1 << KAW);
  endfunction

  function automatic int kb_nr(int kb);   return int'(mem[4 * kb][7:0]) + 1;  endfunction
  function automatic int kb_nc(int kb);   return int'(mem[4 * kb][13:8]) + 1; endfunction
  function automatic int kb_link(int kb); return int'(mem[4 * kb][14]);        endfunction

  function automatic int ref_output(int kb0, int in_vec[256]);
    int w[8];
    int kb = kb0;
    int algo, omfp;
    int s0, mx, mxsum, mxcnt;
    longint s1;
    int mu[256];
    ref_rules_fired = 0;
    ref_weight_sat  = 0;
    for (int i = 0; i < 8; i++) w[i] = 0;
    forever begin
      int nr   = kb_nr(kb);
      int nc   = kb_nc(kb);
      int sr   = int'(mem[4 * kb + 3]);
      algo = int'(mem[4 * kb + 2][9:7]);
      omfp = int'(mem[4 * kb + 2][6:0]);
      for (int r = 0; r < nr; r++) begin
        int f = 255;
        int o = 0;
        for (int s = 0; s < nc; s++) begin
          kword_t rw = mem[(sr + s * nr + r) % (1 << KAW)];
          o = int'(rw[14:12]);
          for (int l = 0; l < 4; l++) begin
            int k = s * 4 + l;
            kword_t e = mem[imf_addr(kb, k, in_vec[k])];
            int d = member(int'(rw[3*l +: 3]), e);
            if (d < f) f = d;
          end
        end
        if (f > 0) begin
          ref_rules_fired++;
          if (algo & 1) begin
            if (w[o] + f > 255) ref_weight_sat++;
            w[o] = (w[o] + f > 255) ? 255 : w[o] + f;
          end else if (f > w[o]) w[o] = f;
        end
      end
      if (kb_link(kb) == 0) break;
      kb = (kb + 1) % 64;
    end
    for (int x = 0; x < 256; x++) begin
      kword_t e = mem[omfp * 256 + x];
      int lbl = int'(e[10:8]);
      int m   = int'(e[7:0]);
      int c0  = (w[lbl] < m) ? w[lbl] : m;
      int c1  = 0;
      if (e[11] && lbl < 7) c1 = (w[lbl + 1] < 255 - m) ? w[lbl + 1] : 255 - m;
      if (algo & 2) mu[x] = (c0 + c1 > 255) ? 255 : c0 + c1;
      else          mu[x] = (c0 > c1) ? c0 : c1;
    end
    s0 = 0; s1 = 0; mx = -1; mxsum = 0; mxcnt = 0;
    for (int x = 0; x < 256; x++) begin
      s0 += mu[x];
      s1 += longint'(x) * mu[x];
      if (mu[x] > mx) begin mx = mu[x]; mxsum = x; mxcnt = 1; end
      else if (mu[x] == mx) begin mxsum += x; mxcnt++; end
    end
    ref_empty = (s0 == 0);
    if (s0 == 0) return 0;
    if (algo & 4) return $rtoi($floor(real'(mxsum) / real'(mxcnt) + 0.5));
    return $rtoi($floor(real'(s1) / real'(s0) + 0.5));
  endfunction
endpackage
