// polar_tb_pkg: testbench-side models for the polar decoder.
//
//  * construct_code : picks the K most reliable of the N bit channels, with
//    reliabilities from the Bhattacharyya recursion on an erasure channel
//    (z -> 2z - z^2 for the upper/"minus" channel, z -> z^2 for the lower).
//  * pattern_code   : builds an information-bit mask from 16-bit frozen
//    patterns so that every leaf type of the decoder occurs.
//  * compile_code   : turns an information mask into the decoder's program
//    (pruned Fast-SSC decoder tree, depth first) and its cycle count.
//  * encode         : x = u * F^{(x)n}, F = [1 0; 1 1].
//  * ref_decode     : an integer model of Fast-SSC decoding written as a
//    plain recursion over the tree with only rate-0, rate-1, repetition and
//    SPC leaves (composite nodes are decoded through their F/G children), so
//    it checks the dedicated node decoders rather than repeating them.
package polar_tb_pkg;
  import polar_pkg::*;

  typedef bit   mask_t [N];
  typedef int   ivec_t [];
  typedef bit   bvec_t [];

  // ------------------------------------------------------------ arithmetic
  function automatic int clampi(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction
  function automatic int ref_f(int a, int b);
    int ma = (a < 0) ? -a : a;
    int mb = (b < 0) ? -b : b;
    int m  = (ma < mb) ? ma : mb;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction
  function automatic int ref_g(int a, int b, bit beta);
    return clampi(beta ? b - a : b + a, (1 << (QI - 1)) - 1);
  endfunction

  // ------------------------------------------------------- node patterns
  function automatic bit all_frozen(mask_t m, int s, int off);
    for (int i = 0; i < (1 << s); i++) if (m[off+i]) return 0;
    return 1;
  endfunction
  function automatic bit all_info(mask_t m, int s, int off);
    for (int i = 0; i < (1 << s); i++) if (!m[off+i]) return 0;
    return 1;
  endfunction
  function automatic bit is_rep(mask_t m, int s, int off);
    for (int i = 0; i < (1 << s); i++) if (m[off+i] != (i == (1 << s) - 1)) return 0;
    return 1;
  endfunction
  function automatic bit is_spc(mask_t m, int s, int off);
    for (int i = 0; i < (1 << s); i++) if (m[off+i] != (i != 0)) return 0;
    return 1;
  endfunction
  function automatic bit pat_is(mask_t m, int s, int off, string pat);
    if (pat.len() != (1 << s)) return 0;
    for (int i = 0; i < (1 << s); i++) if (m[off+i] != (pat[i] == "1")) return 0;
    return 1;
  endfunction

  // Basic leaves shared by the compiler and the reference model; -1 = split.
  function automatic int basic_leaf(mask_t m, int s, int off);
    if (all_frozen(m, s, off))                    return LF_R0;
    if (all_info(m, s, off) && s <= LOG_PE)       return LF_R1;
    if (s >= 1 && s <= 5 && is_rep(m, s, off))    return LF_REP;
    if (s >= 2 && s <= LOG_PE && is_spc(m, s, off)) return LF_SPC;
    return -1;
  endfunction

  // Leaves the hardware decodes, including the dedicated composite nodes.
  function automatic int hw_leaf(mask_t m, int s, int off);
    int b = basic_leaf(m, s, off);
    if (b >= 0) return b;
    if (pat_is(m, s, off, "0011"))             return LF_01;
    if (pat_is(m, s, off, "00010111"))         return LF_REPSPC;
    if (pat_is(m, s, off, "00000111"))         return LF_0SPC;
    if (pat_is(m, s, off, "00000011"))         return LF_001;
    if (pat_is(m, s, off, "00011111"))         return LF_REP1;
    if (pat_is(m, s, off, "0000000000010111")) return LF_0REPSPC;
    return -1;
  endfunction

  // ----------------------------------------------------------- compiler
  typedef enum int { ROLE_LEFT, ROLE_RIGHT, ROLE_ROOT } role_e;

  function automatic instr_t mk(op_e op, int s, leaf_e lf, bit lz, bit rc, bit rl,
                                bit fg = 0);
    instr_t i;
    i.op = op; i.stage = STW'(s); i.leaf = lf;
    i.left_zero = lz; i.right_child = rc; i.res_left = rl; i.from_g = fg;
    return i;
  endfunction

  // When set, a right-child leaf of a node of up to 2*PE LLRs is fed by the
  // parent's G in the same cycle; a rate-0 right child needs no G at all.
  bit fuse_g = 1;

  function automatic void emit(mask_t m, int s, int off, role_e role,
                               bit lz, role_e prole, ref instr_t prog[$], input bit fg = 0);
    int lf = hw_leaf(m, s, off);
    if (lf >= 0) begin
      if (role == ROLE_LEFT) begin
        if (lf != LF_R0) prog.push_back(mk(OP_LEAF, s, leaf_e'(lf), 0, 0, 1));
      end else if (role == ROLE_ROOT) begin
        prog.push_back(mk(OP_LEAF, s, leaf_e'(lf), 0, 0, 0));
      end else begin
        prog.push_back(mk(OP_LEAF, s, leaf_e'(lf), lz, 1, prole == ROLE_LEFT, fg));
      end
    end else begin
      int  h = 1 << (s - 1);
      bit  lr0 = all_frozen(m, s - 1, off);
      int  rl = hw_leaf(m, s - 1, off + h);
      bit  rleaf = rl >= 0;
      bit  fuse = fuse_g && rleaf && (rl == LF_R0 || s <= LOG_PE + 1);
      if (!lr0) begin
        prog.push_back(mk(OP_F, s, LF_R0, 0, 0, 0));
        emit(m, s - 1, off, ROLE_LEFT, 0, role, prog);
      end
      if (!fuse) prog.push_back(mk(OP_G, s, LF_R0, lr0, 0, 0));
      emit(m, s - 1, off + h, ROLE_RIGHT, lr0, role, prog, fuse && rl != LF_R0);
      if (!rleaf) prog.push_back(mk(OP_COMB, s - 1, LF_R0, lr0, 0, role == ROLE_LEFT));
    end
  endfunction

  function automatic void compile_code(mask_t m, ref instr_t prog[$],
                                       output int cycles);
    prog.delete();
    emit(m, LOG_N, 0, ROLE_ROOT, 0, ROLE_ROOT, prog);
    cycles = 0;
    foreach (prog[i])
      cycles += (prog[i].op == OP_F || prog[i].op == OP_G)
                ? fg_cycles_tb(int'(prog[i].stage)) : 1;
  endfunction

  // F/G cycles: P = 256 LLR inputs per cycle.
  function automatic int fg_cycles_tb(int s);
    return ((1 << s) + P - 1) / P;
  endfunction

  // ------------------------------------------------------ construction
  typedef real zvec_t [N];

  // Bhattacharyya parameter of every bit channel (smaller = more reliable).
  function automatic zvec_t reliabilities(real z0);
    zvec_t z;
    for (int i = 0; i < N; i++) begin
      real v = z0;
      for (int b = LOG_N - 1; b >= 0; b--)
        v = ((i >> b) & 1) ? v * v : 2.0 * v - v * v;
      z[i] = v;
    end
    return z;
  endfunction

  function automatic int code_cycles(mask_t m);
    instr_t p [$];
    int c;
    compile_code(m, p, c);
    return c;
  endfunction

  // Bit swapping: freeze one of the 'window' least reliable information
  // bits and unfreeze one of the 'window' most reliable frozen bits, 'swaps'
  // times.  Each round takes the pair that lowers the decoding cycle count
  // most; among equals, the pair with the closest reliabilities.  The number
  // of information bits, and so the rate, is unchanged.
  function automatic mask_t alter_code(mask_t m, int swaps, int window, real z0);
    zvec_t z = reliabilities(z0);
    for (int r = 0; r < swaps; r++) begin
      int info_c [$], froz_c [$];
      int best_i = -1, best_f = -1, best_c;
      real best_d = 1.0e9;
      best_c = code_cycles(m);
      // candidate lists by reliability
      for (int n = 0; n < window; n++) begin
        int wi = -1, wf = -1;
        for (int i = 0; i < N; i++) begin
          bit used = 0;
          foreach (info_c[q]) if (info_c[q] == i) used = 1;
          foreach (froz_c[q]) if (froz_c[q] == i) used = 1;
          if (used) continue;
          if (m[i]  && (wi < 0 || z[i] > z[wi])) wi = i;
          if (!m[i] && (wf < 0 || z[i] < z[wf])) wf = i;
        end
        info_c.push_back(wi);
        froz_c.push_back(wf);
      end
      foreach (info_c[a]) foreach (froz_c[b]) begin
        mask_t t = m;
        int c;
        real d;
        t[info_c[a]] = 0;
        t[froz_c[b]] = 1;
        c = code_cycles(t);
        d = z[info_c[a]] - z[froz_c[b]];
        if (d < 0) d = -d;
        if (c < best_c || (c == best_c && best_i >= 0 && d < best_d)) begin
          best_c = c; best_d = d; best_i = info_c[a]; best_f = froz_c[b];
        end
      end
      if (best_i < 0) break;
      m[best_i] = 0;
      m[best_f] = 1;
    end
    return m;
  endfunction

  function automatic void construct_code(output mask_t m, input int k, input real z0);
    zvec_t z = reliabilities(z0);
    for (int i = 0; i < N; i++) begin
      int rank = 0;
      for (int j = 0; j < N; j++)
        if (z[j] < z[i] || (z[j] == z[i] && j > i)) rank++;
      m[i] = (rank < k);
    end
  endfunction

  // Concatenation of random 16-bit frozen patterns covering every leaf type.
  function automatic void pattern_code(output mask_t m, input int seed);
    string pats [8] = '{"0000000000010111", "0001111100010111",
                        "0000001100000111", "0011001100111111",
                        "0000000100000001", "0111111111111111",
                        "0000000000000000", "1111111111111111"};
    int unsigned r = seed;
    for (int blk = 0; blk < N / 16; blk++) begin
      int sel;
      r = r * 1103515245 + 12345;
      sel = int'((r >> 16) % 8);
      // keep the last quarter reliable-looking: all-info blocks
      if (blk >= 56) sel = 7;
      if (blk < 4) sel = 6;
      for (int i = 0; i < 16; i++) m[blk*16 + i] = (pats[sel][i] == "1");
    end
    // a long repetition code and a long SPC code
    for (int i = 0; i < 32; i++) m[64 + i]  = (i == 31);
    for (int i = 0; i < 128; i++) m[768 + i] = (i != 0);
  endfunction

  // ------------------------------------------------------------ encoder
  function automatic void encode(bit u [N], output bit x [N]);
    x = u;
    for (int h = 1; h < N; h <<= 1)
      for (int i = 0; i < N; i++)
        if ((i & h) == 0) x[i] ^= x[i + h];
  endfunction

  // ---------------------------------------------------- reference decoder
  function automatic bvec_t ref_node(mask_t m, int s, int off, ivec_t a);
    int    n = 1 << s;
    bvec_t b = new[n];
    int    lf = basic_leaf(m, s, off);
    if (lf == LF_R0) begin
      foreach (b[i]) b[i] = 0;
    end else if (lf == LF_R1) begin
      foreach (b[i]) b[i] = (a[i] < 0);
    end else if (lf == LF_REP) begin
      int sum = 0;
      foreach (a[i]) sum += a[i];
      foreach (b[i]) b[i] = (sum < 0);
    end else if (lf == LF_SPC) begin
      int par = 0, mi = 0, mm = 1000;
      foreach (a[i]) begin
        int mg = (a[i] < 0) ? -a[i] : a[i];
        b[i] = (a[i] < 0);
        par ^= b[i];
        if (mg < mm) begin mm = mg; mi = i; end
      end
      if (par) b[mi] = ~b[mi];
    end else begin
      int    h = n / 2;
      ivec_t al = new[h];
      ivec_t ar = new[h];
      bvec_t bl, br;
      for (int i = 0; i < h; i++) al[i] = ref_f(a[i], a[i+h]);
      bl = ref_node(m, s - 1, off, al);
      for (int i = 0; i < h; i++) ar[i] = ref_g(a[i], a[i+h], bl[i]);
      br = ref_node(m, s - 1, off + h, ar);
      for (int i = 0; i < h; i++) begin
        b[i]     = bl[i] ^ br[i];
        b[i + h] = br[i];
      end
    end
    return b;
  endfunction

  function automatic void ref_decode(mask_t m, int ch [N],
                                     output bit x [N]);
    ivec_t a = new[N];
    bvec_t b;
    for (int i = 0; i < N; i++) a[i] = ch[i];
    b = ref_node(m, LOG_N, 0, a);
    for (int i = 0; i < N; i++) x[i] = b[i];
  endfunction

  // ------------------------------------- floating-point reference decoder
  // The same tree and node rules on unquantized LLRs, for comparing the
  // error rate of the 6.5.1 fixed-point decoder with floating point.
  typedef real rvec_t [];

  function automatic bvec_t ref_node_real(mask_t m, int s, int off, rvec_t a);
    int    n = 1 << s;
    bvec_t b = new[n];
    int    lf = basic_leaf(m, s, off);
    if (lf == LF_R0) begin
      foreach (b[i]) b[i] = 0;
    end else if (lf == LF_R1) begin
      foreach (b[i]) b[i] = (a[i] < 0.0);
    end else if (lf == LF_REP) begin
      real sum = 0.0;
      foreach (a[i]) sum += a[i];
      foreach (b[i]) b[i] = (sum < 0.0);
    end else if (lf == LF_SPC) begin
      int  par = 0, mi = 0;
      real mm = 1.0e30;
      foreach (a[i]) begin
        real mg = (a[i] < 0.0) ? -a[i] : a[i];
        b[i] = (a[i] < 0.0);
        par ^= b[i];
        if (mg < mm) begin mm = mg; mi = i; end
      end
      if (par) b[mi] = ~b[mi];
    end else begin
      int    h = n / 2;
      rvec_t al = new[h];
      rvec_t ar = new[h];
      bvec_t bl, br;
      for (int i = 0; i < h; i++) begin
        real x = (a[i] < 0.0) ? -a[i] : a[i];
        real y = (a[i+h] < 0.0) ? -a[i+h] : a[i+h];
        real mn = (x < y) ? x : y;
        al[i] = ((a[i] < 0.0) != (a[i+h] < 0.0)) ? -mn : mn;
      end
      bl = ref_node_real(m, s - 1, off, al);
      for (int i = 0; i < h; i++) ar[i] = bl[i] ? a[i+h] - a[i] : a[i+h] + a[i];
      br = ref_node_real(m, s - 1, off + h, ar);
      for (int i = 0; i < h; i++) begin
        b[i]     = bl[i] ^ br[i];
        b[i + h] = br[i];
      end
    end
    return b;
  endfunction

  // ----------------------------------------------------------- channel
  function automatic real gauss();
    real u1 = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    real u2 = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // BPSK over AWGN, LLR = 2y/sigma^2 in QC bits with QF fractional bits.
  // 'llr' returns the unquantized LLRs of the same received vector.
  function automatic void channel(bit x [N], input real sigma,
                                  output int ch [N], output real llr [N]);
    int lim = (1 << (QC - 1)) - 1;
    for (int i = 0; i < N; i++) begin
      real y = (x[i] ? -1.0 : 1.0) + sigma * gauss();
      real l = 2.0 * y / (sigma * sigma);
      llr[i] = l;
      ch[i] = clampi(int'($floor(l * real'(1 << QF) + 0.5)), lim);
    end
  endfunction

  // Noise standard deviation for rate-1/2 BPSK at a given Eb/N0 in dB.
  function automatic real sigma_of(real ebn0_db);
    return $sqrt(1.0 / (2.0 * 0.5 * $pow(10.0, ebn0_db / 10.0)));
  endfunction
endpackage
