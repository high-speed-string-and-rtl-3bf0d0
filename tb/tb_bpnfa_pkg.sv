// tb_bpnfa_pkg: test-side model of patterns for the bit-parallel NFA
// matchers.
//
// ext_pattern holds one extended pattern as a list of components (a letter
// class plus a type: plain, optional '?', star '*', plus '+'); bounded repeats
// are given already expanded. compile() produces the bit-masks the hardware
// loads, following their definitions (INIT, ACCEPT, EpsBEG, EpsEND, EpsBLK,
// MOVE[a], REPPOS[a]). The reference matcher (ref_*) does not use the masks:
// it simulates the pattern's NFA state by state, with an explicit
// epsilon-closure, so it checks the hardware's shift/add trick independently.
// A pattern whose components are all plain single letters is a string
// pattern, usable for the string PMM as well.
package tb_bpnfa_pkg;

  localparam int LMAX = 32;

  typedef enum int {C_PLAIN = 0, C_OPT = 1, C_STAR = 2, C_PLUS = 3} ctype_e;

  class ext_pattern;
    int          m;
    ctype_e      typ [LMAX];
    bit [255:0]  cls [LMAX];
    bit [LMAX-1:0] init, accept, eps_beg, eps_end, eps_blk;
    bit [LMAX-1:0] move [256];
    bit [LMAX-1:0] reppos [256];
    bit          act [LMAX+1];   // act[0] is the always-active start state

    function new();
      m = 0;
    endfunction

    function void copy_from(ext_pattern o);
      m = o.m;
      for (int i = 0; i < LMAX; i++) begin
        typ[i] = o.typ[i];
        cls[i] = o.cls[i];
      end
    endfunction

    function void add(ctype_e t, bit [255:0] c);
      typ[m] = t;
      cls[m] = c;
      m++;
    endfunction

    static function bit [255:0] letters(string s);
      bit [255:0] c = '0;
      for (int i = 0; i < s.len(); i++) c[s[i]] = 1'b1;
      return c;
    endfunction

    static function bit [255:0] any();
      return '1;
    endfunction

    // Random pattern of 1..maxm components over letters "A".."A"+nsym-1.
    // The first component is never optional or starred.
    function void make_random(int maxm, int nsym, bit string_only);
      make_random_len(1 + ($urandom % maxm), nsym, string_only);
    endfunction

    // Random pattern of exactly mm components.
    function void make_random_len(int mm, int nsym, bit string_only);
      m = 0;
      for (int i = 0; i < mm; i++) begin
        bit [255:0] c = '0;
        ctype_e t = C_PLAIN;
        if (string_only) begin
          c[8'h41 + ($urandom % nsym)] = 1'b1;
        end else begin
          int r = $urandom % 10;
          if (r == 0) c = '1;
          else begin
            c[8'h41 + ($urandom % nsym)] = 1'b1;
            if (r > 6) c[8'h41 + ($urandom % nsym)] = 1'b1;
          end
          if (i > 0) t = ctype_e'($urandom % 4);
          else if ($urandom % 3 == 0) t = C_PLUS;
        end
        add(t, c);
      end
    endfunction

    // A random text word that the pattern matches at its last letter.
    function void sample_word(ref bit [7:0] q [$], input int nsym);
      for (int i = 0; i < m; i++) begin
        int reps;
        unique case (typ[i])
          C_PLAIN: reps = 1;
          C_OPT:   reps = $urandom % 2;
          C_STAR:  reps = $urandom % 3;
          default: reps = 1 + $urandom % 2;
        endcase
        if (i == m - 1 && reps == 0) reps = 1;
        for (int r = 0; r < reps; r++) q.push_back(pick(cls[i], nsym));
      end
    endfunction

    static function bit [7:0] pick(bit [255:0] c, int nsym);
      bit [7:0] t;
      if (c == '1) return 8'(8'h41 + ($urandom % nsym));
      do t = 8'(8'h41 + ($urandom % 26)); while (!c[t]);
      return t;
    endfunction

    function void compile();
      init = '0; accept = '0; eps_beg = '0; eps_end = '0; eps_blk = '0;
      for (int a = 0; a < 256; a++) begin
        move[a] = '0; reppos[a] = '0;
      end
      init[0]     = 1'b1;
      accept[m-1] = 1'b1;
      for (int i = 0; i < m; i++) begin
        for (int a = 0; a < 256; a++) begin
          if (cls[i][a]) begin
            move[a][i] = 1'b1;
            if (typ[i] == C_STAR || typ[i] == C_PLUS) reppos[a][i] = 1'b1;
          end
        end
      end
      // epsilon-blocks: a run of ?/* components i..j (0-based) covers bits
      // i-1..j; its lowest bit is the state before the run.
      for (int i = 1; i < m; i++) begin
        bit eps_i = (typ[i] == C_OPT || typ[i] == C_STAR);
        bit eps_p = (typ[i-1] == C_OPT || typ[i-1] == C_STAR);
        bit eps_n = (i + 1 < m) && (typ[i+1] == C_OPT || typ[i+1] == C_STAR);
        if (eps_i) begin
          eps_blk[i-1] = 1'b1;
          eps_blk[i]   = 1'b1;
          if (!eps_p || i == 1) eps_beg[i-1] = 1'b1;
          if (!eps_n) eps_end[i] = 1'b1;
        end
      end
    endfunction

    function void ref_reset();
      for (int i = 0; i <= LMAX; i++) act[i] = 1'b0;
    endfunction

    function void ref_step(bit [7:0] t);
      bit nxt [LMAX+1];
      nxt[0] = 1'b1;
      for (int i = 1; i <= m; i++) begin
        bit in_cls = cls[i-1][t];
        bit loop   = (typ[i-1] == C_STAR || typ[i-1] == C_PLUS);
        bit prev   = (i == 1) ? 1'b1 : act[i-1];
        nxt[i] = (prev && in_cls) || (act[i] && loop && in_cls);
      end
      // epsilon-closure, in increasing state order
      for (int i = 2; i <= m; i++) begin
        if ((typ[i-1] == C_OPT || typ[i-1] == C_STAR) && nxt[i-1]) nxt[i] = 1'b1;
      end
      for (int i = 1; i <= LMAX; i++) act[i] = (i <= m) ? nxt[i] : 1'b0;
    endfunction

    function bit [LMAX-1:0] ref_state();
      bit [LMAX-1:0] s = '0;
      for (int i = 1; i <= m; i++) s[i-1] = act[i];
      return s;
    endfunction

    function bit ref_match();
      return act[m];
    endfunction
  endclass

endpackage
