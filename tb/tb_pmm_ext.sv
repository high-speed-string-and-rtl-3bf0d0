// tb_pmm_ext: self-checking testbench for pmm_ext.
//
// 1. Loads the pattern [AB]+ B .{1,3} [BC]? .* C (expanded to 8 components)
//    and checks the compiled masks against the published mask table, then
//    streams ABCBBC back to back and checks STATE after every letter against
//    the published trace, including the two-cycle letter-to-STATE latency and
//    one letter per clock.
// 2. Loads 60 random extended patterns and random texts with random input
//    bubbles and pipeline stalls, and compares STATE and match every cycle
//    with an NFA reference that computes epsilon-closures state by state.
// Writes addressed to another PMM index are mixed in and must be ignored.
module tb_pmm_ext;
  import bpnfa_pkg::*;
  import tb_bpnfa_pkg::*;

  localparam int unsigned L = 32;
  localparam int unsigned MY_INDEX = 5;

  logic         clk = 1'b0;
  logic         rst_n;
  cfg_wr_t      cfg;
  logic         clear, adv, in_valid;
  sym_t         in_sym;
  logic         busy, match;
  logic [L-1:0] state;

  int checks = 0, failures = 0;

  pmm_ext #(.L(L), .INDEX(MY_INDEX)) dut (
    .clk, .rst_n, .cfg, .clear, .adv, .in_valid, .in_sym,
    .busy, .match, .state
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic cfg_write(int pmm, cfg_tgt_e tgt, reg_sel_e sel, int addr,
                           logic [31:0] data);
    cfg.valid = 1'b1;
    cfg.pmm   = IDX_W'(pmm);
    cfg.tgt   = tgt;
    cfg.sel   = sel;
    cfg.addr  = sym_t'(addr);
    cfg.data  = data;
    @(negedge clk);
    cfg.valid = 1'b0;
  endtask

  task automatic load(ext_pattern p, bit with_noise);
    cfg_write(MY_INDEX, TGT_REG, REG_INIT,   0, p.init);
    cfg_write(MY_INDEX, TGT_REG, REG_ACCEPT, 0, p.accept);
    cfg_write(MY_INDEX, TGT_REG, REG_EPSBEG, 0, p.eps_beg);
    cfg_write(MY_INDEX, TGT_REG, REG_EPSEND, 0, p.eps_end);
    cfg_write(MY_INDEX, TGT_REG, REG_EPSBLK, 0, p.eps_blk);
    for (int a = 0; a < 256; a++) begin
      cfg_write(MY_INDEX, TGT_MOVE, REG_INIT, a, p.move[a]);
      cfg_write(MY_INDEX, TGT_REPPOS, REG_INIT, a, p.reppos[a]);
      if (with_noise && a % 16 == 3) begin
        cfg_write(MY_INDEX + 1, TGT_MOVE, REG_INIT, a, $urandom);
        cfg_write(MY_INDEX - 1, TGT_REG, REG_EPSBLK, 0, $urandom);
      end
    end
  endtask

  // Cycle-level model of the pipeline around the reference NFA.
  ext_pattern cur;
  bit         model_on = 0;
  bit         tp_v = 0;
  bit [7:0]   tp_sym;

  always @(posedge clk) begin
    if (model_on) begin
      if (clear) begin
        cur.ref_reset();
        tp_v = 0;
      end else if (adv) begin
        if (tp_v) cur.ref_step(tp_sym);
        tp_v   = in_valid;
        tp_sym = in_sym;
      end
    end
  end

  always @(negedge clk) begin
    if (model_on) begin
      check(state == cur.ref_state(), $sformatf("state %h exp %h", state, cur.ref_state()));
      check(match == cur.ref_match(), "match");
    end
  end

  // Published trace for ABCBBC (bit-position 1 = bit 0).
  logic [7:0] fig_trace [6] = '{8'b0000_0001, 8'b0000_1111, 8'b0111_1100,
                                8'b0111_1001, 8'b0111_1111, 8'b1111_1100};
  logic [7:0] fig_text [6] = '{"A", "B", "C", "B", "B", "C"};

  initial begin
    ext_pattern r2;
    cfg = '0; clear = 0; adv = 1; in_valid = 0; in_sym = '0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // --- the worked example ---
    r2 = new();
    r2.add(C_PLUS,  ext_pattern::letters("AB"));
    r2.add(C_PLAIN, ext_pattern::letters("B"));
    r2.add(C_OPT,   ext_pattern::any());
    r2.add(C_OPT,   ext_pattern::any());
    r2.add(C_PLAIN, ext_pattern::any());
    r2.add(C_OPT,   ext_pattern::letters("BC"));
    r2.add(C_STAR,  ext_pattern::any());
    r2.add(C_PLAIN, ext_pattern::letters("C"));
    r2.compile();
    // published mask table, bit-position 1 = bit 0 ('%' = a letter outside A..C)
    if (r2.move["A"][7:0] != 8'b0101_1101 || r2.move["B"][7:0] != 8'b0111_1111 ||
        r2.move["C"][7:0] != 8'b1111_1100 || r2.move["%"][7:0] != 8'b0101_1100 ||
        r2.reppos["A"][7:0] != 8'b0100_0001 || r2.reppos["C"][7:0] != 8'b0100_0000 ||
        r2.eps_beg[7:0] != 8'b0001_0010 || r2.eps_end[7:0] != 8'b0100_1000 ||
        r2.eps_blk[7:0] != 8'b0111_1110 || r2.accept[7:0] != 8'b1000_0000) begin
      $display("test pattern compiler disagrees with the mask table");
      failures++;
    end
    load(r2, 1'b1);
    clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < 6; k++) begin
      in_valid = 1; in_sym = fig_text[k];
      @(negedge clk);
      if (k >= 1) check(state[7:0] == fig_trace[k-1],
                        $sformatf("trace row %0d: %b", k, state[7:0]));
    end
    in_valid = 0;
    @(negedge clk);
    check(state[7:0] == fig_trace[5], "trace row 6");
    check(match == 1'b1, "match after ABCBBC");
    check(busy == 1'b0, "pipeline empty");

    // --- random patterns against the NFA reference ---
    for (int n = 0; n < 60; n++) begin
      ext_pattern p;
      p = new();
      p.make_random(L, 4, 1'b0);
      p.compile();
      model_on = 0;
      in_valid = 0;
      adv = 1;
      load(p, n % 7 == 0);
      clear = 1; @(negedge clk); clear = 0;
      cur = p;
      cur.ref_reset();
      tp_v = 0;
      model_on = 1;
      for (int k = 0; k < 300; k++) begin
        in_valid = ($urandom % 8) != 0;
        in_sym   = sym_t'(8'h41 + ($urandom % 5));
        adv      = ($urandom % 6) != 0;
        @(negedge clk);
      end
      in_valid = 0; adv = 1;
      repeat (3) @(negedge clk);
    end
    model_on = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
