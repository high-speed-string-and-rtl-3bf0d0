// tb_pmm_str: self-checking testbench for pmm_str.
//
// 1. Loads the string ABABC and streams a text with overlapping occurrences
//    back to back, checking the match positions worked out by hand and the
//    two-cycle letter-to-STATE latency.
// 2. Loads 80 random string patterns (1..32 letters over A..C) and random
//    texts with random input bubbles and pipeline stalls, and compares STATE
//    and match every cycle with a state-by-state NFA reference.
// Writes addressed to another PMM index are mixed in and must be ignored.
module tb_pmm_str;
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

  pmm_str #(.L(L), .INDEX(MY_INDEX)) dut (
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
    for (int a = 0; a < 256; a++) begin
      cfg_write(MY_INDEX, TGT_MOVE, REG_INIT, a, p.move[a]);
      if (with_noise && a % 16 == 3) begin
        cfg_write(MY_INDEX + 1, TGT_MOVE, REG_INIT, a, $urandom);
        cfg_write(MY_INDEX - 1, TGT_REG, REG_INIT, 0, $urandom);
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

  // ABABC in ABABABCABABCC: matches end at positions 7 and 12.
  logic [7:0] txt [13] = '{"A","B","A","B","A","B","C","A","B","A","B","C","C"};

  initial begin
    ext_pattern r1;
    cfg = '0; clear = 0; adv = 1; in_valid = 0; in_sym = '0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    r1 = new();
    r1.add(C_PLAIN, ext_pattern::letters("A"));
    r1.add(C_PLAIN, ext_pattern::letters("B"));
    r1.add(C_PLAIN, ext_pattern::letters("A"));
    r1.add(C_PLAIN, ext_pattern::letters("B"));
    r1.add(C_PLAIN, ext_pattern::letters("C"));
    r1.compile();
    load(r1, 1'b1);
    clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < 15; k++) begin
      in_valid = (k < 13); in_sym = (k < 13) ? txt[k] : 8'h0;
      @(negedge clk);
      // the result for letter k-1 (position k) is visible now
      if (k >= 1) check(match == (k == 7 || k == 12), $sformatf("match at position %0d", k));
    end
    in_valid = 0;
    check(busy == 1'b0, "pipeline empty");

    // --- random patterns against the NFA reference ---
    for (int n = 0; n < 80; n++) begin
      ext_pattern p;
      p = new();
      p.make_random(L, 3, 1'b1);
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
        in_sym   = sym_t'(8'h41 + ($urandom % 4));
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
