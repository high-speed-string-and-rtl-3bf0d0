// tb_matcher_host: behavioural host for one bpnfa_matcher, used by the
// end-to-end testbenches. It plays the role of the host computer on the
// other side of the packet link.
//
// Round 0 (the full workload): loads a pattern into every one of the N PMMs,
// each with exactly L components (N*L pattern letters in all), two PMMs with
// the same pattern so that one position yields several matches, then streams
// a text in which occurrences of the loaded patterns are planted.
// Round 1 (reconfiguration): overwrites NSHORT PMMs with short patterns over
// three letters, which match often, and streams a text with the host
// throttling out_ready.
// In both rounds it checks every output packet against a state-by-state NFA
// reference of all loaded patterns, counts the load cycles (one packet per
// clock), and, in round 0, checks that the last match packet leaves exactly
// 2 + sum over positions of max(1, matches) cycles after the first letter.
// It also sends one letter in pre-processing mode and one mask write in
// run-time mode, which must be dropped and flagged.
// Mechanism counters (stalls, multi-match positions, backpressure, mode
// switches, dropped packets, reconfigured PMMs) are outputs; done rises at
// the end.
module tb_matcher_host
  import bpnfa_pkg::*;
  import tb_bpnfa_pkg::*;
#(
  parameter pclass_e CLASS   = CLASS_EXT,
  parameter int      N       = 8,
  parameter int      L       = 32,
  parameter int      TEXTLEN = 3000,
  parameter int      NSHORT  = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  in_valid,
  input  logic  in_ready,
  output pkt_t  in_pkt,
  input  logic  out_valid,
  output logic  out_ready,
  input  pkt_t  out_pkt,
  input  mode_e mode,
  input  logic  err,
  output logic  done,
  output int    checks,
  output int    failures,
  output int    n_stall,
  output int    n_multi,
  output int    n_backpressure,
  output int    n_mode_switch,
  output int    n_dropped,
  output int    n_reconfig
);

  localparam int NSYM = 3;

  ext_pattern pats [N];
  pkt_t       expq [$];
  longint     cyc = 0;
  longint     last_pkt_cyc, first_letter_cyc;
  bit         text_phase = 0;
  bit         throttle = 0;
  mode_e      prev_mode;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t %s", CLASS == CLASS_EXT ? "EXT" : "STR", $time, what);
    end
  endtask

  // monitors
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (mode != prev_mode) n_mode_switch++;
      prev_mode = mode;
      if (err) n_dropped++;
      if (text_phase && in_valid && !in_ready) n_stall++;
      if (out_valid && !out_ready) n_backpressure++;
      if (out_valid && out_ready) begin
        last_pkt_cyc = cyc;
        if (expq.size() == 0) check(1'b0, $sformatf("unexpected packet %h", out_pkt));
        else begin
          pkt_t e;
          e = expq.pop_front();
          check(out_pkt == e, $sformatf("packet %h expected %h", out_pkt, e));
        end
      end
    end
  end

  always @(negedge clk) out_ready <= throttle ? ($urandom % 3 != 0) : 1'b1;

  // send one packet, waiting for in_ready; returns the cycle it was taken
  task automatic send(pkt_t p, output longint taken);
    bit rdy;
    in_valid = 1'b1;
    in_pkt   = p;
    do begin
      #1 rdy = in_ready;    // settled value the next edge will see
      @(posedge clk);
      taken = cyc;
      @(negedge clk);
    end while (!rdy);
    in_valid = 1'b0;
  endtask

  task automatic send1(pkt_t p);
    longint t;
    send(p, t);
  endtask

  // load one PMM; returns the number of packets
  task automatic load(int idx, ext_pattern p, output int npkt, output longint t0, output longint t1);
    npkt = 0;
    p.compile();
    send(make_pkt(OP_CFG_REG, IDX_W'(idx), 4'(REG_INIT), 8'd0, 32'(p.init)), t0); npkt++;
    send(make_pkt(OP_CFG_REG, IDX_W'(idx), 4'(REG_ACCEPT), 8'd0, 32'(p.accept)), t1); npkt++;
    if (CLASS == CLASS_EXT) begin
      send(make_pkt(OP_CFG_REG, IDX_W'(idx), 4'(REG_EPSBEG), 8'd0, 32'(p.eps_beg)), t1); npkt++;
      send(make_pkt(OP_CFG_REG, IDX_W'(idx), 4'(REG_EPSEND), 8'd0, 32'(p.eps_end)), t1); npkt++;
      send(make_pkt(OP_CFG_REG, IDX_W'(idx), 4'(REG_EPSBLK), 8'd0, 32'(p.eps_blk)), t1); npkt++;
    end
    for (int a = 0; a < 256; a++) begin
      send(make_pkt(OP_CFG_MOVE, IDX_W'(idx), 4'd0, 8'(a), 32'(p.move[a])), t1); npkt++;
      if (CLASS == CLASS_EXT) begin
        send(make_pkt(OP_CFG_REPPOS, IDX_W'(idx), 4'd0, 8'(a), 32'(p.reppos[a])), t1); npkt++;
      end
    end
    pats[idx] = p;
  endtask

  // stream a text, build expected packets, return sum of max(1, matches)
  task automatic run_text(bit [7:0] text [$], output int s);
    s = 0;
    for (int i = 0; i < N; i++) if (pats[i] != null) pats[i].ref_reset();
    for (int j = 0; j < text.size(); j++) begin
      int k = 0;
      for (int i = 0; i < N; i++) begin
        if (pats[i] != null) begin
          pats[i].ref_step(text[j]);
          if (pats[i].ref_match()) begin
            expq.push_back(make_pkt(OP_MATCH, IDX_W'(i), 4'd0, 8'd0, 32'(j + 1)));
            k++;
          end
        end
      end
      if (k > 1) n_multi++;
      s += (k > 1) ? k : 1;
    end
    text_phase = 1;
    for (int j = 0; j < text.size(); j++) begin
      longint t;
      send(make_pkt(OP_TEXT, '0, 4'd0, text[j], 32'd0), t);
      if (j == 0) first_letter_cyc = t;
    end
    text_phase = 0;
    // drain
    while (expq.size() != 0 && cyc < first_letter_cyc + 10 * longint'(s) + 100) @(posedge clk);
    repeat (4) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d match packets missing", expq.size()));
    expq.delete();
  endtask

  function automatic void make_text(ref bit [7:0] text [$], input int len, input int plant_pct);
    text.delete();
    while (text.size() < len) begin
      if ($urandom % 100 < plant_pct) begin
        int i;
        do i = $urandom % N; while (pats[i] == null);
        pats[i].sample_word(text, NSYM);
      end else begin
        text.push_back(($urandom % 20 == 0) ? 8'h5a : 8'(8'h41 + $urandom % NSYM));
      end
    end
  endfunction

  initial begin
    bit [7:0] text [$];
    int npkt, tot, s, regs;
    longint t0, t1, tfirst;
    in_valid = 0; in_pkt = '0; done = 0;
    checks = 0; failures = 0; n_stall = 0; n_multi = 0; n_backpressure = 0;
    n_mode_switch = 0; n_dropped = 0; n_reconfig = 0;
    prev_mode = MODE_PRE;
    regs = (CLASS == CLASS_EXT) ? 5 : 2;
    @(posedge rst_n);
    repeat (2) @(negedge clk);

    // ---- round 0: every PMM loaded with an L-component pattern ----
    tot = 0;
    for (int i = 0; i < N; i++) begin
      ext_pattern p;
      p = new();
      if (i == 1) p.copy_from(pats[0]);
      else p.make_random_len(L, NSYM, CLASS == CLASS_STR);
      load(i, p, npkt, t0, t1);
      if (i == 0) tfirst = t0;
      tot += npkt;
    end
    check(tot == N * (regs + ((CLASS == CLASS_EXT) ? 512 : 256)), "packet count");
    check(t1 - tfirst + 1 == longint'(tot),
          $sformatf("loading took %0d cycles for %0d packets", t1 - tfirst + 1, tot));
    // a letter in pre-processing mode is dropped
    send1(make_pkt(OP_TEXT, '0, 4'd0, 8'h41, 32'd0));
    send1(make_pkt(OP_RUN, '0, 4'd0, 8'd0, 32'd0));
    // a mask write in run-time mode is dropped (it would break PMM 0)
    send1(make_pkt(OP_CFG_REG, 16'd0, 4'(REG_ACCEPT), 8'd0, 32'd0));
    make_text(text, TEXTLEN, 15);
    text.push_back(8'h5a);
    pats[0].sample_word(text, NSYM);  // last position surely matches
    run_text(text, s);
    check(last_pkt_cyc - first_letter_cyc == longint'(s + 2),
          $sformatf("text took %0d cycles, expected %0d", last_pkt_cyc - first_letter_cyc, s + 2));

    // ---- round 1: reconfigure some PMMs with short patterns ----
    send1(make_pkt(OP_PRE, '0, 4'd0, 8'd0, 32'd0));
    for (int r = 0; r < NSHORT; r++) begin
      ext_pattern p;
      int idx;
      idx = (r == 0) ? N - 1 : (r * 7) % N;
      p = new();
      p.make_random(4, NSYM, CLASS == CLASS_STR);
      load(idx, p, npkt, t0, t1);
      n_reconfig++;
    end
    send1(make_pkt(OP_RUN, '0, 4'd0, 8'd0, 32'd0));
    throttle = 1;
    make_text(text, TEXTLEN / 2, 5);
    run_text(text, s);
    throttle = 0;
    send1(make_pkt(OP_PRE, '0, 4'd0, 8'd0, 32'd0));
    repeat (3) @(negedge clk);
    done = 1;
  end

endmodule
