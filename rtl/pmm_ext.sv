// pmm_ext: pattern matching module (PMM) for one extended pattern.
//
// An extended pattern is a sequence r_1..r_m of letter classes, each plain,
// optional (a?), starred (a*) or plus (a+); bounded repeats a{x,y} are expanded
// into (a?)^(y-x) a^x before loading, so m <= L. The pattern's NFA has one
// state per component and is held as a set of L-bit masks (bit-position i of
// the pattern is bit i-1 here):
//   INIT, ACCEPT                 first / final state
//   EpsBEG, EpsEND, EpsBLK       lowest bit, highest bit, all bits of every
//                                epsilon-block (run of ?/* components plus the
//                                state before it)
//   MOVE[a], REPPOS[a]           backbone / self-loop labels, one mask per
//                                letter, in two 256-line block RAMs
// The module simulates the NFA with the Extended SHIFT-AND update, one letter
// per clock:
//   S'   = (((S << 1) | INIT) & MOVE[t]) | (S & REPPOS[t])
//   HIGH = S' | EpsEND
//   LOW  = HIGH - EpsBEG
//   S    = S' | (EpsBLK & (~LOW ^ HIGH))
// The subtraction fills each epsilon-block above its lowest active state in a
// single carry chain. INIT is OR-ed in every cycle, so a match may start at
// any text position; match is high while STATE & ACCEPT is non-zero.
//
// Interface: cfg is the broadcast mask-write bus; a write applies when
// cfg.pmm equals INDEX. clear empties STATE (entry into run-time mode). adv is
// the global pipeline enable: when it is low nothing moves. in_valid/in_sym
// is the letter offered in a cycle with adv high.
// Timing: the letter addresses the mask RAMs in cycle c; the masks arrive in
// cycle c+1 and STATE is updated at the end of c+1, so state and match show
// the result for that letter from cycle c+2 on. Throughput is one letter per
// clock. busy is high while a letter is between the RAM read and the update.
// The update equations, the mask set and the register/RAM split follow the
// original architecture; the two-stage pipeline, the stall enable, the
// packet-level write bus and the reset values (all masks zero) are this
// design's choices.
module pmm_ext
  import bpnfa_pkg::*;
#(
  parameter int unsigned L     = 32,  // register bit-length, longest expanded pattern
  parameter int unsigned INDEX = 0    // pattern index of this PMM
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_wr_t       cfg,
  input  logic          clear,
  input  logic          adv,
  input  logic          in_valid,
  input  sym_t          in_sym,
  output logic          busy,
  output logic          match,
  output logic [L-1:0]  state
);

  if (L > DATA_W) begin : g_bad_l
    $error("pmm_ext: L must not exceed the packet mask field");
  end

  logic [L-1:0] init_q, accept_q, eps_beg_q, eps_end_q, eps_blk_q;
  logic [L-1:0] move_q, reppos_q;
  logic [L-1:0] s_letter, high, low, state_nxt;
  logic         s1_valid;
  logic         hit;

  assign hit = cfg.valid && (cfg.pmm == IDX_W'(INDEX));

  mask_ram #(.WIDTH(L), .DEPTH(SIGMA)) u_move (
    .clk  (clk),
    .we   (hit && cfg.tgt == TGT_MOVE),
    .waddr(cfg.addr),
    .wdata(cfg.data[L-1:0]),
    .re   (adv && in_valid),
    .raddr(in_sym),
    .rdata(move_q)
  );

  mask_ram #(.WIDTH(L), .DEPTH(SIGMA)) u_reppos (
    .clk  (clk),
    .we   (hit && cfg.tgt == TGT_REPPOS),
    .waddr(cfg.addr),
    .wdata(cfg.data[L-1:0]),
    .re   (adv && in_valid),
    .raddr(in_sym),
    .rdata(reppos_q)
  );

  // Mask registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q    <= '0;
      accept_q  <= '0;
      eps_beg_q <= '0;
      eps_end_q <= '0;
      eps_blk_q <= '0;
    end else if (hit && cfg.tgt == TGT_REG) begin
      unique case (cfg.sel)
        REG_INIT:   init_q    <= cfg.data[L-1:0];
        REG_ACCEPT: accept_q  <= cfg.data[L-1:0];
        REG_EPSBEG: eps_beg_q <= cfg.data[L-1:0];
        REG_EPSEND: eps_end_q <= cfg.data[L-1:0];
        REG_EPSBLK: eps_blk_q <= cfg.data[L-1:0];
        default: ;
      endcase
    end
  end

  // Extended SHIFT-AND update.
  always_comb begin
    s_letter  = (((state << 1) | init_q) & move_q) | (state & reppos_q);
    high      = s_letter | eps_end_q;
    low       = high - eps_beg_q;
    state_nxt = s_letter | (eps_blk_q & ((~low) ^ high));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= '0;
      s1_valid <= 1'b0;
    end else if (clear) begin
      state    <= '0;
      s1_valid <= 1'b0;
    end else if (adv) begin
      s1_valid <= in_valid;
      if (s1_valid) state <= state_nxt;
    end
  end

  assign busy  = s1_valid;
  assign match = |(state & accept_q);

endmodule
