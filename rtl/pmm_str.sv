// pmm_str: pattern matching module (PMM) for one exact string pattern.
//
// A string pattern s_1..s_m (m <= L) is held as INIT (bit 1), ACCEPT (bit m)
// and one L-bit mask MOVE[a] per letter a, where MOVE[a][i] = 1 iff s_i = a
// (bit-position i is bit i-1 here). MOVE sits in one 256-line block RAM
// addressed by the input letter. The module runs the SHIFT-AND update, one
// letter per clock:
//   STATE = ((STATE << 1) | INIT) & MOVE[t]
// and match is high while STATE & ACCEPT is non-zero. INIT is OR-ed in every
// cycle, so matches may start anywhere in the text.
//
// Interface and timing are those of pmm_ext: cfg is the broadcast mask-write
// bus (writes apply when cfg.pmm equals INDEX; only REG_INIT, REG_ACCEPT and
// MOVE lines exist here), clear empties STATE, adv stalls the whole pipeline,
// and a letter offered in cycle c is reflected in state/match from cycle c+2.
// The mask set follows the original string-matching PMM; the pipeline, the
// write bus and the reset values are this design's choices.
module pmm_str
  import bpnfa_pkg::*;
#(
  parameter int unsigned L     = 32,  // register bit-length, longest pattern
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
    $error("pmm_str: L must not exceed the packet mask field");
  end

  logic [L-1:0] init_q, accept_q, move_q;
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

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q   <= '0;
      accept_q <= '0;
    end else if (hit && cfg.tgt == TGT_REG) begin
      if (cfg.sel == REG_INIT)   init_q   <= cfg.data[L-1:0];
      if (cfg.sel == REG_ACCEPT) accept_q <= cfg.data[L-1:0];
    end
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
      if (s1_valid) state <= ((state << 1) | init_q) & move_q;
    end
  end

  assign busy  = s1_valid;
  assign match = |(state & accept_q);

endmodule
