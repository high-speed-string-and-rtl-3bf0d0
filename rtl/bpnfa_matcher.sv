// bpnfa_matcher: one dynamically reconfigurable bit-parallel NFA pattern
// matching hardware: an input decoder, N pattern matching modules (PMMs) of
// one pattern class, and an output encoder.
//
// Each PMM holds one pattern as bit-masks in registers and block RAMs and
// simulates that pattern's NFA with a fixed circuit, one input letter per
// clock, so changing the patterns means rewriting masks (a few hundred
// packets per PMM), not rebuilding the circuit. In pre-processing mode the
// host writes the masks; in run-time mode it streams letters, every PMM
// advances on every letter, and each match is reported as a packet carrying
// the PMM (pattern) index and the end position. CLASS selects the PMM type:
// CLASS_EXT for extended patterns (pmm_ext), CLASS_STR for exact strings
// (pmm_str).
//
// Interface: in_* and out_* are 64-bit valid/ready packet streams (layout in
// bpnfa_pkg). mode shows the current mode, err pulses when a packet that does
// not belong to the current mode was dropped.
// Timing: a letter taken in cycle c updates every STATE at the end of c+1;
// a resulting match packet is offered from cycle c+3. The pipeline takes one
// letter per clock unless a position yields more than one match or the host
// holds out_ready low; it then stalls as a whole until the matches are sent.
// The block structure (decoder, PMM array, encoder, two modes) follows the
// original architecture; the stall scheme is this design's choice.
module bpnfa_matcher
  import bpnfa_pkg::*;
#(
  parameter pclass_e     CLASS = CLASS_EXT,
  parameter int unsigned L     = 32,   // register bit-length
  parameter int unsigned N     = 128   // number of PMMs
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  pkt_t   in_pkt,
  output logic   out_valid,
  input  logic   out_ready,
  output pkt_t   out_pkt,
  output mode_e  mode,
  output logic   err
);

  cfg_wr_t      cfg;
  logic         clear, adv, hold, step;
  logic         letter_valid;
  sym_t         letter;
  logic         enc_busy;
  logic [N-1:0] match_vec, busy_vec;

  assign adv  = !hold;
  assign step = adv && (|busy_vec);

  input_decoder u_dec (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (in_valid),
    .in_ready    (in_ready),
    .in_pkt      (in_pkt),
    .adv         (adv),
    .busy        ((|busy_vec) || enc_busy),
    .mode        (mode),
    .cfg         (cfg),
    .clear       (clear),
    .letter_valid(letter_valid),
    .letter      (letter),
    .err         (err)
  );

  for (genvar i = 0; i < N; i++) begin : g_pmm
    if (CLASS == CLASS_EXT) begin : g_ext
      pmm_ext #(.L(L), .INDEX(i)) u_pmm (
        .clk(clk), .rst_n(rst_n), .cfg(cfg), .clear(clear), .adv(adv),
        .in_valid(letter_valid), .in_sym(letter),
        .busy(busy_vec[i]), .match(match_vec[i]), .state()
      );
    end else begin : g_str
      pmm_str #(.L(L), .INDEX(i)) u_pmm (
        .clk(clk), .rst_n(rst_n), .cfg(cfg), .clear(clear), .adv(adv),
        .in_valid(letter_valid), .in_sym(letter),
        .busy(busy_vec[i]), .match(match_vec[i]), .state()
      );
    end
  end

  output_encoder #(.N(N)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .step     (step),
    .match_vec(match_vec),
    .hold     (hold),
    .busy     (enc_busy),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_pkt  (out_pkt)
  );

endmodule
