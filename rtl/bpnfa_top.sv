// bpnfa_top: the two dynamically reconfigurable bit-parallel NFA matchers of
// this design, side by side: one for extended patterns (N_EXT PMMs, by
// default 128, 4,096 pattern letters in all) and one for exact string
// patterns (N_STR PMMs, by default 256, 8,192 letters), both with L = 32-bit
// registers and 256-line mask RAMs.
//
// Each matcher has its own 64-bit packet input (ext_in_*, str_in_*), packet
// output (ext_out_*, str_out_*), mode and error flag, and they share only the
// clock and reset. Packet layout and timing are described in bpnfa_pkg and
// bpnfa_matcher. The sizes are those of the original implementation; placing
// both matchers in one top is this design's choice (they were built as two
// separate hardwares).
module bpnfa_top
  import bpnfa_pkg::*;
#(
  parameter int unsigned L     = 32,
  parameter int unsigned N_EXT = 128,
  parameter int unsigned N_STR = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  // extended-pattern matcher
  input  logic   ext_in_valid,
  output logic   ext_in_ready,
  input  pkt_t   ext_in_pkt,
  output logic   ext_out_valid,
  input  logic   ext_out_ready,
  output pkt_t   ext_out_pkt,
  output mode_e  ext_mode,
  output logic   ext_err,
  // string-pattern matcher
  input  logic   str_in_valid,
  output logic   str_in_ready,
  input  pkt_t   str_in_pkt,
  output logic   str_out_valid,
  input  logic   str_out_ready,
  output pkt_t   str_out_pkt,
  output mode_e  str_mode,
  output logic   str_err
);

  bpnfa_matcher #(.CLASS(CLASS_EXT), .L(L), .N(N_EXT)) u_ext (
    .clk(clk), .rst_n(rst_n),
    .in_valid(ext_in_valid), .in_ready(ext_in_ready), .in_pkt(ext_in_pkt),
    .out_valid(ext_out_valid), .out_ready(ext_out_ready), .out_pkt(ext_out_pkt),
    .mode(ext_mode), .err(ext_err)
  );

  bpnfa_matcher #(.CLASS(CLASS_STR), .L(L), .N(N_STR)) u_str (
    .clk(clk), .rst_n(rst_n),
    .in_valid(str_in_valid), .in_ready(str_in_ready), .in_pkt(str_in_pkt),
    .out_valid(str_out_valid), .out_ready(str_out_ready), .out_pkt(str_out_pkt),
    .mode(str_mode), .err(str_err)
  );

endmodule
