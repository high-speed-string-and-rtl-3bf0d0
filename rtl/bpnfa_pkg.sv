// bpnfa_pkg: types and constants shared by the bit-parallel NFA pattern
// matching hardware.
//
// The host talks to the hardware with 64-bit packets, as in the original
// design; the field layout below is this design's own choice, since only the
// packet length is fixed by the architecture.
//
// Input packet (host -> hardware):
//   [63:60] opcode (op_e)
//   [59:44] PMM index (pattern index)
//   [43:40] register select (reg_sel_e), for OP_CFG_REG
//   [39:32] letter: BRAM line for OP_CFG_MOVE / OP_CFG_REPPOS, text letter
//           for OP_TEXT
//   [31:0]  mask data, bit i-1 = bit-position i (bit-position 1 is the LSB)
// Output packet (hardware -> host):
//   [63:60] OP_MATCH
//   [59:44] index of the PMM that matched
//   [43:32] zero
//   [31:0]  end position p of the match (1 = first letter after OP_RUN)
package bpnfa_pkg;

  localparam int unsigned PKT_W   = 64;  // I/O packet length
  localparam int unsigned SYM_W   = 8;   // one letter is one byte
  localparam int unsigned SIGMA   = 256; // |Sigma|, lines per mask RAM
  localparam int unsigned DATA_W  = 32;  // mask field of a packet, max L
  localparam int unsigned IDX_W   = 16;  // PMM index field
  localparam int unsigned POS_W   = 32;  // end-position field

  typedef logic [PKT_W-1:0] pkt_t;
  typedef logic [SYM_W-1:0] sym_t;

  typedef enum logic [3:0] {
    OP_NOP       = 4'd0,
    OP_CFG_REG   = 4'd1,  // write one L-bit mask register of a PMM
    OP_CFG_MOVE  = 4'd2,  // write MOVE[letter] of a PMM
    OP_CFG_REPPOS= 4'd3,  // write REPPOS[letter] of a PMM
    OP_RUN       = 4'd4,  // enter run-time mode, clear STATE and position
    OP_PRE       = 4'd5,  // enter pre-processing mode
    OP_TEXT      = 4'd6,  // one input letter
    OP_MATCH     = 4'd7   // output: one (index, position) pair
  } op_e;

  typedef enum logic [3:0] {
    REG_INIT   = 4'd0,
    REG_ACCEPT = 4'd1,
    REG_EPSBEG = 4'd2,
    REG_EPSEND = 4'd3,
    REG_EPSBLK = 4'd4
  } reg_sel_e;

  typedef enum logic [1:0] {
    TGT_REG    = 2'd0,
    TGT_MOVE   = 2'd1,
    TGT_REPPOS = 2'd2
  } cfg_tgt_e;

  // Pattern class served by a matcher's PMMs.
  typedef enum logic {
    CLASS_STR = 1'b0,   // exact string patterns, SHIFT-AND
    CLASS_EXT = 1'b1    // extended patterns, Extended SHIFT-AND
  } pclass_e;

  typedef enum logic {
    MODE_PRE = 1'b0,
    MODE_RUN = 1'b1
  } mode_e;

  // One bit-mask write, broadcast from the input decoder to every PMM.
  typedef struct packed {
    logic                 valid;
    logic [IDX_W-1:0]     pmm;
    cfg_tgt_e             tgt;
    reg_sel_e             sel;
    sym_t                 addr;
    logic [DATA_W-1:0]    data;
  } cfg_wr_t;

  // Fields of an input packet.
  typedef struct packed {
    op_e               op;
    logic [IDX_W-1:0]  idx;
    reg_sel_e          sel;
    sym_t              sym;
    logic [DATA_W-1:0] data;
  } pkt_fields_t;

  // Packet construction.
  function automatic pkt_t make_pkt(op_e op, logic [IDX_W-1:0] idx,
                                    logic [3:0] sel, sym_t sym,
                                    logic [DATA_W-1:0] data);
    return {op, idx, sel, sym, data};
  endfunction

endpackage
