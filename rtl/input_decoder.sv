// input_decoder: turns the host's 64-bit input packets into bit-mask writes,
// mode changes and input letters.
//
// The hardware has two modes. In pre-processing mode the host loads the
// patterns: every OP_CFG_REG / OP_CFG_MOVE / OP_CFG_REPPOS packet writes one
// L-bit word into one PMM, so loading one PMM takes one packet per register
// and per block-RAM line. In run-time mode every OP_TEXT packet carries one
// input letter, which is handed to all PMMs at once. OP_RUN enters run-time
// mode and clears every STATE and the position counter; OP_PRE returns to
// pre-processing mode. OP_NOP is accepted and ignored. A packet that does not
// belong to the current mode (a mask write at run time, a letter at
// pre-processing time, an output opcode) is accepted, dropped and flagged on
// err for one cycle.
//
// Interface: in_valid/in_ready/in_pkt is a valid/ready stream; a packet is
// taken in a cycle where both are high. cfg is the registered write bus
// (valid one cycle after the packet is taken). letter_valid/letter go
// straight to the PMMs, and a letter is taken when adv (the pipeline enable)
// is high, so in_ready follows adv for letters. OP_RUN and OP_PRE wait until
// busy (letters or matches still in flight) is low, and clear pulses in the
// cycle OP_RUN is taken.
// The two modes and the one-word-per-packet loading follow the original
// architecture; the packet layout, the error flag and the drain-before-switch
// rule are this design's choices.
module input_decoder
  import bpnfa_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  pkt_t     in_pkt,
  input  logic     adv,
  input  logic     busy,
  output mode_e    mode,
  output cfg_wr_t  cfg,
  output logic     clear,
  output logic     letter_valid,
  output sym_t     letter,
  output logic     err
);

  pkt_fields_t f;
  op_e  op;
  logic take;
  logic is_cfg;

  always_comb begin
    f      = pkt_fields_t'(in_pkt);
    op     = f.op;
    is_cfg = (op == OP_CFG_REG) || (op == OP_CFG_MOVE) || (op == OP_CFG_REPPOS);
    unique case (op)
      OP_RUN, OP_PRE: in_ready = !busy;
      OP_TEXT:        in_ready = (mode == MODE_RUN) ? adv : 1'b1;
      default:        in_ready = 1'b1;
    endcase
  end

  assign take         = in_valid && in_ready;
  assign clear        = take && (op == OP_RUN);
  assign letter_valid = in_valid && (op == OP_TEXT) && (mode == MODE_RUN);
  assign letter       = f.sym;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= MODE_PRE;
      cfg  <= '0;
      err  <= 1'b0;
    end else begin
      cfg.valid <= take && is_cfg && (mode == MODE_PRE);
      if (take && is_cfg) begin
        cfg.pmm  <= f.idx;
        cfg.sel  <= f.sel;
        cfg.addr <= f.sym;
        cfg.data <= f.data;
        cfg.tgt  <= (op == OP_CFG_MOVE)   ? TGT_MOVE :
                    (op == OP_CFG_REPPOS) ? TGT_REPPOS : TGT_REG;
      end
      if (take && op == OP_RUN) mode <= MODE_RUN;
      if (take && op == OP_PRE) mode <= MODE_PRE;
      err <= take && ((is_cfg && mode == MODE_RUN) ||
                      (op == OP_TEXT && mode == MODE_PRE) ||
                      !(is_cfg || op == OP_TEXT || op == OP_RUN ||
                        op == OP_PRE || op == OP_NOP));
    end
  end

endmodule
