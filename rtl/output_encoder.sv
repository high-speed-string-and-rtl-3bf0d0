// output_encoder: turns the match flags of N PMMs into output packets, one
// (pattern index, end position) pair per packet.
//
// After every STATE update the PMMs present a match vector (one bit per PMM)
// for text position p. The encoder copies the vector into a pending register
// and sends one OP_MATCH packet per set bit, lowest index first, one packet
// per clock while out_ready is high. A vector with at most one set bit leaves
// the matchers running at one letter per clock; a vector with k > 1 set bits
// (or a host that holds out_ready low) stalls the matching pipeline through
// hold until the pending register can take the next vector, so no match is
// ever lost. Vectors with no set bit are absorbed without a packet.
//
// Interface: step is high in a cycle where the PMMs update STATE (the vector
// then changes at the next edge); match_vec is the PMMs' match outputs. hold
// must be used as the inverse of the pipeline enable. clear (entry into
// run-time mode) restarts positions at 1. busy is high while a vector or
// packet is still outstanding. out_valid/out_ready/out_pkt is a valid/ready
// stream; a packet is held stable until taken.
// Timing: the packet for a vector appears one cycle after the vector.
// Reporting (index, end position) pairs follows the problem the hardware
// solves; the packet layout, the serialisation order and the stall scheme
// are this design's choices. (The assertions sample rst_n synchronously
// through their disable condition; lint reports that as a reset used both
// ways, which affects no logic.)
module output_encoder
  import bpnfa_pkg::*;
#(
  parameter int unsigned N = 128  // number of PMMs
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          step,
  input  logic [N-1:0]  match_vec,
  output logic          hold,
  output logic          busy,
  output logic          out_valid,
  input  logic          out_ready,
  output pkt_t          out_pkt
);

  logic             mv_pending;   // match_vec holds a vector not yet copied
  logic [POS_W-1:0] pos_cnt;      // position of the current STATE
  logic [N-1:0]     pend;         // matches still to be sent
  logic [POS_W-1:0] pend_pos;
  logic [N-1:0]     pend_rest;    // pend without its lowest set bit
  logic             loadable, load;
  logic [IDX_W-1:0] idx;

  assign pend_rest = pend & (pend - N'(1));
  assign loadable  = (pend_rest == '0) && ((pend == '0) || out_ready);
  assign load      = mv_pending && loadable;
  assign hold      = mv_pending && !loadable;
  assign busy      = mv_pending || (pend != '0);
  assign out_valid = (pend != '0);

  // Lowest set bit of pend.
  always_comb begin
    idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (pend[i]) idx = IDX_W'(i);
    end
  end

  assign out_pkt = make_pkt(OP_MATCH, idx, 4'd0, '0, pend_pos);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mv_pending <= 1'b0;
      pos_cnt    <= '0;
      pend       <= '0;
      pend_pos   <= '0;
    end else if (clear) begin
      mv_pending <= 1'b0;
      pos_cnt    <= '0;
      pend       <= '0;
    end else begin
      if (step) pos_cnt <= pos_cnt + 1'b1;
      mv_pending <= step || (mv_pending && !load);
      if (load) begin
        pend     <= match_vec;
        pend_pos <= pos_cnt;
      end else if (out_valid && out_ready) begin
        pend <= pend_rest;
      end
    end
  end

  // A packet that is offered stays offered, unchanged, until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n || clear)
    out_valid && !out_ready |=> out_valid && $stable(out_pkt));

  // The pipeline never updates STATE over a vector that was not copied.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(step && hold));

endmodule
