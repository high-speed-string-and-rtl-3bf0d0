// mask_ram: one block RAM of L-bit bit-masks, one line per letter.
//
// A pattern matching module keeps its per-letter mask arrays (MOVE[a] and
// REPPOS[a], a in Sigma) in block RAMs with |Sigma| = 256 lines, so that the
// mask for the current input letter is fetched by using the letter itself as
// the read address. This module is that RAM: one write port, used while
// patterns are loaded, and one synchronous read port, used at run time.
//
// Timing: a write (we) lands at the rising edge. A read with re = 1 presents
// the line at raddr on rdata after the next rising edge; with re = 0, rdata
// holds its value, which lets the matching pipeline stall. If a line is read
// and written in the same cycle, rdata shows the old contents.
// The contents have no reset, as in an FPGA block RAM: every line that can be
// read must be loaded first. The RAM style and the hold-on-stall read enable
// are this design's own choices.
module mask_ram #(
  parameter int unsigned WIDTH = 32,   // L, the register bit-length
  parameter int unsigned DEPTH = 256,  // |Sigma|
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
