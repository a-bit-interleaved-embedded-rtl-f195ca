// frame_buffer: one configuration frame held as FRAME_WORDS words of WORD_W
// bits, for the scrubber to correct and write back.
//
// A plain simple-dual-port memory: one write port and one read port with a
// registered output. A write and a read in the same cycle to the same word
// return the old contents. rdata changes only in the cycle after re.
// The scheme only requires that a read-back frame be corrected and written
// back; keeping it in a memory rather than in registers is this design's choice.
module frame_buffer #(
  parameter int unsigned WORD_W = bieh_pkg::WORD_W,
  parameter int unsigned DEPTH  = bieh_pkg::FRAME_WORDS,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
