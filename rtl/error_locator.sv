// error_locator: turns the syndrome of one sub frame into the frame bit that
// a single upset has flipped.
//
// With the check matrix column of Hamming index ix equal to the binary value
// of ix, a single flipped bit leaves a syndrome equal to its own index. The
// index is mapped back through the round-robin interleaving: payload bit
// p = (syndrome - 1) * PHI + sub, moved past the PHI-bit tracking field when it
// lies at or beyond TRACK_LSB, then split into a word address and a bit in the
// word. A syndrome that points past the end of the sub frame cannot come from a
// single upset and is reported as uncorrectable; a sub frame whose tracking bit
// is set carries no embedded code and is neither checked nor corrected.
//
// Purely combinational. Outputs:
//   error        syndrome non-zero on an embedded sub frame
//   correctable  error and the syndrome names a bit of this sub frame
//   word_addr / bit_sel   location of that bit, valid when correctable
//
// The syndrome-equals-position rule follows the scheme's check matrix; the
// out-of-range test and the handling of tracked sub frames are this design's.
module error_locator #(
  parameter int unsigned WORD_W      = bieh_pkg::WORD_W,
  parameter int unsigned FRAME_WORDS = bieh_pkg::FRAME_WORDS,
  parameter int unsigned PHI         = bieh_pkg::PHI,
  parameter int unsigned TRACK_LSB   = bieh_pkg::TRACK_LSB,
  parameter int unsigned DELTA       =
      bieh_pkg::calc_delta(bieh_pkg::sub_max(WORD_W * FRAME_WORDS, PHI)),
  localparam int unsigned SUB_W = (PHI > 1) ? $clog2(PHI) : 1,
  localparam int unsigned WA_W  = (FRAME_WORDS > 1) ? $clog2(FRAME_WORDS) : 1,
  localparam int unsigned BS_W  = (WORD_W > 1) ? $clog2(WORD_W) : 1
) (
  input  logic [SUB_W-1:0] sub,
  input  logic [DELTA-1:0] syndrome,
  input  logic             not_embedded,
  output logic             error,
  output logic             correctable,
  output logic [WA_W-1:0]  word_addr,
  output logic [BS_W-1:0]  bit_sel
);

  localparam int unsigned KAPPA = WORD_W * FRAME_WORDS;
  localparam int unsigned NPAY  = KAPPA - PHI;

  int unsigned p, k;

  always_comb begin
    p = (int'(syndrome) - 1) * PHI + int'(sub);
    k = bieh_pkg::pay_to_frame(p, TRACK_LSB, PHI);
    error       = !not_embedded && (syndrome != '0);
    correctable = error && (p < NPAY);
    word_addr   = WA_W'(k / WORD_W);
    bit_sel     = BS_W'(k % WORD_W);
  end

endmodule
