// syndrome_unit: de-interleaves a read-back frame into its sub frames and
// accumulates one Hamming syndrome per sub frame.
//
// Words of a frame arrive in order (word 0 first), one per cycle at most, with
// in_valid. Bit b of word w is frame bit k = w*WORD_W + b. Frame bits outside
// the tracking field are payload bits and are dealt round-robin to the PHI sub
// frames: payload bit p goes to sub frame p % PHI at Hamming index p / PHI + 1.
// The check matrix column of index ix is the binary form of ix, so the unit
// XORs the index of every set payload bit into its sub frame's syndrome. A
// running (sub frame, index) pair carries the position from word to word, so no
// division is needed. The PHI tracking bits are captured separately in track.
//
// Timing: clear (one cycle, no word accepted in that cycle) empties the
// syndromes; a word given with in_valid is folded in at the next clock edge.
// After FRAME_WORDS words frame_done is high and syndrome/track hold the
// frame's result until the next clear; further words are ignored.
//
// Round-robin sub frames and index-valued check matrix columns follow the
// scheme's description; the word-serial structure is this design's choice.
module syndrome_unit #(
  parameter int unsigned WORD_W      = bieh_pkg::WORD_W,
  parameter int unsigned FRAME_WORDS = bieh_pkg::FRAME_WORDS,
  parameter int unsigned PHI         = bieh_pkg::PHI,
  parameter int unsigned TRACK_LSB   = bieh_pkg::TRACK_LSB,
  parameter int unsigned DELTA       =
      bieh_pkg::calc_delta(bieh_pkg::sub_max(WORD_W * FRAME_WORDS, PHI))
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       in_valid,
  input  logic [WORD_W-1:0]          in_word,
  output logic [PHI-1:0][DELTA-1:0]  syndrome,
  output logic [PHI-1:0]             track,
  output logic                       frame_done
);

  localparam int unsigned SUB_W = (PHI > 1) ? $clog2(PHI) : 1;
  localparam int unsigned WC_W  = $clog2(FRAME_WORDS + 1);
  localparam int unsigned KAPPA = WORD_W * FRAME_WORDS;

  logic [PHI-1:0][DELTA-1:0] syn_q, syn_n;
  logic [PHI-1:0]            trk_q, trk_n;
  logic [SUB_W-1:0]          sub_q, sub_n;
  logic [DELTA-1:0]          ix_q, ix_n;
  logic [WC_W-1:0]           wcnt_q;

  always_comb begin
    int unsigned k;
    syn_n = syn_q;
    trk_n = trk_q;
    sub_n = sub_q;
    ix_n  = ix_q;
    for (int unsigned b = 0; b < WORD_W; b++) begin
      k = int'(wcnt_q) * WORD_W + b;
      if (k >= TRACK_LSB && k < TRACK_LSB + PHI) begin
        trk_n[k - TRACK_LSB] = in_word[b];
      end else begin
        if (in_word[b]) syn_n[sub_n] = syn_n[sub_n] ^ ix_n;
        if (sub_n == SUB_W'(PHI - 1)) begin
          sub_n = '0;
          ix_n  = ix_n + 1'b1;
        end else begin
          sub_n = sub_n + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syn_q  <= '0;
      trk_q  <= '0;
      sub_q  <= '0;
      ix_q   <= DELTA'(1);
      wcnt_q <= '0;
    end else if (clear) begin
      syn_q  <= '0;
      trk_q  <= '0;
      sub_q  <= '0;
      ix_q   <= DELTA'(1);
      wcnt_q <= '0;
    end else if (in_valid && wcnt_q < WC_W'(FRAME_WORDS)) begin
      syn_q  <= syn_n;
      trk_q  <= trk_n;
      sub_q  <= sub_n;
      ix_q   <= ix_n;
      wcnt_q <= wcnt_q + 1'b1;
    end
  end

  assign syndrome   = syn_q;
  assign track      = trk_q;
  assign frame_done = (wcnt_q == WC_W'(FRAME_WORDS));

  // The tracking field must lie inside the frame.
  initial assert (TRACK_LSB + PHI <= KAPPA) else $error("tracking field outside the frame");

endmodule
