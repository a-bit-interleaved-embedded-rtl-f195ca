// bieh_top: the two halves of the bit-interleaved embedded Hamming scheme.
//
// Embedding path (embed_unit): before a frame is loaded into the device, its
// non-essential bits are solved so that each of its PHI interleaved sub frames
// is a valid Hamming codeword; sub frames that cannot be embedded are marked in
// the frame's PHI-bit tracking field. The result (emb_frame_out) is what gets
// configured into the device.
//
// Runtime path (scrubber): reads the device's frames back one by one through
// the configuration port, decodes every sub frame's syndrome, flips the bit a
// single upset has hit in each sub frame, and writes corrected frames back.
// No golden copy and no external ECC store are needed: the codes live in the
// frames themselves.
//
// The two paths share only the sizes; they are brought out side by side. The
// configuration memory and its port belong to the device, so the port appears
// here as plain signals (see scrubber for the protocol). Port timing is that of
// embed_unit and scrubber. Placing both in one top is this design's choice.
module bieh_top #(
  parameter int unsigned WORD_W      = bieh_pkg::WORD_W,
  parameter int unsigned FRAME_WORDS = bieh_pkg::FRAME_WORDS,
  parameter int unsigned PHI         = bieh_pkg::PHI,
  parameter int unsigned TRACK_LSB   = bieh_pkg::TRACK_LSB,
  parameter int unsigned NFRAMES     = bieh_pkg::NFRAMES,
  localparam int unsigned KAPPA = WORD_W * FRAME_WORDS,
  localparam int unsigned FA_W  = (NFRAMES > 1) ? $clog2(NFRAMES) : 1,
  localparam int unsigned WA_W  = (FRAME_WORDS > 1) ? $clog2(FRAME_WORDS) : 1,
  localparam int unsigned BS_W  = (WORD_W > 1) ? $clog2(WORD_W) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // embedding path
  input  logic              emb_start,
  input  logic [KAPPA-1:0]  emb_frame_in,
  input  logic [KAPPA-1:0]  emb_mask_in,
  output logic              emb_busy,
  output logic              emb_done,
  output logic [KAPPA-1:0]  emb_frame_out,
  output logic [PHI-1:0]    emb_not_embedded,
  // scrubber control and status
  input  logic              scrub_en,
  output logic [FA_W-1:0]   scrub_frame,
  output logic              scrub_pass_done,
  output logic [31:0]       cnt_corrected,
  output logic [31:0]       cnt_uncorrectable,
  output logic [31:0]       cnt_skipped,
  output logic [31:0]       cnt_writeback,
  output logic [31:0]       cnt_frames,
  output logic              fix_valid,
  output logic [FA_W-1:0]   fix_frame,
  output logic [WA_W-1:0]   fix_word,
  output logic [BS_W-1:0]   fix_bit,
  // configuration port of the device
  output logic              cfg_cmd_valid,
  input  logic              cfg_cmd_ready,
  output logic              cfg_cmd_write,
  output logic [FA_W-1:0]   cfg_cmd_frame,
  input  logic              cfg_rvalid,
  input  logic [WORD_W-1:0] cfg_rdata,
  output logic              cfg_wvalid,
  input  logic              cfg_wready,
  output logic [WORD_W-1:0] cfg_wdata
);

  embed_unit #(
    .WORD_W(WORD_W), .FRAME_WORDS(FRAME_WORDS), .PHI(PHI), .TRACK_LSB(TRACK_LSB)
  ) u_embed (
    .clk, .rst_n,
    .start       (emb_start),
    .frame_in    (emb_frame_in),
    .mask_in     (emb_mask_in),
    .busy        (emb_busy),
    .done        (emb_done),
    .frame_out   (emb_frame_out),
    .not_embedded(emb_not_embedded)
  );

  scrubber #(
    .WORD_W(WORD_W), .FRAME_WORDS(FRAME_WORDS), .PHI(PHI), .TRACK_LSB(TRACK_LSB),
    .NFRAMES(NFRAMES)
  ) u_scrub (
    .clk, .rst_n,
    .scrub_en,
    .cmd_valid (cfg_cmd_valid),
    .cmd_ready (cfg_cmd_ready),
    .cmd_write (cfg_cmd_write),
    .cmd_frame (cfg_cmd_frame),
    .rvalid    (cfg_rvalid),
    .rdata     (cfg_rdata),
    .wvalid    (cfg_wvalid),
    .wready    (cfg_wready),
    .wdata     (cfg_wdata),
    .cur_frame (scrub_frame),
    .pass_done (scrub_pass_done),
    .cnt_corrected,
    .cnt_uncorrectable,
    .cnt_skipped,
    .cnt_writeback,
    .cnt_frames,
    .fix_valid,
    .fix_frame,
    .fix_word,
    .fix_bit
  );

endmodule
