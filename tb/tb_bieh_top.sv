// tb_bieh_top: end-to-end run of the whole design at its default sizes
// (2592-bit frames, 13 sub frames, 28,464 frames).
//  1. Four random frames with masks of 50 %, 50 %, 97 % and 90 % essential
//     bits go through the embedding path. Each result is checked against the
//     reference model: essential bits kept, embedded sub frames of syndrome 0,
//     tracking bits equal to not_embedded.
//  2. The configuration memory model is cleared (an all-zero frame is a valid
//     codeword) and the embedded frames are placed at frames 3, 9000, 20000
//     and 28463. Upsets are injected: a single upset (frame 3), a 4-bit burst
//     (9000), upsets in a not-embedded sub frame plus one single upset (20000),
//     two upsets in one sub frame that cannot be corrected (28463), and single
//     upsets in the empty frames 100 and 28000.
//  3. One complete scrub pass runs over all frames, with port stalls.
// Afterwards every word of the memory is compared with the expected image and
// the counters are checked. Each mechanism (embedding, non-embeddable sub
// frame, single correction, burst correction, uncorrectable detection, skipped
// sub frame, write-back, clean frame left alone, port stall, pass wrap-around)
// is counted and must have happened at least once.
module tb_bieh_top;
  import tb_ref_pkg::*;
  localparam int NF = 28464;

  logic clk = 0, rst_n = 0;
  logic emb_start = 0, emb_busy, emb_done;
  frame_t emb_frame_in = '0, emb_mask_in = '0, emb_frame_out;
  logic [PHI-1:0] emb_not_embedded;
  logic scrub_en = 0, scrub_pass_done, fix_valid;
  logic [14:0] scrub_frame, fix_frame, cfg_cmd_frame;
  logic [31:0] cnt_corrected, cnt_uncorrectable, cnt_skipped, cnt_writeback, cnt_frames;
  logic [6:0] fix_word;
  logic [4:0] fix_bit;
  logic cfg_cmd_valid, cfg_cmd_ready, cfg_cmd_write, cfg_rvalid, cfg_wvalid, cfg_wready;
  logic [31:0] cfg_rdata, cfg_wdata;
  int checks = 0, failures = 0;

  bieh_top dut (.*);
  cfg_mem_model #(.NFRAMES(NF), .STALL(10)) u_mem (
    .clk, .cmd_valid(cfg_cmd_valid), .cmd_ready(cfg_cmd_ready), .cmd_write(cfg_cmd_write),
    .cmd_frame(cfg_cmd_frame), .rvalid(cfg_rvalid), .rdata(cfg_rdata),
    .wvalid(cfg_wvalid), .wready(cfg_wready), .wdata(cfg_wdata));
  always #5 clk = ~clk;

  // mechanism counters
  int m_embed = 0, m_not_emb = 0, m_sbu = 0, m_burst = 0, m_unc = 0, m_skip = 0;
  int m_wb = 0, m_clean = 0, m_stall = 0, m_wrap = 0;

  int fixes_in_frame = 0;
  always @(posedge clk) if (rst_n) begin
    if (cfg_cmd_valid && !cfg_cmd_ready) m_stall++;
    if (fix_valid) fixes_in_frame++;
    if (cfg_cmd_valid && cfg_cmd_ready && !cfg_cmd_write) fixes_in_frame = 0;
    if (cfg_cmd_valid && cfg_cmd_ready && cfg_cmd_write) begin
      if (fixes_in_frame == 1) m_sbu++;
      if (fixes_in_frame > 1) m_burst++;
    end
    if (scrub_pass_done) m_wrap++;
  end

  int place [4] = '{3, 9000, 20000, 28463};
  frame_t img [4];

  function automatic void put(int fr, frame_t f);
    for (int w = 0; w < FRAME_WORDS; w++) u_mem.mem[fr*FRAME_WORDS + w] = f[w*WORD_W +: WORD_W];
  endfunction

  initial begin
    frame_t f, m, g, c;
    int dens [4] = '{50, 50, 97, 90};
    int ne_sub, e_sub, bad, frames_at_pass;
    init();
    for (int i = 0; i < NF * FRAME_WORDS; i++) u_mem.mem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. embedding
    for (int n = 0; n < 4; n++) begin
      f = random_frame();
      for (int k = 0; k < KAPPA; k++) m[k] = ($urandom_range(99) < dens[n]);
      @(negedge clk); emb_frame_in = f; emb_mask_in = m; emb_start = 1;
      @(negedge clk); emb_start = 0;
      while (!emb_done) @(negedge clk);
      m_embed++;
      g = emb_frame_out;
      m_not_emb += $countones(emb_not_embedded);
      checks++;
      bad = 0;
      for (int k = 0; k < KAPPA; k++) if (sub_of[k] >= 0 && m[k] && g[k] != f[k]) bad++;
      for (int j = 0; j < PHI; j++) begin
        if (g[TRACK_LSB + j] != emb_not_embedded[j]) bad++;
        if (!emb_not_embedded[j] && syndrome(g, j) != 0) bad++;
      end
      if (bad != 0) begin failures++; $display("FAIL embedding of frame %0d", n); end
      img[n] = g;
    end
    checks++;
    if (m_not_emb == 0) begin
      // the 97 % frame almost surely has non-embeddable sub frames
      failures++; $display("FAIL no sub frame was left unembedded");
    end

    // 2. placement and upsets
    for (int n = 0; n < 4; n++) put(place[n], img[n]);
    c = img[0]; c[1500] ^= 1;                               put(3, c);
    c = img[1]; for (int i = 0; i < 4; i++) c[333 + i] ^= 1; put(9000, c);
    // frame 20000: pick a not-embedded and an embedded sub frame of img[2]
    ne_sub = -1; e_sub = -1;
    for (int j = 0; j < PHI; j++) begin
      if (img[2][TRACK_LSB + j] && ne_sub < 0) ne_sub = j;
      if (!img[2][TRACK_LSB + j] && e_sub < 0) e_sub = j;
    end
    c = img[2];
    if (ne_sub >= 0) begin c[pos_of[ne_sub][5]] ^= 1; c[pos_of[ne_sub][9]] ^= 1; end
    if (e_sub >= 0) c[pos_of[e_sub][77]] ^= 1;
    put(20000, c);
    img[2] = c;                                       // expected: only the embedded one repaired
    if (e_sub >= 0) img[2][pos_of[e_sub][77]] ^= 1;
    // frame 28463: indices 128 and 72 of an embedded sub frame -> syndrome 200
    e_sub = 0;
    while (img[3][TRACK_LSB + e_sub]) e_sub++;
    c = img[3]; c[pos_of[e_sub][128]] ^= 1; c[pos_of[e_sub][72]] ^= 1;
    put(28463, c);
    img[3] = c;                                       // cannot be repaired
    u_mem.mem[100 * FRAME_WORDS + 10] = 32'h0000_0100;
    u_mem.mem[28000 * FRAME_WORDS + 80] = 32'h8000_0000;

    // 3. one scrub pass
    @(negedge clk); scrub_en = 1;
    wait (scrub_pass_done);
    frames_at_pass = cnt_frames;
    m_wb    = cnt_writeback;
    m_unc   = cnt_uncorrectable;
    m_skip  = cnt_skipped;
    m_clean = cnt_frames - cnt_writeback;
    @(negedge clk); scrub_en = 0;
    repeat (400) @(negedge clk);

    // memory image
    bad = 0;
    for (int fr = 0; fr < NF; fr++) begin
      int slot;
      slot = -1;
      for (int n = 0; n < 4; n++) if (place[n] == fr) slot = n;
      for (int w = 0; w < FRAME_WORDS; w++) begin
        logic [31:0] e;
        e = (slot >= 0) ? img[slot][w*WORD_W +: WORD_W] : 32'h0;
        if (u_mem.mem[fr*FRAME_WORDS + w] != e) begin
          bad++;
          if (bad < 5) $display("FAIL frame %0d word %0d: %h expected %h", fr, w,
                                u_mem.mem[fr*FRAME_WORDS + w], e);
        end
      end
    end
    checks++; if (bad != 0) failures++;
    checks++;
    if (frames_at_pass != NF) begin failures++; $display("FAIL frames %0d", frames_at_pass); end
    checks++;
    if (cnt_corrected != 1 + 4 + 1 + 1 + 1) begin
      failures++; $display("FAIL corrected %0d", cnt_corrected);
    end
    checks++;
    if (m_wb != 5) begin failures++; $display("FAIL write-backs %0d", m_wb); end
    checks++;
    if (m_unc != 1) begin failures++; $display("FAIL uncorrectable %0d", m_unc); end
    checks++;
    if (m_skip != $countones(img[0][TRACK_LSB +: PHI]) + $countones(img[1][TRACK_LSB +: PHI]) +
                 $countones(img[2][TRACK_LSB +: PHI]) + $countones(img[3][TRACK_LSB +: PHI])) begin
      failures++; $display("FAIL skipped %0d", m_skip);
    end

    $display("mechanisms: embed=%0d not_embeddable=%0d single=%0d burst=%0d uncorrectable=%0d",
             m_embed, m_not_emb, m_sbu, m_burst, m_unc);
    $display("            skipped=%0d writeback=%0d clean=%0d stall=%0d wrap=%0d",
             m_skip, m_wb, m_clean, m_stall, m_wrap);
    checks++; if (m_embed == 0)   begin failures++; $display("FAIL mechanism embed never seen"); end
    checks++; if (m_not_emb == 0) begin failures++; $display("FAIL mechanism not-embeddable never seen"); end
    checks++; if (m_sbu == 0)     begin failures++; $display("FAIL mechanism single correction never seen"); end
    checks++; if (m_burst == 0)   begin failures++; $display("FAIL mechanism burst correction never seen"); end
    checks++; if (m_unc == 0)     begin failures++; $display("FAIL mechanism uncorrectable never seen"); end
    checks++; if (m_skip == 0)    begin failures++; $display("FAIL mechanism skip never seen"); end
    checks++; if (m_wb == 0)      begin failures++; $display("FAIL mechanism write-back never seen"); end
    checks++; if (m_clean == 0)   begin failures++; $display("FAIL mechanism clean frame never seen"); end
    checks++; if (m_stall == 0)   begin failures++; $display("FAIL mechanism stall never seen"); end
    checks++; if (m_wrap == 0)    begin failures++; $display("FAIL mechanism wrap never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
