// tb_error_campaign: upset-injection campaigns over a whole device at the
// default sizes (28,464 frames of 2,592 bits, 13 sub frames).
// Every frame is filled with random data made Hamming compliant by the
// reference model. Two campaigns follow, each ended by one complete scrub pass:
//   A  5,000 single-bit upsets at random positions
//   B  2,000 bursts of 4 adjacent upset bits at random positions
// The result is predicted independently, sub frame by sub frame: the
// reference computes each corrupted sub frame's syndrome; a syndrome naming a
// bit of the sub frame flips that bit (the true one for a lone upset, a wrong
// one when several upsets alias), any other non-zero syndrome leaves the sub
// frame as it is. The memory must match the prediction word for word, the
// corrected-bit counter must match, and the share of injected upsets that were
// repaired must exceed 90 %.
module tb_error_campaign;
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
  cfg_mem_model #(.NFRAMES(NF), .STALL(5)) u_mem (
    .clk, .cmd_valid(cfg_cmd_valid), .cmd_ready(cfg_cmd_ready), .cmd_write(cfg_cmd_write),
    .cmd_frame(cfg_cmd_frame), .rvalid(cfg_rvalid), .rdata(cfg_rdata),
    .wvalid(cfg_wvalid), .wready(cfg_wready), .wdata(cfg_wdata));
  always #5 clk = ~clk;

  bit hit [NF];          // frames touched by the current campaign
  frame_t clean_img [int];   // golden contents of touched frames

  function automatic frame_t get(int fr);
    frame_t f;
    for (int w = 0; w < FRAME_WORDS; w++) f[w*WORD_W +: WORD_W] = u_mem.mem[fr*FRAME_WORDS + w];
    return f;
  endfunction

  function automatic void put(int fr, frame_t f);
    for (int w = 0; w < FRAME_WORDS; w++) u_mem.mem[fr*FRAME_WORDS + w] = f[w*WORD_W +: WORD_W];
  endfunction

  task automatic campaign(string name, int events, int burst);
    int injected, repaired, predicted_fixes, bad;
    int c0;
    frame_t expect_img [int];
    clean_img.delete();
    for (int fr = 0; fr < NF; fr++) hit[fr] = 0;
    injected = 0;
    for (int e = 0; e < events; e++) begin
      int fr, k;
      frame_t f;
      fr = $urandom_range(NF - 1);
      k  = $urandom_range(KAPPA - burst);
      if (!hit[fr]) begin hit[fr] = 1; clean_img[fr] = get(fr); end
      f = get(fr);
      for (int i = 0; i < burst; i++) f[k + i] = ~f[k + i];
      put(fr, f);
      injected += burst;
    end
    // prediction
    predicted_fixes = 0;
    repaired = 0;
    foreach (clean_img[fr]) begin
      frame_t f, g;
      f = get(fr);
      g = f;
      for (int j = 0; j < PHI; j++) begin
        int s;
        s = syndrome(f, j);
        if (!f[TRACK_LSB + j] && s != 0 && s <= size_of[j]) begin
          g[pos_of[j][s]] = ~g[pos_of[j][s]];
          predicted_fixes++;
        end
      end
      expect_img[fr] = g;
      for (int k = 0; k < KAPPA; k++) if (f[k] != clean_img[fr][k] && g[k] == clean_img[fr][k]) repaired++;
    end
    // one scrub pass
    c0 = cnt_corrected;
    @(negedge clk); scrub_en = 1;
    @(posedge scrub_pass_done);
    @(negedge clk); scrub_en = 0;
    checks++;
    if (cnt_corrected - c0 != predicted_fixes) begin
      failures++;
      $display("FAIL %s: %0d corrections, %0d predicted", name, cnt_corrected - c0, predicted_fixes);
    end
    // let a started read of frame 0 finish
    repeat (400) @(negedge clk);
    bad = 0;
    foreach (expect_img[fr]) if (get(fr) != expect_img[fr]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d frames differ from prediction", name, bad); end
    checks++;
    if (repaired * 10 <= injected * 9) begin
      failures++; $display("FAIL %s: only %0d of %0d upsets repaired", name, repaired, injected);
    end
    $display("%s: %0d upset bits in %0d frames, %0d repaired (%0d.%0d %%), %0d corrections",
             name, injected, clean_img.num(), repaired, repaired * 100 / injected,
             (repaired * 1000 / injected) % 10, cnt_corrected - c0);
    // restore the golden image for the next campaign
    foreach (clean_img[fr]) put(fr, clean_img[fr]);
  endtask

  initial begin
    init();
    for (int fr = 0; fr < NF; fr++) begin
      frame_t f;
      f = make_compliant(random_frame());
      f[TRACK_LSB +: PHI] = '0;
      put(fr, f);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    campaign("SBU campaign", 5000, 1);
    campaign("MBU campaign", 2000, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
