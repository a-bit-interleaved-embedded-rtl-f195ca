// tb_scrubber: one scrub pass over eight frames of a configuration memory
// model (default frame size, NFRAMES reduced to 8), with random port stalls.
// Frames are made compliant by the reference model, then corrupted:
//   0 clean                         4 two upsets in one sub frame whose
//   1 one single-bit upset            syndrome points past its end
//   2 4-bit burst                   5 upsets in a sub frame marked not embedded
//   3 13-bit burst                  6 upset in the last word
//   7 burst of 4 straddling the tracking field
// After the pass the memory must hold the uncorrupted frames except where a
// fault cannot be repaired (frames 4 and 5 keep their upsets), the counters
// must match, only frames with corrections may have been written back, and
// every correction report must name a bit that was flipped.
module tb_scrubber;
  import tb_ref_pkg::*;
  localparam int NF = 8;

  logic clk = 0, rst_n = 0, scrub_en = 0;
  logic cmd_valid, cmd_ready, cmd_write, rvalid, wvalid, wready;
  logic [2:0] cmd_frame, cur_frame, fix_frame;
  logic [31:0] rdata, wdata;
  logic pass_done, fix_valid;
  logic [31:0] cnt_corrected, cnt_uncorrectable, cnt_skipped, cnt_writeback, cnt_frames;
  logic [6:0] fix_word;
  logic [4:0] fix_bit;
  int checks = 0, failures = 0;

  scrubber #(.NFRAMES(NF)) dut (.*);
  cfg_mem_model #(.NFRAMES(NF), .STALL(25)) u_mem (.*);
  always #5 clk = ~clk;

  frame_t good [NF], expect_f [NF];
  frame_t flips [NF];    // bits that were upset and are to be repaired

  function automatic frame_t read_mem(int fr);
    frame_t f;
    for (int w = 0; w < FRAME_WORDS; w++) f[w*WORD_W +: WORD_W] = u_mem.mem[fr*FRAME_WORDS + w];
    return f;
  endfunction

  task automatic flip(int fr, int k, bit repairable);
    expect_f[fr][k] = repairable ? good[fr][k] : ~good[fr][k];
    if (repairable) flips[fr][k] = 1'b1;
  endtask

  int n_fix = 0;
  int frames_at_pass, reads_at_pass;
  always @(posedge clk) if (rst_n && fix_valid) begin
    int k;
    k = int'(fix_word) * WORD_W + int'(fix_bit);
    n_fix++;
    checks++;
    if (!flips[fix_frame][k]) begin
      failures++; $display("FAIL correction of frame %0d bit %0d was not an upset", fix_frame, k);
    end
  end

  initial begin
    frame_t cur;
    int k0, ja, a, b;
    init();
    for (int fr = 0; fr < NF; fr++) begin
      good[fr] = make_compliant(random_frame());
      good[fr][TRACK_LSB +: PHI] = '0;
      expect_f[fr] = good[fr];
      flips[fr] = '0;
    end
    // frame 5: sub frame 3 not embedded (its contents are arbitrary)
    good[5][TRACK_LSB + 3] = 1'b1;
    expect_f[5] = good[5];
    for (int fr = 0; fr < NF; fr++) begin
      cur = good[fr];
      case (fr)
        1: begin k0 = 700;  cur[k0] ^= 1; flip(1, k0, 1); end
        2: begin k0 = 2000; for (int i = 0; i < 4; i++) begin cur[k0+i] ^= 1; flip(2, k0+i, 1); end end
        3: begin k0 = 13;   for (int i = 0; i < 13; i++) begin cur[k0+i] ^= 1; flip(3, k0+i, 1); end end
        4: begin
          // indices 128 and 72 of sub frame 6: 128 ^ 72 = 200, beyond 198 bits
          a = pos_of[6][128]; b = pos_of[6][72];
          cur[a] ^= 1; cur[b] ^= 1; flip(4, a, 0); flip(4, b, 0);
        end
        5: begin
          a = pos_of[3][10]; b = pos_of[3][50];
          cur[a] ^= 1; cur[b] ^= 1; flip(5, a, 0); flip(5, b, 0);
        end
        6: begin k0 = KAPPA - 1; cur[k0] ^= 1; flip(6, k0, 1); end
        7: begin
          for (int i = 0; i < 2; i++) begin cur[TRACK_LSB-1-i] ^= 1; flip(7, TRACK_LSB-1-i, 1); end
          for (int i = 0; i < 2; i++) begin cur[TRACK_LSB+PHI+i] ^= 1; flip(7, TRACK_LSB+PHI+i, 1); end
        end
        default: ;
      endcase
      for (int w = 0; w < FRAME_WORDS; w++) u_mem.mem[fr*FRAME_WORDS + w] = cur[w*WORD_W +: WORD_W];
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); scrub_en = 1;
    wait (pass_done);
    frames_at_pass = cnt_frames;
    reads_at_pass  = u_mem.reads;
    @(negedge clk); scrub_en = 0;
    repeat (300) @(negedge clk);

    for (int fr = 0; fr < NF; fr++) begin
      checks++;
      if (read_mem(fr) != expect_f[fr]) begin
        failures++; $display("FAIL frame %0d contents", fr);
      end
    end
    checks++;
    if (cnt_corrected != 1 + 4 + 13 + 1 + 4 || n_fix != 23) begin
      failures++; $display("FAIL corrected %0d", cnt_corrected);
    end
    checks++;
    if (cnt_uncorrectable != 1) begin failures++; $display("FAIL uncorrectable %0d", cnt_uncorrectable); end
    checks++;
    if (cnt_skipped != 1) begin failures++; $display("FAIL skipped %0d", cnt_skipped); end
    checks++;
    if (cnt_writeback != 5 || u_mem.writes != 5) begin
      failures++; $display("FAIL write-backs %0d/%0d", cnt_writeback, u_mem.writes);
    end
    checks++;
    if (frames_at_pass != NF || reads_at_pass != NF) begin
      failures++; $display("FAIL frames %0d reads %0d", frames_at_pass, reads_at_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
