// scrubber: readback scrubber of the bit-interleaved embedded Hamming scheme.
//
// While scrub_en is high it walks the configuration frames 0 .. NFRAMES-1 and
// starts over. For each frame it
//   1. issues a read command on the configuration port and receives
//      FRAME_WORDS words, storing them in a frame buffer and feeding them to
//      the syndrome unit (one syndrome per sub frame, plus the PHI tracking bits);
//   2. checks the sub frames one per cycle: a sub frame whose tracking bit is
//      set was not embedded and is skipped; a non-zero syndrome that names a
//      bit of the sub frame is corrected by a read-modify-write of one buffer
//      word; any other non-zero syndrome counts as uncorrectable;
//   3. writes the frame back through the configuration port only when at
//      least one bit was corrected.
// Because neighbouring frame bits fall into different sub frames, a burst of up
// to PHI adjacent upsets leaves at most one error per sub frame and is repaired
// in one pass.
//
// Configuration port (this design's own protocol, a frame-level command plus
// word streams):
//   cmd_valid/cmd_ready/cmd_write/cmd_frame  one command per frame transfer
//   rvalid/rdata   after a read command the port returns FRAME_WORDS words, in
//                  order, with gaps allowed; the scrubber always accepts them
//   wvalid/wready/wdata  after a write command the scrubber sends FRAME_WORDS
//                  words; a word is taken when wvalid and wready are both high
// Status: counters of corrected bits, uncorrectable sub frames, skipped (not
// embedded) sub frames, written-back frames and scanned frames; pass_done pulses
// when frame NFRAMES-1 has been finished; fix_* report each correction.
//
// Timing per frame: 1 cycle command (plus waiting for cmd_ready), FRAME_WORDS
// read cycles (plus gaps), PHI check cycles, 1 extra cycle per corrected bit,
// and when written back 1 command cycle plus 2 cycles per word, then 1 cycle to
// move to the next frame.
//
// Readback, sub frame decoding, correction and write-back follow the scheme;
// the port protocol, the counters and write-back only of corrected frames are
// this design's choices.
module scrubber #(
  parameter int unsigned WORD_W      = bieh_pkg::WORD_W,
  parameter int unsigned FRAME_WORDS = bieh_pkg::FRAME_WORDS,
  parameter int unsigned PHI         = bieh_pkg::PHI,
  parameter int unsigned TRACK_LSB   = bieh_pkg::TRACK_LSB,
  parameter int unsigned NFRAMES     = bieh_pkg::NFRAMES,
  localparam int unsigned FA_W  = (NFRAMES > 1) ? $clog2(NFRAMES) : 1,
  localparam int unsigned WA_W  = (FRAME_WORDS > 1) ? $clog2(FRAME_WORDS) : 1,
  localparam int unsigned BS_W  = (WORD_W > 1) ? $clog2(WORD_W) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              scrub_en,
  // configuration port
  output logic              cmd_valid,
  input  logic              cmd_ready,
  output logic              cmd_write,
  output logic [FA_W-1:0]   cmd_frame,
  input  logic              rvalid,
  input  logic [WORD_W-1:0] rdata,
  output logic              wvalid,
  input  logic              wready,
  output logic [WORD_W-1:0] wdata,
  // status
  output logic [FA_W-1:0]   cur_frame,
  output logic              pass_done,
  output logic [31:0]       cnt_corrected,
  output logic [31:0]       cnt_uncorrectable,
  output logic [31:0]       cnt_skipped,
  output logic [31:0]       cnt_writeback,
  output logic [31:0]       cnt_frames,
  output logic              fix_valid,
  output logic [FA_W-1:0]   fix_frame,
  output logic [WA_W-1:0]   fix_word,
  output logic [BS_W-1:0]   fix_bit
);

  localparam int unsigned DELTA =
      bieh_pkg::calc_delta(bieh_pkg::sub_max(WORD_W * FRAME_WORDS, PHI));
  localparam int unsigned SUB_W = (PHI > 1) ? $clog2(PHI) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_CMD_RD, S_READ, S_CHECK, S_FIX, S_CMD_WR, S_WR_FETCH, S_WR_SEND, S_NEXT
  } state_e;

  state_e            state;
  logic [FA_W-1:0]   frame_q;
  logic [WA_W-1:0]   wcnt_q;
  logic [SUB_W-1:0]  sub_q;
  logic              dirty_q;
  logic [WA_W-1:0]   fix_word_q;
  logic [BS_W-1:0]   fix_bit_q;

  // syndrome unit
  logic                      syn_clear;
  logic [PHI-1:0][DELTA-1:0] syndrome;
  logic [PHI-1:0]            track;
  logic                      syn_done;

  syndrome_unit #(
    .WORD_W(WORD_W), .FRAME_WORDS(FRAME_WORDS), .PHI(PHI), .TRACK_LSB(TRACK_LSB),
    .DELTA(DELTA)
  ) u_syn (
    .clk, .rst_n,
    .clear     (syn_clear),
    .in_valid  (state == S_READ && rvalid),
    .in_word   (rdata),
    .syndrome,
    .track,
    .frame_done(syn_done)
  );

  // error locator, shared by all sub frames
  logic             loc_error, loc_correctable;
  logic [WA_W-1:0]  loc_word;
  logic [BS_W-1:0]  loc_bit;

  error_locator #(
    .WORD_W(WORD_W), .FRAME_WORDS(FRAME_WORDS), .PHI(PHI), .TRACK_LSB(TRACK_LSB),
    .DELTA(DELTA)
  ) u_loc (
    .sub         (sub_q),
    .syndrome    (syndrome[sub_q]),
    .not_embedded(track[sub_q]),
    .error       (loc_error),
    .correctable (loc_correctable),
    .word_addr   (loc_word),
    .bit_sel     (loc_bit)
  );

  // frame buffer
  logic              buf_we, buf_re;
  logic [WA_W-1:0]   buf_waddr, buf_raddr;
  logic [WORD_W-1:0] buf_wdata, buf_rdata;

  frame_buffer #(.WORD_W(WORD_W), .DEPTH(FRAME_WORDS)) u_buf (
    .clk,
    .we   (buf_we),
    .waddr(buf_waddr),
    .wdata(buf_wdata),
    .re   (buf_re),
    .raddr(buf_raddr),
    .rdata(buf_rdata)
  );

  wire last_word = (wcnt_q == WA_W'(FRAME_WORDS - 1));
  wire last_sub  = (sub_q == SUB_W'(PHI - 1));

  always_comb begin
    syn_clear = (state == S_CMD_RD);
    buf_we    = 1'b0;
    buf_waddr = wcnt_q;
    buf_wdata = rdata;
    buf_re    = 1'b0;
    buf_raddr = wcnt_q;
    unique case (state)
      S_READ: buf_we = rvalid;
      S_CHECK: begin
        buf_re    = loc_correctable;
        buf_raddr = loc_word;
      end
      S_FIX: begin
        buf_we    = 1'b1;
        buf_waddr = fix_word_q;
        buf_wdata = buf_rdata ^ (WORD_W'(1) << fix_bit_q);
      end
      S_WR_FETCH: buf_re = 1'b1;
      default: ;
    endcase
  end

  assign cmd_valid = (state == S_CMD_RD) || (state == S_CMD_WR);
  assign cmd_write = (state == S_CMD_WR);
  assign cmd_frame = frame_q;
  assign wvalid    = (state == S_WR_SEND);
  assign wdata     = buf_rdata;
  assign cur_frame = frame_q;
  assign fix_frame = frame_q;
  assign fix_word  = fix_word_q;
  assign fix_bit   = fix_bit_q;
  assign fix_valid = (state == S_FIX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= S_IDLE;
      frame_q           <= '0;
      wcnt_q            <= '0;
      sub_q             <= '0;
      dirty_q           <= 1'b0;
      fix_word_q        <= '0;
      fix_bit_q         <= '0;
      pass_done         <= 1'b0;
      cnt_corrected     <= '0;
      cnt_uncorrectable <= '0;
      cnt_skipped       <= '0;
      cnt_writeback     <= '0;
      cnt_frames        <= '0;
    end else begin
      pass_done <= 1'b0;
      unique case (state)
        S_IDLE: if (scrub_en) state <= S_CMD_RD;
        S_CMD_RD: if (cmd_ready) begin
          wcnt_q  <= '0;
          dirty_q <= 1'b0;
          state   <= S_READ;
        end
        S_READ: if (rvalid) begin
          wcnt_q <= wcnt_q + 1'b1;
          if (last_word) begin
            sub_q <= '0;
            state <= S_CHECK;
          end
        end
        S_CHECK: begin
          if (track[sub_q]) cnt_skipped <= cnt_skipped + 1;
          if (loc_correctable) begin
            fix_word_q <= loc_word;
            fix_bit_q  <= loc_bit;
            state      <= S_FIX;
          end else begin
            if (loc_error) cnt_uncorrectable <= cnt_uncorrectable + 1;
            if (last_sub) state <= dirty_q ? S_CMD_WR : S_NEXT;
            else          sub_q <= sub_q + 1'b1;
          end
        end
        S_FIX: begin
          cnt_corrected <= cnt_corrected + 1;
          dirty_q       <= 1'b1;
          if (last_sub) state <= S_CMD_WR;
          else begin
            sub_q <= sub_q + 1'b1;
            state <= S_CHECK;
          end
        end
        S_CMD_WR: if (cmd_ready) begin
          wcnt_q <= '0;
          state  <= S_WR_FETCH;
        end
        S_WR_FETCH: state <= S_WR_SEND;
        S_WR_SEND: if (wready) begin
          wcnt_q <= wcnt_q + 1'b1;
          if (last_word) begin
            cnt_writeback <= cnt_writeback + 1;
            state         <= S_NEXT;
          end else begin
            state <= S_WR_FETCH;
          end
        end
        S_NEXT: begin
          cnt_frames <= cnt_frames + 1;
          if (frame_q == FA_W'(NFRAMES - 1)) begin
            frame_q   <= '0;
            pass_done <= 1'b1;
          end else begin
            frame_q <= frame_q + 1'b1;
          end
          state <= scrub_en ? S_CMD_RD : S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Port rules: read data only arrives while a frame is being read, and a
  // write word is held stable until it is taken.
  a_rvalid_in_read: assert property (@(posedge clk) disable iff (!rst_n)
      rvalid |-> state == S_READ)
    else $error("read data outside a frame read");
  a_wdata_stable: assert property (@(posedge clk) disable iff (!rst_n)
      wvalid && !wready |=> wvalid && $stable(wdata))
    else $error("write word changed before it was taken");
  // The whole frame has reached the syndrome unit before the check starts.
  a_syn_complete: assert property (@(posedge clk) disable iff (!rst_n)
      state == S_CHECK |-> syn_done)
    else $error("check started on an incomplete frame");

endmodule
