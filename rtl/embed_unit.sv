// embed_unit: makes every sub frame of a configuration frame Hamming compliant
// by choosing the values of its non-essential bits.
//
// Input: a frame and its mask (mask bit 1 = essential bit, whose value must be
// kept; 0 = non-essential bit, free to be overwritten). For each of the PHI
// sub frames in turn the unit solves the binary linear system "syndrome of the
// whole sub frame = 0" for the non-essential bits:
//   SCAN   one payload bit per cycle, in Hamming index order ix = 1, 2, ...
//          Essential ones are XORed into the target b (the syndrome the
//          non-essential bits must cancel). The index of every non-essential
//          bit is inserted into a GF(2) basis kept in echelon form: basis row l
//          has its leading one at bit l and remembers, as a bit vector over the
//          sub frame's indices, which non-essential bits XOR to it.
//   SOLVE  one cycle: b is reduced by the basis rows from the top bit down;
//          the XOR of the used rows' index sets is the solution. If b cannot be
//          reduced to zero the sub frame is not embeddable.
//   WRITE  one payload bit per cycle: each non-essential bit takes its
//          solution value (0 for bits left out of the solution, and 0 for all
//          of them when the sub frame is not embeddable).
// A sub frame that cannot be embedded gets its tracking bit (frame bit
// TRACK_LSB + j) set to 1; embeddable ones get 0. Free non-essential bits stay 0.
//
// Interface: start (one cycle, while idle) loads frame_in and mask_in; busy is
// high while working; done pulses for one cycle when frame_out and
// not_embedded hold the result, which stays until the next start.
// Timing: 2 * size(j) + 1 cycles per sub frame j, i.e. 2 * (KAPPA - PHI) + PHI
// cycles per frame (5,171 at the default sizes), plus one cycle to finish.
//
// The equation system, the choice of zero for the free bits and the tracking
// of non-embedded sub frames follow the scheme. In the scheme this step runs
// in software after bitstream generation; the sequential echelon-basis solver
// is this design's own way of doing it in hardware.
module embed_unit #(
  parameter int unsigned WORD_W      = bieh_pkg::WORD_W,
  parameter int unsigned FRAME_WORDS = bieh_pkg::FRAME_WORDS,
  parameter int unsigned PHI         = bieh_pkg::PHI,
  parameter int unsigned TRACK_LSB   = bieh_pkg::TRACK_LSB,
  localparam int unsigned KAPPA      = WORD_W * FRAME_WORDS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [KAPPA-1:0] frame_in,
  input  logic [KAPPA-1:0] mask_in,
  output logic             busy,
  output logic             done,
  output logic [KAPPA-1:0] frame_out,
  output logic [PHI-1:0]   not_embedded
);

  localparam int unsigned SUB_MAX = bieh_pkg::sub_max(KAPPA, PHI);
  localparam int unsigned DELTA   = bieh_pkg::calc_delta(SUB_MAX);
  localparam int unsigned SUB_W   = (PHI > 1) ? $clog2(PHI) : 1;
  localparam int unsigned P_W     = $clog2(KAPPA + PHI + 1);
  localparam int unsigned K_W     = $clog2(KAPPA);

  typedef enum logic [1:0] {E_IDLE, E_SCAN, E_SOLVE, E_WRITE} state_e;

  state_e                           state;
  logic [KAPPA-1:0]                 frm_q, msk_q;
  logic [PHI-1:0]                   trk_q;
  logic [SUB_W-1:0]                 sub_q;
  logic [DELTA-1:0]                 ix_q;       // Hamming index, 1-based
  logic [P_W-1:0]                   p_q;        // payload bit number
  logic [DELTA-1:0]                 b_q;        // target syndrome
  logic [DELTA-1:0]                 bvalid_q;
  logic [DELTA-1:0][DELTA-1:0]      bv_q;       // basis rows
  logic [DELTA-1:0][SUB_MAX-1:0]    bm_q;       // index sets of basis rows
  logic [SUB_MAX-1:0]               sol_q;
  logic                             ok_q;
  logic                             done_q;

  logic [K_W-1:0] k;       // frame bit of the current payload bit
  logic        last_ix;    // current index is the last of the sub frame

  always_comb begin
    k       = K_W'(bieh_pkg::pay_to_frame(int'(p_q), TRACK_LSB, PHI));
    last_ix = (int'(ix_q) == bieh_pkg::sub_size(KAPPA, PHI, int'(sub_q)));
  end

  // Insertion of the current index into the basis.
  logic                 ins_place;
  logic [DELTA-1:0]     ins_lvl;   // one-hot row to fill
  logic [DELTA-1:0]     ins_v;
  logic [SUB_MAX-1:0]   ins_m;

  always_comb begin
    ins_v     = ix_q;
    ins_m     = '0;
    ins_m[int'(ix_q) - 1] = 1'b1;
    ins_place = 1'b0;
    ins_lvl   = '0;
    for (int l = DELTA - 1; l >= 0; l--) begin
      if (!ins_place && ins_v[l]) begin
        if (bvalid_q[l]) begin
          ins_v = ins_v ^ bv_q[l];
          ins_m = ins_m ^ bm_q[l];
        end else begin
          ins_place  = 1'b1;
          ins_lvl[l] = 1'b1;
        end
      end
    end
  end

  // Reduction of the target syndrome by the basis.
  logic [DELTA-1:0]   red_r;
  logic [SUB_MAX-1:0] red_s;

  always_comb begin
    red_r = b_q;
    red_s = '0;
    for (int l = DELTA - 1; l >= 0; l--) begin
      if (red_r[l] && bvalid_q[l]) begin
        red_r = red_r ^ bv_q[l];
        red_s = red_s ^ bm_q[l];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= E_IDLE;
      frm_q    <= '0;
      msk_q    <= '0;
      trk_q    <= '0;
      sub_q    <= '0;
      ix_q     <= DELTA'(1);
      p_q      <= '0;
      b_q      <= '0;
      bvalid_q <= '0;
      bv_q     <= '0;
      bm_q     <= '0;
      sol_q    <= '0;
      ok_q     <= 1'b0;
      done_q   <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (state)
        E_IDLE: if (start) begin
          frm_q    <= frame_in;
          msk_q    <= mask_in;
          trk_q    <= '0;
          sub_q    <= '0;
          ix_q     <= DELTA'(1);
          p_q      <= '0;
          b_q      <= '0;
          bvalid_q <= '0;
          state    <= E_SCAN;
        end
        E_SCAN: begin
          if (msk_q[k]) begin
            if (frm_q[k]) b_q <= b_q ^ ix_q;
          end else if (ins_place) begin
            for (int l = 0; l < DELTA; l++) begin
              if (ins_lvl[l]) begin
                bvalid_q[l] <= 1'b1;
                bv_q[l]     <= ins_v;
                bm_q[l]     <= ins_m;
              end
            end
          end
          if (last_ix) state <= E_SOLVE;
          else begin
            ix_q <= ix_q + 1'b1;
            p_q  <= p_q + P_W'(PHI);
          end
        end
        E_SOLVE: begin
          sol_q         <= red_s;
          ok_q          <= (red_r == '0);
          trk_q[sub_q]  <= (red_r != '0);
          ix_q          <= DELTA'(1);
          p_q           <= P_W'(sub_q);
          state         <= E_WRITE;
        end
        E_WRITE: begin
          if (!msk_q[k]) frm_q[k] <= ok_q & sol_q[int'(ix_q) - 1];
          if (last_ix) begin
            ix_q     <= DELTA'(1);
            b_q      <= '0;
            bvalid_q <= '0;
            if (sub_q == SUB_W'(PHI - 1)) begin
              done_q <= 1'b1;
              state  <= E_IDLE;
            end else begin
              sub_q <= sub_q + 1'b1;
              p_q   <= P_W'(sub_q) + 1'b1;
              state <= E_SCAN;
            end
          end else begin
            ix_q <= ix_q + 1'b1;
            p_q  <= p_q + P_W'(PHI);
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  always_comb begin
    frame_out = frm_q;
    frame_out[TRACK_LSB +: PHI] = trk_q;
  end

  assign not_embedded = trk_q;
  assign busy         = (state != E_IDLE);
  assign done         = done_q;

endmodule
