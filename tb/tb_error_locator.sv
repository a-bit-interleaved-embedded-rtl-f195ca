// tb_error_locator: exhaustive check of the syndrome-to-position mapping.
//
// For every sub frame and every syndrome value the expected result is found
// independently: the testbench walks all frame bits in order, skipping the
// tracking field, and counts payload bits, so it knows which (sub frame, index)
// each frame bit carries. A syndrome is correctable exactly when such a bit
// exists; then word and bit must match. Tracked (not embedded) sub frames must
// report neither error nor correctable. Default sizes are used.
module tb_error_locator;
  localparam int unsigned WORD_W = 32, FRAME_WORDS = 81, PHI = 13, TRACK_LSB = 1280;
  localparam int unsigned KAPPA = WORD_W * FRAME_WORDS;
  localparam int unsigned DELTA = 8;

  logic [3:0]       sub;
  logic [DELTA-1:0] syndrome;
  logic             not_embedded;
  logic             error, correctable;
  logic [6:0]       word_addr;
  logic [4:0]       bit_sel;

  error_locator dut (.*);

  int checks = 0, failures = 0;
  int pos_of [PHI][256];   // frame bit of (sub, ix), -1 if none

  initial begin
    int p;
    p = 0;
    for (int j = 0; j < PHI; j++) for (int i = 0; i < 256; i++) pos_of[j][i] = -1;
    for (int k = 0; k < KAPPA; k++) begin
      if (k >= TRACK_LSB && k < TRACK_LSB + PHI) continue;
      pos_of[p % PHI][p / PHI + 1] = k;
      p++;
    end
    for (int j = 0; j < PHI; j++) begin
      for (int s = 0; s < 256; s++) begin
        for (int t = 0; t < 2; t++) begin
          sub = 4'(j); syndrome = 8'(s); not_embedded = t[0];
          #1;
          checks++;
          if (t == 1) begin
            if (error || correctable) failures++;
          end else if (s == 0) begin
            if (error || correctable) failures++;
          end else if (pos_of[j][s] < 0) begin
            if (!error || correctable) begin
              failures++;
              $display("FAIL sub %0d syn %0d should be uncorrectable", j, s);
            end
          end else begin
            if (!error || !correctable || int'(word_addr) != pos_of[j][s] / 32 ||
                int'(bit_sel) != pos_of[j][s] % 32) begin
              failures++;
              $display("FAIL sub %0d syn %0d -> %0d/%0d expected bit %0d", j, s,
                       word_addr, bit_sel, pos_of[j][s]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
