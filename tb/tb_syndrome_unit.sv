// tb_syndrome_unit: feeds random frames word by word, with random idle cycles
// between words, and compares every sub frame syndrome and the tracking bits
// with the reference model. Also checks frame_done, that words after the
// frame are ignored, and that clear empties the result. Default sizes.
module tb_syndrome_unit;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [31:0] in_word = 0;
  logic [PHI-1:0][7:0] syndrome;
  logic [PHI-1:0] track;
  logic frame_done;
  int checks = 0, failures = 0;

  syndrome_unit dut (.*);
  always #5 clk = ~clk;

  task automatic send_frame(frame_t f);
    for (int w = 0; w < FRAME_WORDS; w++) begin
      while ($urandom_range(3) == 0) begin
        @(negedge clk); in_valid = 0; in_word = $urandom;
      end
      @(negedge clk); in_valid = 1; in_word = f[w*WORD_W +: WORD_W];
    end
    @(negedge clk); in_valid = 0;
  endtask

  task automatic check_frame(frame_t f);
    checks++;
    if (!frame_done) begin failures++; $display("FAIL frame_done low"); end
    for (int j = 0; j < PHI; j++) begin
      checks++;
      if (int'(syndrome[j]) != tb_ref_pkg::syndrome(f, j)) begin
        failures++;
        $display("FAIL sub %0d syndrome %0d expected %0d", j, syndrome[j],
                 tb_ref_pkg::syndrome(f, j));
      end
    end
    checks++;
    if (track != f[TRACK_LSB +: PHI]) begin failures++; $display("FAIL track"); end
  endtask

  initial begin
    frame_t f;
    init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      f = random_frame();
      if (n % 4 == 1) f = make_compliant(f);
      if (n % 4 == 2) begin
        f = make_compliant(f);
        f[$urandom_range(KAPPA - 1)] ^= 1'b1;   // single upset
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      checks++;
      if (frame_done || syndrome != '0 || track != '0) begin
        failures++; $display("FAIL clear");
      end
      send_frame(f);
      check_frame(f);
      if (n % 4 == 1) begin
        checks++;
        if (syndrome != '0) begin failures++; $display("FAIL compliant frame"); end
      end
      // extra words after the frame must not change anything
      @(negedge clk); in_valid = 1; in_word = 32'hffff_ffff;
      @(negedge clk); in_valid = 0;
      check_frame(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
