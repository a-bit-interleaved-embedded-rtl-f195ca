// tb_embed_unit: checks the embedding engine in two ways.
//  1. The worked 15-bit example of the scheme (one sub frame, indices 1..15):
//     frame 100011000010010 with essential mask 101011001010010 must come out
//     as 100011100010010, i.e. only the non-essential bit at index 7 set.
//  2. Random frames at the default sizes with masks of rising density. For
//     every sub frame the testbench decides independently whether it can be
//     embedded (is the essential bits' syndrome reachable as an XOR of
//     non-essential indices? found by growing the set of reachable values) and
//     then checks: essential bits unchanged, tracking bit and not_embedded
//     equal to "not embeddable", syndrome 0 for embedded sub frames, all
//     non-essential bits 0 for the others, and the latency of
//     2 * (KAPPA - PHI) + PHI + 1 cycles from start to done.
module tb_embed_unit;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // small instance for the worked example
  logic        s_start = 0, s_busy, s_done;
  logic [15:0] s_in = 0, s_mask = 0, s_out;
  logic [0:0]  s_ne;
  embed_unit #(.WORD_W(16), .FRAME_WORDS(1), .PHI(1), .TRACK_LSB(15)) dut_small (
    .clk, .rst_n, .start(s_start), .frame_in(s_in), .mask_in(s_mask),
    .busy(s_busy), .done(s_done), .frame_out(s_out), .not_embedded(s_ne));

  // default instance
  logic         start = 0, busy, done;
  frame_t       frame_in = '0, mask_in = '0, frame_out;
  logic [PHI-1:0] not_embedded;
  embed_unit dut (.*);

  function automatic logic [14:0] from_ix(string s);
    logic [14:0] v;
    for (int i = 0; i < 15; i++) v[i] = (s[i] == "1");   // character i is index i+1
    return v;
  endfunction

  initial begin
    frame_t f, m, g;
    int lat;
    init();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. worked example; non-essential inputs are set to 1 to show they are replaced
    s_mask = {1'b0, from_ix("101011001010010")};
    s_in   = {1'b0, from_ix("100011000010010") | ~from_ix("101011001010010")};
    @(negedge clk); s_start = 1;
    @(negedge clk); s_start = 0;
    wait (s_done);
    @(negedge clk);
    checks++;
    if (s_out[14:0] != from_ix("100011100010010") || s_ne != 1'b0 || s_out[15] != 1'b0) begin
      failures++;
      $display("FAIL worked example: %b", s_out);
    end

    // 2. random frames
    for (int n = 0; n < 12; n++) begin
      int dens;
      dens = (n < 4) ? 50 : (n < 8) ? 90 : 97;
      f = random_frame();
      for (int k = 0; k < KAPPA; k++) m[k] = ($urandom_range(99) < dens);
      @(negedge clk); frame_in = f; mask_in = m; start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      g = frame_out;
      checks++;
      if (lat != 2 * (KAPPA - PHI) + PHI + 1) begin
        failures++; $display("FAIL latency %0d", lat);
      end
      for (int k = 0; k < KAPPA; k++) begin
        if (sub_of[k] >= 0 && m[k] && g[k] != f[k]) begin
          failures++; $display("FAIL essential bit %0d changed", k);
        end
      end
      checks++;
      for (int j = 0; j < PHI; j++) begin
        bit reach [256];
        int b;
        bit can;
        for (int v = 0; v < 256; v++) reach[v] = (v == 0);
        b = 0;
        for (int i = 1; i <= size_of[j]; i++) begin
          int k;
          k = pos_of[j][i];
          if (m[k]) begin
            if (f[k]) b ^= i;
          end else begin
            bit nr [256];
            nr = reach;
            for (int v = 0; v < 256; v++) if (reach[v]) nr[v ^ i] = 1;
            reach = nr;
          end
        end
        can = reach[b];
        checks++;
        if (not_embedded[j] != !can || g[TRACK_LSB + j] != !can) begin
          failures++;
          $display("FAIL frame %0d sub %0d embeddable=%0d flag=%0d", n, j, can, not_embedded[j]);
        end
        checks++;
        if (can && syndrome(g, j) != 0) begin
          failures++; $display("FAIL sub %0d not compliant", j);
        end
        if (!can) begin
          checks++;
          for (int i = 1; i <= size_of[j]; i++)
            if (!m[pos_of[j][i]] && g[pos_of[j][i]]) begin
              failures++; $display("FAIL sub %0d free bit set", j); break;
            end
        end
      end
      $display("frame %0d density %0d%%: %0d of %0d sub frames not embeddable", n, dens,
               $countones(not_embedded), PHI);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
