// tb_ref_pkg: reference model used by the testbenches, written without the
// RTL's arithmetic. It walks the frame bit by bit, skips the tracking field and
// deals the remaining bits round-robin to the sub frames, building a table
// from (sub frame, Hamming index) to frame bit. Syndromes are the XOR of the
// indices of the set bits. make_compliant() turns any frame into one whose sub
// frames all have syndrome 0 by flipping the bits at power-of-two indices.
// Sizes are the design defaults.
package tb_ref_pkg;
  localparam int WORD_W = 32, FRAME_WORDS = 81, PHI = 13, TRACK_LSB = 1280;
  localparam int KAPPA = WORD_W * FRAME_WORDS;
  localparam int MAXIX = 256;
  typedef logic [KAPPA-1:0] frame_t;

  int pos_of [PHI][MAXIX];   // frame bit of (sub frame, index), -1 if none
  int sub_of [KAPPA];        // sub frame of a frame bit, -1 for tracking bits
  int ix_of  [KAPPA];        // Hamming index of a frame bit
  int size_of[PHI];

  function automatic void init();
    int p;
    p = 0;
    for (int j = 0; j < PHI; j++) begin
      size_of[j] = 0;
      for (int i = 0; i < MAXIX; i++) pos_of[j][i] = -1;
    end
    for (int k = 0; k < KAPPA; k++) begin
      if (k >= TRACK_LSB && k < TRACK_LSB + PHI) begin
        sub_of[k] = -1;
        ix_of[k]  = 0;
      end else begin
        sub_of[k] = p % PHI;
        ix_of[k]  = p / PHI + 1;
        pos_of[sub_of[k]][ix_of[k]] = k;
        size_of[sub_of[k]]++;
        p++;
      end
    end
  endfunction

  function automatic int syndrome(frame_t f, int j);
    int s;
    s = 0;
    for (int i = 1; i <= size_of[j]; i++) if (f[pos_of[j][i]]) s ^= i;
    return s;
  endfunction

  function automatic frame_t make_compliant(frame_t f);
    frame_t g;
    g = f;
    for (int j = 0; j < PHI; j++) begin
      int s;
      s = syndrome(g, j);
      for (int t = 0; t < 8; t++) if (s[t]) g[pos_of[j][1 << t]] = ~g[pos_of[j][1 << t]];
    end
    return g;
  endfunction

  function automatic frame_t random_frame();
    frame_t f;
    for (int w = 0; w < FRAME_WORDS; w++) f[w*WORD_W +: WORD_W] = $urandom;
    return f;
  endfunction
endpackage
