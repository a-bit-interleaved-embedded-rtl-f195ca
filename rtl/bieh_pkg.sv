// bieh_pkg: shared sizes and helper functions of the bit-interleaved embedded
// Hamming scrubbing scheme.
//
// A configuration frame of KAPPA = FRAME_WORDS * WORD_W bits is split round-robin
// into PHI sub frames. PHI consecutive frame bits (the tracking field, starting
// at bit TRACK_LSB) are kept out of the sub frames: bit j of that field is set
// when sub frame j could not be made Hamming compliant. The remaining
// NPAY = KAPPA - PHI "payload" bits are numbered p = 0 .. NPAY-1 in frame order;
// payload bit p belongs to sub frame p % PHI and sits at Hamming index
// ix = p / PHI + 1 (1-based, like the column numbers of the check matrix).
// The check matrix column of index ix is the binary value of ix, so the
// syndrome of a sub frame is the XOR of the indices of its set bits, and a
// compliant sub frame has syndrome 0.
//
// Defaults: 81 words of 32 bits per frame, 13 sub frames and 28,464 frames are
// the Virtex-6 XC6VLX240T figures the scheme was evaluated with. The position
// of the tracking field (word 40, bits 0..12) is this design's own choice.
package bieh_pkg;

  localparam int unsigned WORD_W      = 32;
  localparam int unsigned FRAME_WORDS = 81;
  localparam int unsigned KAPPA       = WORD_W * FRAME_WORDS;  // 2592 bits
  localparam int unsigned PHI         = 13;                    // sub frames per frame
  localparam int unsigned TRACK_LSB   = 40 * WORD_W;           // first tracking bit
  localparam int unsigned NFRAMES     = 28464;                 // frames in the device

  // Number of payload bits of sub frame j.
  function automatic int unsigned sub_size(int unsigned kappa, int unsigned phi,
                                           int unsigned j);
    int unsigned npay;
    npay = kappa - phi;
    return npay / phi + ((j < npay % phi) ? 1 : 0);
  endfunction

  // Largest sub frame.
  function automatic int unsigned sub_max(int unsigned kappa, int unsigned phi);
    return sub_size(kappa, phi, 0);
  endfunction

  // Number of check bits: the smallest d with d + k + 1 <= 2**d.
  function automatic int unsigned calc_delta(int unsigned k);
    int unsigned d;
    d = 1;
    while ((d + k + 1) > (1 << d)) d++;
    return d;
  endfunction

  // Frame bit position of payload bit p.
  function automatic int unsigned pay_to_frame(int unsigned p, int unsigned track_lsb,
                                               int unsigned phi);
    return (p >= track_lsb) ? p + phi : p;
  endfunction

  localparam int unsigned SUB_MAX = sub_max(KAPPA, PHI);   // 199
  localparam int unsigned DELTA   = calc_delta(SUB_MAX);   // 8

endpackage
