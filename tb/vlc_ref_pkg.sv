// vlc_ref_pkg: reference model for the modulator testbenches.
//
// Written independently of the RTL: the constellations are tables of
// (I, Q) levels read point by point from the constellation diagram, and the
// expected 64-word frame is built from a frame's input words by plain
// loops. A sample is {imag[15:0], real[15:0]} with one unit = amp.
package vlc_ref_pkg;

  // QAM-16 levels per point 0..15 (I, Q)
  localparam int QAM_I [16] = '{ 1, 1, 1, 1,  3, 3, 3, 3, -1,-1,-1,-1, -3,-3,-3,-3};
  localparam int QAM_Q [16] = '{ 1, 3,-1,-3,  1, 3,-1,-3,  1, 3,-1,-3,  1, 3,-1,-3};
  localparam int QPSK_I[4]  = '{ 1, 1,-1,-1};
  localparam int QPSK_Q[4]  = '{ 1,-1, 1,-1};

  function automatic logic [31:0] pack(int re, int im);
    logic [15:0] r, i;
    r = 16'(re);
    i = 16'(im);
    return {i, r};
  endfunction

  // point for value v under modulation m (0 BPSK, 1 QPSK, 2 QAM-16)
  function automatic logic [31:0] point(int m, int v, int amp, bit conjugate);
    int re, im;
    case (m)
      0: begin re = (v == 0) ? 1 : -1; im = 0; end
      1: begin re = QPSK_I[v]; im = QPSK_Q[v]; end
      default: begin re = QAM_I[v]; im = QAM_Q[v]; end
    endcase
    if (conjugate) im = -im;
    return pack(re * amp, im * amp);
  endfunction

  function automatic int bps_of(int m);
    return (m == 0) ? 1 : (m == 1) ? 2 : 4;
  endfunction

  // value of symbol s (0..30) from the frame words: stream bit j is
  // bit (j % 31) of word (j / 31)
  function automatic int sym_val(int m, logic [31:0] w [4], int s);
    int b = bps_of(m);
    int v = 0;
    for (int i = 0; i < b; i++) begin
      int j = s * b + i;
      v |= int'(w[j / 31][j % 31]) << i;
    end
    return v;
  endfunction

  // expected output word n (0..63)
  function automatic logic [31:0] expect_word(int m, logic [31:0] w [4], int n, int amp);
    if (n == 0 || n == 32) return 32'h0;
    if (n < 32) return point(m, sym_val(m, w, n - 1), amp, 1'b0);
    return point(m, sym_val(m, w, 64 - n - 1), amp, 1'b1);
  endfunction

endpackage
