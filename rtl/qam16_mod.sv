// qam16_mod: QAM-16 constellation look-up table.
//
// Maps a 4-bit value b3 b2 b1 b0 to a complex subcarrier sample and its
// complex conjugate. Levels are +-1 and +-3 units on each axis:
//   b3 = sign of I (1 = negative), b2 = |I| is 3,
//   b1 = sign of Q (1 = negative), b0 = |Q| is 3.
// This reproduces the document's constellation diagram point by point
// (0 at +1+j1, 5 at +3+j3, 10 at -1-j1, 15 at -3-j3, ...).
// Purely combinational. AMP and the {imag, real} 16/16 packing are this
// design's choice.
module qam16_mod
  import vlc_mod_pkg::*;
#(
  parameter int AMP = 1  // value of one constellation unit
) (
  input  logic [3:0]  data_in,
  output logic [31:0] data_mod,
  output logic [31:0] data_conj
);
  cplx_t sym;
  logic signed [15:0] mag_i, mag_q;

  always_comb begin
    mag_i  = data_in[2] ? 16'(3 * AMP) : 16'(AMP);
    mag_q  = data_in[0] ? 16'(3 * AMP) : 16'(AMP);
    sym.re = data_in[3] ? -mag_i : mag_i;
    sym.im = data_in[1] ? -mag_q : mag_q;
  end

  assign data_mod  = sym;
  assign data_conj = conj(sym);
endmodule
