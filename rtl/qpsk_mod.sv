// qpsk_mod: QPSK constellation look-up table.
//
// Maps a 2-bit value to a complex subcarrier sample and its complex conjugate.
// Constellation (value: I, Q): 0: +1,+1  1: +1,-1  2: -1,+1  3: -1,-1,
// i.e. bit 1 is the sign of I and bit 0 the sign of Q (1 = negative).
// Purely combinational. The mapping follows the document's constellation
// diagram; AMP and the {imag, real} 16/16 packing are this design's choice.
module qpsk_mod
  import vlc_mod_pkg::*;
#(
  parameter int AMP = 1  // value of one constellation unit
) (
  input  logic [1:0]  data_in,
  output logic [31:0] data_mod,
  output logic [31:0] data_conj
);
  cplx_t sym;

  always_comb begin
    sym.re = data_in[1] ? 16'(-AMP) : 16'(AMP);
    sym.im = data_in[0] ? 16'(-AMP) : 16'(AMP);
  end

  assign data_mod  = sym;
  assign data_conj = conj(sym);
endmodule
