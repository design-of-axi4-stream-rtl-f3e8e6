// bpsk_mod: BPSK constellation look-up table.
//
// Maps one data bit to a complex subcarrier sample and also gives its complex
// conjugate, which the caller writes to the mirrored (Hermitian) subcarrier.
// Constellation: bit 0 -> +1, bit 1 -> -1, imaginary part zero.
// BPSK is real, so the imaginary half of both outputs is always zero.
// Purely combinational. The bit-to-point mapping is the one of the document's
// constellation diagram; the amplitude AMP of a unit level and the
// {imag, real} 16/16 packing are this design's choice.
module bpsk_mod
  import vlc_mod_pkg::*;
#(
  parameter int AMP = 1  // value of one constellation unit
) (
  input  logic        data_in,    // bit to map
  output logic [31:0] data_mod,   // {im, re} of the symbol
  output logic [31:0] data_conj   // {im, re} of its conjugate
);
  cplx_t sym;

  always_comb begin
    sym.re = data_in ? 16'(-AMP) : 16'(AMP);
    sym.im = '0;
  end

  assign data_mod  = sym;
  assign data_conj = conj(sym);
endmodule
