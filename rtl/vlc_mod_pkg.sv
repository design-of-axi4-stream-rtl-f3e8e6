// vlc_mod_pkg: types and constants shared by the DCO-OFDM symbol modulator.
//
// The modulator fills the 64 input subcarriers of an IFFT for DCO-OFDM:
// X0 and X32 are zero, X1..X31 carry one BPSK, QPSK or QAM-16 symbol each,
// and X33..X63 carry the complex conjugates of X31..X1 (Hermitian symmetry),
// so that the IFFT output is real. Every AXI4-Stream word is 32 bits wide.
//
// A subcarrier sample is packed as {imag[15:0], real[15:0]}, both two's
// complement, real part in the low half (the layout the usual FPGA FFT cores
// expect). The 16/16 split and the integer constellation levels (+-1, +-3)
// are this design's choice; the 2-bit mod_type encoding (00 BPSK, 01 QPSK,
// 10 QAM-16) is the one of the modulator's selector.
package vlc_mod_pkg;

  localparam int unsigned N_FFT    = 64;  // IFFT points
  localparam int unsigned N_SYM    = 31;  // data subcarriers X1..X31

  typedef enum logic [1:0] {
    MOD_BPSK  = 2'b00,
    MOD_QPSK  = 2'b01,
    MOD_QAM16 = 2'b10,
    MOD_NONE  = 2'b11
  } mod_type_e;

  typedef struct packed {
    logic signed [15:0] im;
    logic signed [15:0] re;
  } cplx_t;

  // bits carried by one symbol
  function automatic int unsigned bits_per_sym(mod_type_e m);
    case (m)
      MOD_BPSK:  return 1;
      MOD_QPSK:  return 2;
      MOD_QAM16: return 4;
      default:   return 0;
    endcase
  endfunction

  // complex conjugate of a sample
  function automatic cplx_t conj(cplx_t x);
    cplx_t y;
    y.re = x.re;
    y.im = -x.im;
    return y;
  endfunction

endpackage
