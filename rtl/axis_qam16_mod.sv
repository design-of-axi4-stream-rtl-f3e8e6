// axis_qam16_mod: AXI4-Stream QAM-16 modulator for one 64-point DCO-OFDM frame.
//
// Receives 4 input word(s) of 32 bits on s_axis (124 payload bits: bits
// [30:0] of each word), maps them to 31 QAM-16 symbols for subcarriers
// X1..X31, writes each symbol's conjugate to X63..X33, and sends the whole
// 64-subcarrier frame X0..X63 on m_axis as 64 words {imag[15:0], real[15:0]},
// with m_axis_tlast on X63. X0 and X32 are zero.
//
// Structure: data_mem (bit buffer) -> qam16_mod (constellation LUT) ->
// subcar_mem (64 x 32), sequenced by axis_controller, as in the document's
// generic modulator diagram. s_axis_tready is high only while the core waits
// for input; one symbol is mapped per clock; the output follows m_axis_tready.
// Latency from the first accepted input word to the first valid output word
// is 4 - 1 + NSYM clocks. Reset: aresetn, active low, synchronous.
module axis_qam16_mod
  import vlc_mod_pkg::*;
#(
  parameter int AMP = 1   // value of one constellation unit
) (
  input  logic        aclk,
  input  logic        aresetn,
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  input  logic        s_axis_tlast,
  output logic        s_axis_tready,
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  output logic        m_axis_tlast,
  input  logic        m_axis_tready
);
  localparam int unsigned BPS = 4;
  localparam int unsigned NW  = BPS;
  localparam int unsigned AW  = (NW > 1) ? $clog2(NW) : 1;
  localparam int unsigned LW  = $clog2(N_FFT);

  logic          dm_we;
  logic [AW-1:0] dm_waddr;
  logic [LW-1:0] sym_k;
  logic          sc_we;
  logic [LW-1:0] out_addr;
  logic [BPS-1:0] data_in;
  logic [31:0]   data_mod, data_conj;
  logic [4:0]    sym_idx;

  assign sym_idx = 5'(sym_k - 1'b1);

  axis_controller #(.NW(NW), .NSYM(N_SYM), .N(N_FFT)) u_ctrl (
    .aclk, .aresetn,
    .s_axis_tvalid, .s_axis_tlast, .s_axis_tready,
    .m_axis_tready, .m_axis_tvalid, .m_axis_tlast,
    .dm_we, .dm_waddr, .sym_k, .sc_we, .out_addr
  );

  data_mem #(.BPS(BPS)) u_data_mem (
    .clk(aclk), .we(dm_we), .waddr(dm_waddr), .wdata(s_axis_tdata),
    .raddr(sym_idx), .rdata(data_in)
  );

  qam16_mod #(.AMP(AMP)) u_lut (
    .data_in, .data_mod, .data_conj
  );

  subcar_mem #(.N(N_FFT)) u_subcar_mem (
    .clk(aclk), .we(sc_we), .k(sym_k), .data_mod, .data_conj,
    .raddr(out_addr), .rdata(m_axis_tdata)
  );
endmodule
