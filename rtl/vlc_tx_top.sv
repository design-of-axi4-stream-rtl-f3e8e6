// vlc_tx_top: transmit front end of a DCO-OFDM visible-light-communication SoC.
//
// A processor writes the modulation type and up to four 32-bit bit-stream
// words over AXI4-Lite into axi_tx_ctrl. When the register that completes a
// frame is written (DATA0 for BPSK, DATA1 for QPSK, DATA3 for QAM-16), the
// words go over AXI4-Stream to axis_modulator, which maps 31, 62 or 124 bits
// to 31 constellation points, builds the Hermitian-symmetric 64-subcarrier
// frame and streams it out as 64 words {imag[15:0], real[15:0]}, with tlast
// on the 64th. The m_axis port is meant for a 64-point IFFT core with an
// AXI4-Stream input, which is not part of this design.
//
// Timing at the default sizes: an input frame of n words (1, 2, 4) reaches
// the first output word n - 1 + 31 clocks after its first word enters the
// modulator; the 64 output words then leave at one per clock while
// m_axis_tready is high. Single clock aclk, synchronous active-low aresetn.
module vlc_tx_top #(
  parameter int unsigned ADDR_W = 32,
  parameter int          AMP    = 1    // value of one constellation unit
) (
  input  logic              aclk,
  input  logic              aresetn,
  // AXI4-Lite slave (processor)
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // AXI4-Stream master towards the IFFT
  output logic [31:0]       m_axis_tdata,
  output logic              m_axis_tvalid,
  output logic              m_axis_tlast,
  input  logic              m_axis_tready
);
  logic [1:0]  mod_type;
  logic [31:0] bs_tdata;
  logic        bs_tvalid, bs_tlast, bs_tready;

  axi_tx_ctrl #(.ADDR_W(ADDR_W)) u_ctrl (
    .aclk, .aresetn,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .mod_type,
    .m_axis_tdata(bs_tdata), .m_axis_tvalid(bs_tvalid),
    .m_axis_tlast(bs_tlast), .m_axis_tready(bs_tready)
  );

  axis_modulator #(.AMP(AMP)) u_mod (
    .aclk, .aresetn, .mod_type,
    .s_axis_tdata(bs_tdata), .s_axis_tvalid(bs_tvalid),
    .s_axis_tlast(bs_tlast), .s_axis_tready(bs_tready),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tlast, .m_axis_tready
  );
endmodule
