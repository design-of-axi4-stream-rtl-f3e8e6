// axis_modulator: the AXI4-Stream modulator IP core (BPSK / QPSK / QAM-16).
//
// The input stream s_axis feeds three modulators, axis_bpsk_mod,
// axis_qpsk_mod and axis_qam16_mod; mod_type selects which one is connected
// to the output stream m_axis: 00 BPSK, 01 QPSK, 10 QAM-16, as on the
// document's block diagram. A frame is 1, 2 or 4 input words and produces 64
// output words (the IFFT input, Hermitian symmetric).
//
// Beyond the output multiplexer of the document, the select also steers the
// handshakes: s_axis_tvalid and m_axis_tready go only to the selected
// modulator and s_axis_tready comes from it, so the other two never see a
// transfer. mod_type 11 selects nothing (s_axis_tready and m_axis_tvalid low).
// mod_type should be changed only while the selected modulator is idle.
module axis_modulator
  import vlc_mod_pkg::*;
#(
  parameter int AMP = 1   // value of one constellation unit
) (
  input  logic        aclk,
  input  logic        aresetn,
  input  logic [1:0]  mod_type,
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  input  logic        s_axis_tlast,
  output logic        s_axis_tready,
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  output logic        m_axis_tlast,
  input  logic        m_axis_tready
);
  typedef struct packed {
    logic [31:0] tdata;
    logic        tvalid;
    logic        tlast;
  } axis_m_t;

  mod_type_e mt;
  logic [2:0] sel;          // one-hot: BPSK, QPSK, QAM-16
  logic [2:0] s_ready;
  axis_m_t    m_out [3];

  assign mt  = mod_type_e'(mod_type);
  assign sel = {mt == MOD_QAM16, mt == MOD_QPSK, mt == MOD_BPSK};

  axis_bpsk_mod #(.AMP(AMP)) u_bpsk (
    .aclk, .aresetn,
    .s_axis_tdata, .s_axis_tvalid(s_axis_tvalid && sel[0]), .s_axis_tlast,
    .s_axis_tready(s_ready[0]),
    .m_axis_tdata(m_out[0].tdata), .m_axis_tvalid(m_out[0].tvalid),
    .m_axis_tlast(m_out[0].tlast), .m_axis_tready(m_axis_tready && sel[0])
  );

  axis_qpsk_mod #(.AMP(AMP)) u_qpsk (
    .aclk, .aresetn,
    .s_axis_tdata, .s_axis_tvalid(s_axis_tvalid && sel[1]), .s_axis_tlast,
    .s_axis_tready(s_ready[1]),
    .m_axis_tdata(m_out[1].tdata), .m_axis_tvalid(m_out[1].tvalid),
    .m_axis_tlast(m_out[1].tlast), .m_axis_tready(m_axis_tready && sel[1])
  );

  axis_qam16_mod #(.AMP(AMP)) u_qam16 (
    .aclk, .aresetn,
    .s_axis_tdata, .s_axis_tvalid(s_axis_tvalid && sel[2]), .s_axis_tlast,
    .s_axis_tready(s_ready[2]),
    .m_axis_tdata(m_out[2].tdata), .m_axis_tvalid(m_out[2].tvalid),
    .m_axis_tlast(m_out[2].tlast), .m_axis_tready(m_axis_tready && sel[2])
  );

  always_comb begin
    s_axis_tready = 1'b0;
    m_axis_tdata  = '0;
    m_axis_tvalid = 1'b0;
    m_axis_tlast  = 1'b0;
    case (mt)
      MOD_BPSK:  begin s_axis_tready = s_ready[0]; {m_axis_tdata, m_axis_tvalid, m_axis_tlast} = m_out[0]; end
      MOD_QPSK:  begin s_axis_tready = s_ready[1]; {m_axis_tdata, m_axis_tvalid, m_axis_tlast} = m_out[1]; end
      MOD_QAM16: begin s_axis_tready = s_ready[2]; {m_axis_tdata, m_axis_tvalid, m_axis_tlast} = m_out[2]; end
      default: ;
    endcase
  end
endmodule
