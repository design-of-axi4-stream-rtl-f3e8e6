// axi_tx_ctrl: AXI4-Lite register slave that feeds the modulator stream.
//
// The processor (AXI master) writes the modulation type and the bit-stream
// words here; the controller then sends the words to the modulator as one
// AXI4-Stream frame. Register map (byte addresses, 32-bit registers):
//   0x00  CTRL   bits [1:0] = mod_type (00 BPSK, 01 QPSK, 10 QAM-16)
//   0x10  DATA0  0x14 DATA1  0x18 DATA2  0x1C DATA3   (4 x 32-bit)
// All five are readable; other addresses read as zero and ignore writes.
// Only address bits [4:0] are decoded, so the map repeats every 32 bytes.
// A write to the data register that completes a frame starts the stream:
// DATA0 for BPSK (1 word), DATA1 for QPSK (2 words), DATA3 for QAM-16
// (4 words). The stream sends DATA0..DATA(n-1) on consecutive accepted
// transfers, with m_axis_tlast on the last word. mod_type 11 sends nothing.
//
// AXI4-Lite write: address and data are taken together in one clock
// (awready = wready pulse) when both are valid, no response is pending and no
// stream is in progress, so the registers cannot change under a frame that is
// still being sent. Write strobes are honoured. One outstanding read; the
// read data is registered. Reset: aresetn, active low, synchronous.
// The register sizes, the CTRL and DATA offsets and the trigger registers
// follow the document; the handshake details and write blocking are this
// design's choices.
module axi_tx_ctrl
  import vlc_mod_pkg::*;
#(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              aclk,
  input  logic              aresetn,
  // AXI4-Lite slave
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
  // configuration to the modulator
  output logic [1:0]        mod_type,
  // AXI4-Stream master to the modulator
  output logic [31:0]       m_axis_tdata,
  output logic              m_axis_tvalid,
  output logic              m_axis_tlast,
  input  logic              m_axis_tready
);
  localparam logic [4:0] A_CTRL  = 5'h00;
  localparam logic [4:0] A_DATA0 = 5'h10;

  logic [31:0] ctrl_q;
  logic [31:0] data_q [4];
  logic        busy_q;
  logic [1:0]  widx_q;

  logic        wr_en;
  logic [4:0]  waddr;
  logic        wr_data_reg;
  logic [1:0]  wr_idx;
  logic [1:0]  trig_idx;     // data register that completes a frame
  logic        trig_ok;      // mod_type has a frame at all
  logic [1:0]  last_idx;

  assign mod_type = ctrl_q[1:0];

  always_comb begin
    trig_ok = 1'b1;
    case (mod_type_e'(ctrl_q[1:0]))
      MOD_BPSK:  trig_idx = 2'd0;
      MOD_QPSK:  trig_idx = 2'd1;
      MOD_QAM16: trig_idx = 2'd3;
      default: begin trig_idx = 2'd0; trig_ok = 1'b0; end
    endcase
  end
  assign last_idx = trig_idx;

  // ---- write channel ----
  assign wr_en         = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid && !busy_q;
  assign s_axi_awready = wr_en;
  assign s_axi_wready  = wr_en;
  assign s_axi_bresp   = 2'b00;
  assign waddr         = s_axi_awaddr[4:0];
  assign wr_data_reg   = (waddr[4:2] >= 3'd4);
  assign wr_idx        = waddr[3:2];

  function automatic logic [31:0] apply_strb(logic [31:0] old, logic [31:0] nw, logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      ctrl_q       <= '0;
      for (int i = 0; i < 4; i++) data_q[i] <= '0;
      s_axi_bvalid <= 1'b0;
    end else begin
      if (wr_en) begin
        s_axi_bvalid <= 1'b1;
        if (waddr[1:0] == 2'b00) begin
          if (waddr == A_CTRL) ctrl_q <= apply_strb(ctrl_q, s_axi_wdata, s_axi_wstrb);
          if (wr_data_reg)     data_q[wr_idx] <= apply_strb(data_q[wr_idx], s_axi_wdata, s_axi_wstrb);
        end
      end else if (s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  // ---- stream to the modulator ----
  assign m_axis_tvalid = busy_q;
  assign m_axis_tdata  = data_q[widx_q];
  assign m_axis_tlast  = busy_q && (widx_q == last_idx);

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      busy_q <= 1'b0;
      widx_q <= '0;
    end else if (!busy_q) begin
      if (wr_en && wr_data_reg && waddr[1:0] == 2'b00 && wr_idx == trig_idx && trig_ok) begin
        busy_q <= 1'b1;
        widx_q <= '0;
      end
    end else if (m_axis_tready) begin
      if (widx_q == last_idx) busy_q <= 1'b0;
      else                    widx_q <= widx_q + 1'b1;
    end
  end

  // ---- read channel ----
  assign s_axi_rresp   = 2'b00;
  assign s_axi_arready = !s_axi_rvalid;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else if (s_axi_arvalid && s_axi_arready) begin
      s_axi_rvalid <= 1'b1;
      s_axi_rdata  <= '0;
      if (s_axi_araddr[4:0] == A_CTRL) s_axi_rdata <= ctrl_q;
      else if (s_axi_araddr[4] && s_axi_araddr[1:0] == 2'b00) s_axi_rdata <= data_q[s_axi_araddr[3:2]];
    end else if (s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  // AXI4-Stream rule: a pending transfer holds its valid.
  a_s_valid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));
endmodule
