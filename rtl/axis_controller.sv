// axis_controller: the FSM that sequences one modulator.
//
// Three states:
//   RECV  s_axis_tready = 1. Each accepted word is written to data_mem
//         (dm_we, dm_waddr). On the last word of the frame (word NW-1, or an
//         earlier word with s_axis_tlast) the first symbol is mapped and
//         written to subcar_mem in the same clock, then the FSM goes to MAP.
//   MAP   one symbol per clock: sym_k runs 2..NSYM, writing X[k] and its
//         conjugate X[N-k]. After the write of the last symbol, go to SEND.
//   SEND  m_axis_tvalid = 1, subcar_mem is read at out_addr 0..N-1, one word
//         per accepted transfer; m_axis_tlast marks word N-1. After it, RECV.
// sym_k is the 1-based subcarrier index; data_mem is read at sym_k-1.
//
// Timing: with NW input words accepted on consecutive clocks starting at
// clock c, m_axis_tvalid is first seen high at clock c + NW - 1 + NSYM:
// 31, 32 and 34 clocks for BPSK, QPSK and QAM-16 at NSYM = 31, which is the
// latency the document reports. Frame length NW and the 64-word output frame
// follow the document; the state encoding, the same-clock mapping of the
// first symbol and the handling of an early s_axis_tlast are this design's.
// Reset: aresetn, active low, synchronous.
module axis_controller #(
  parameter int unsigned NW   = 1,    // input words per frame (1, 2 or 4)
  parameter int unsigned NSYM = 31,   // data subcarriers
  parameter int unsigned N    = 64,   // output words per frame (IFFT points)
  localparam int unsigned AW  = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned LW  = $clog2(N)
) (
  input  logic          aclk,
  input  logic          aresetn,
  // input stream handshake
  input  logic          s_axis_tvalid,
  input  logic          s_axis_tlast,
  output logic          s_axis_tready,
  // output stream handshake
  input  logic          m_axis_tready,
  output logic          m_axis_tvalid,
  output logic          m_axis_tlast,
  // data_mem control
  output logic          dm_we,
  output logic [AW-1:0] dm_waddr,
  // mapping / subcar_mem control
  output logic [LW-1:0] sym_k,
  output logic          sc_we,
  output logic [LW-1:0] out_addr
);
  typedef enum logic [1:0] {S_RECV, S_MAP, S_SEND} state_e;

  state_e        state_q;
  logic [AW-1:0] wcnt_q;
  logic [LW-1:0] k_q;
  logic [LW-1:0] ocnt_q;

  logic s_hs, m_hs, last_word;

  assign s_axis_tready = (state_q == S_RECV) && aresetn;
  assign s_hs          = s_axis_tvalid && s_axis_tready;
  assign last_word     = (wcnt_q == AW'(NW - 1)) || s_axis_tlast;

  assign m_axis_tvalid = (state_q == S_SEND);
  assign m_axis_tlast  = m_axis_tvalid && (ocnt_q == LW'(N - 1));
  assign m_hs          = m_axis_tvalid && m_axis_tready;

  assign dm_we    = s_hs;
  assign dm_waddr = wcnt_q;
  assign out_addr = ocnt_q;

  always_comb begin
    sc_we = 1'b0;
    sym_k = k_q;
    case (state_q)
      S_RECV: if (s_hs && last_word) begin
        sc_we = 1'b1;
        sym_k = LW'(1);
      end
      S_MAP:  sc_we = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      state_q <= S_RECV;
      wcnt_q  <= '0;
      k_q     <= '0;
      ocnt_q  <= '0;
    end else begin
      case (state_q)
        S_RECV: if (s_hs) begin
          if (last_word) begin
            wcnt_q  <= '0;
            k_q     <= LW'(2);
            state_q <= (NSYM > 1) ? S_MAP : S_SEND;
          end else begin
            wcnt_q <= wcnt_q + 1'b1;
          end
        end
        S_MAP: begin
          if (k_q == LW'(NSYM)) state_q <= S_SEND;
          k_q <= k_q + 1'b1;
        end
        S_SEND: if (m_hs) begin
          ocnt_q <= ocnt_q + 1'b1;
          if (ocnt_q == LW'(N - 1)) begin
            ocnt_q  <= '0;
            state_q <= S_RECV;
          end
        end
        default: state_q <= S_RECV;
      endcase
    end
  end

  // AXI4-Stream rule: once valid, the output stays valid until accepted.
  property p_m_valid_hold;
    @(posedge aclk) disable iff (!aresetn)
      m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid;
  endproperty
  a_m_valid_hold: assert property (p_m_valid_hold);
endmodule
