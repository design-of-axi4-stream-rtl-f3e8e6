// data_mem: bit-stream buffer of one modulator (31 symbols x BPS bits).
//
// Holds the 31*BPS payload bits of one IFFT frame: 31 bits for BPSK, 62 for
// QPSK, 124 for QAM-16, received as BPS input words of 32 bits. Input word w
// supplies its bits [30:0] to stream bits [31*w +: 31]; bit 31 of every word
// is not used. Symbol k (0..30, for subcarrier X(k+1)) is stream bits
// [BPS*k +: BPS], least significant bits first.
//
// Write: synchronous, one word per clock when we is high.
// Read: combinational and write-through: a word being written in the current
// cycle is already visible on rdata, so the first symbol can be mapped in the
// same cycle as the last input word arrives.
// The sizes follow the document; the bit order and the write-through read
// are this design's choices.
module data_mem #(
  parameter int unsigned BPS = 1,                       // bits per symbol: 1, 2 or 4
  localparam int unsigned NW  = BPS,                    // input words per frame
  localparam int unsigned AW  = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned NB  = 31 * BPS                // stored bits
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,     // word index 0..NW-1
  input  logic [31:0]   wdata,
  input  logic [4:0]    raddr,     // symbol index 0..30
  output logic [BPS-1:0] rdata
);
  logic [NB-1:0] mem_q;
  logic [NB-1:0] view;

  always_comb begin
    view = mem_q;
    if (we) view[31*waddr +: 31] = wdata[30:0];
  end

  always_ff @(posedge clk) begin
    if (we) mem_q <= view;
  end

  assign rdata = view[BPS*raddr +: BPS];
endmodule
