// subcar_mem: the 64 x 32-bit subcarrier buffer in front of the IFFT.
//
// Each write stores one modulated symbol twice: data_mod at subcarrier k and
// its conjugate data_conj at subcarrier 64-k (k = 1..31), so the Hermitian
// half is filled at the same time as the symbol is created. Subcarriers X0
// and X32 are never written; the read port returns zero for them.
//
// Write: synchronous, both entries in one clock. Read: combinational from
// raddr (0..63), so the stream output follows the read address directly.
// The 64x32 size and the Hermitian layout follow the document; the
// dual-entry write in one clock and the zero decode of X0/X32 are this
// design's choices.
module subcar_mem #(
  parameter int unsigned N = 64   // IFFT points
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] k,          // data subcarrier 1..N/2-1
  input  logic [31:0]          data_mod,   // written to X[k]
  input  logic [31:0]          data_conj,  // written to X[N-k]
  input  logic [$clog2(N)-1:0] raddr,
  output logic [31:0]          rdata
);
  localparam int unsigned LW = $clog2(N);

  logic [31:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[k]            <= data_mod;
      mem[LW'(N) - k]   <= data_conj;
    end
  end

  assign rdata = (raddr == '0 || raddr == LW'(N / 2)) ? '0 : mem[raddr];
endmodule
