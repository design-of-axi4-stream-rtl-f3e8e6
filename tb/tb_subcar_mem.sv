// tb_subcar_mem: checks the 64-entry subcarrier buffer.
//
// Writes 31 random symbol/conjugate pairs at k = 1..31 in random order,
// then reads all 64 entries: X[k] must hold the symbol, X[64-k] the
// conjugate value written with it, and X0 and X32 must read zero.
module tb_subcar_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we;
  logic [5:0]  k, ra;
  logic [31:0] dm, dc, rd;
  logic [31:0] exp_mem [64];
  int order [31];
  int j, t;

  subcar_mem #(.N(64)) dut (.clk, .we, .k, .data_mod(dm), .data_conj(dc), .raddr(ra), .rdata(rd));

  initial begin
    we = 0; k = 0; ra = 0; dm = 0; dc = 0;
    for (int rep = 0; rep < 10; rep++) begin
      for (int i = 0; i < 31; i++) order[i] = i + 1;
      for (int i = 30; i > 0; i--) begin
        j = $urandom_range(0, i);
        t = order[i]; order[i] = order[j]; order[j] = t;
      end
      for (int i = 0; i < 64; i++) exp_mem[i] = 32'h0;
      for (int i = 0; i < 31; i++) begin
        @(negedge clk);
        we = 1; k = 6'(order[i]); dm = $urandom(); dc = $urandom();
        exp_mem[order[i]] = dm;
        exp_mem[64 - order[i]] = dc;
      end
      @(negedge clk) we = 0;
      for (int a = 0; a < 64; a++) begin
        ra = 6'(a);
        #1;
        checks++;
        if (rd !== exp_mem[a]) begin
          failures++;
          $display("FAIL X%0d got %h exp %h", a, rd, exp_mem[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
