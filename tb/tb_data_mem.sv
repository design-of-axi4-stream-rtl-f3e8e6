// tb_data_mem: checks the frame bit buffer for 1, 2 and 4 bits per symbol.
//
// Writes random words, then reads all 31 symbols and compares them with the
// reference bit order (stream bit j = bit j%31 of word j/31). Also checks
// the write-through read: a symbol read in the clock its word is written
// already shows the new bits.
module tb_data_mem;
  import vlc_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic       we1, we2, we4;
  logic [0:0] wa1, wa2;
  logic [1:0] wa4;
  logic [31:0] wd;
  logic [4:0] ra;
  logic [0:0] rd1;
  logic [1:0] rd2;
  logic [3:0] rd4;

  data_mem #(.BPS(1)) m1 (.clk, .we(we1), .waddr(wa1), .wdata(wd), .raddr(ra), .rdata(rd1));
  data_mem #(.BPS(2)) m2 (.clk, .we(we2), .waddr(wa2), .wdata(wd), .raddr(ra), .rdata(rd2));
  data_mem #(.BPS(4)) m4 (.clk, .we(we4), .waddr(wa4), .wdata(wd), .raddr(ra), .rdata(rd4));

  logic [31:0] w [4];

  initial begin
    we1 = 0; we2 = 0; we4 = 0; wa1 = 0; wa2 = 0; wa4 = 0; wd = 0; ra = 0;
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < 4; i++) w[i] = $urandom();
      // write all words but the last of each memory
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        wd = w[i];
        we1 = 0; we2 = (i < 1); we4 = 1;
        wa2 = 1'(i); wa4 = 2'(i);
        @(posedge clk); #1;
        we1 = 0; we2 = 0; we4 = 0;
      end
      // last words written together with a read of symbol 0 (write-through)
      @(negedge clk);
      wd = w[3]; we4 = 1; wa4 = 2'd3; ra = 5'd30;
      #1 chk(rd4 == 4'(sym_val(2, w, 30)), "qam16 write-through");
      @(posedge clk); #1 we4 = 0;
      @(negedge clk);
      wd = w[1]; we2 = 1; wa2 = 1'b1; ra = 5'd30;
      #1 chk(rd2 == 2'(sym_val(1, w, 30)), "qpsk write-through");
      @(posedge clk); #1 we2 = 0;
      @(negedge clk);
      wd = w[0]; we1 = 1; wa1 = 1'b0; ra = 5'd0;
      #1 chk(rd1 == 1'(sym_val(0, w, 0)), "bpsk write-through");
      @(posedge clk); #1 we1 = 0;
      // read back every symbol
      for (int s = 0; s < 31; s++) begin
        ra = 5'(s);
        #1;
        chk(rd1 == 1'(sym_val(0, w, s)), $sformatf("bpsk sym %0d", s));
        chk(rd2 == 2'(sym_val(1, w, s)), $sformatf("qpsk sym %0d", s));
        chk(rd4 == 4'(sym_val(2, w, s)), $sformatf("qam16 sym %0d got %h exp %h", s, rd4, sym_val(2, w, s)));
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
