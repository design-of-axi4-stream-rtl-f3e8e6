// tb_qam16_mod: exhaustive check of the QAM-16 look-up table against the
// constellation table of the reference model, at two amplitudes.
module tb_qam16_mod;
  import vlc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] d1, d7;
  logic [31:0] m1, c1, m7, c7;

  qam16_mod #(.AMP(1)) dut1 (.data_in(d1), .data_mod(m1), .data_conj(c1));
  qam16_mod #(.AMP(7)) dut7 (.data_in(d7), .data_mod(m7), .data_conj(c7));

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      d1 = 4'(v); d7 = 4'(v);
      #1;
      chk(m1, point(2, v, 1, 0), "mod amp1");
      chk(c1, point(2, v, 1, 1), "conj amp1");
      chk(m7, point(2, v, 7, 0), "mod amp7");
      chk(c7, point(2, v, 7, 1), "conj amp7");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
