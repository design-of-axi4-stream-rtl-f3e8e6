// tb_axis_controller: checks the modulator sequencing FSM (NW = 4).
//
// Per frame it checks, clock by clock: data_mem writes at word indices
// 0..NW-1 on accepted input words; subcar_mem writes for sym_k = 1..31 on
// consecutive clocks, the first one in the clock of the last input word;
// s_axis_tready low from then until the frame has left; 64 output transfers
// with out_addr 0..63 and tlast on the last; and the latency NW-1+31.
// Frames with random gaps on both sides and one frame ended early by
// s_axis_tlast are included.
module tb_axis_controller;
  localparam int NW = 4;
  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge aclk) cyc++;

  logic s_tvalid, s_tlast, s_tready, m_tready, m_tvalid, m_tlast;
  logic dm_we, sc_we;
  logic [1:0] dm_waddr;
  logic [5:0] sym_k, out_addr;

  axis_controller #(.NW(NW), .NSYM(31), .N(64)) dut (
    .aclk, .aresetn,
    .s_axis_tvalid(s_tvalid), .s_axis_tlast(s_tlast), .s_axis_tready(s_tready),
    .m_axis_tready(m_tready), .m_axis_tvalid(m_tvalid), .m_axis_tlast(m_tlast),
    .dm_we, .dm_waddr, .sym_k, .sc_we, .out_addr
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d] %s", cyc, what); end
  endtask

  // monitor: expected sequence numbers
  int exp_word = 0, exp_k = 0, exp_out = 0;
  int t_first_in = -1, t_first_out = -1;
  int frames_done = 0, stall_cnt = 0, early_cnt = 0;
  bit mapping = 0;

  always @(posedge aclk) if (aresetn) begin
    chk(dm_we == (s_tvalid && s_tready), "dm_we");
    if (s_tvalid && s_tready) begin
      chk(dm_waddr == 2'(exp_word), $sformatf("dm_waddr %0d exp %0d", dm_waddr, exp_word));
      if (exp_word == 0) t_first_in = cyc;
      if (exp_word == NW - 1 || s_tlast) begin
        if (exp_word != NW - 1) early_cnt++;
        exp_word = 0; mapping = 1; exp_k = 1;
      end else exp_word++;
    end
    chk(sc_we == mapping, "sc_we");
    if (mapping) begin
      chk(sym_k == 6'(exp_k), $sformatf("sym_k %0d exp %0d", sym_k, exp_k));
      chk(!m_tvalid, "valid while mapping");
      if (exp_k == 31) mapping = 0;
      exp_k++;
    end
    if (m_tvalid) begin
      chk(!s_tready, "ready while sending");
      if (t_first_out < 0) t_first_out = cyc;
      chk(out_addr == 6'(exp_out), "out_addr");
      chk(m_tlast == (exp_out == 63), "tlast");
      if (!m_tready) stall_cnt++;
      if (m_tready) begin
        if (exp_out == 63) begin exp_out = 0; frames_done++; end
        else exp_out++;
      end
    end
  end

  task automatic frame(bit gaps, int nwords);
    int start = frames_done;
    int gap;
    t_first_out = -1;
    for (int i = 0; i < nwords; i++) begin
      gap = gaps ? $urandom_range(0, 2) : 0;
      if (gap > 0) begin s_tvalid <= 0; repeat (gap) @(posedge aclk); end
      s_tvalid <= 1; s_tlast <= (i == nwords - 1);
      @(posedge aclk);
      while (!s_tready) @(posedge aclk);
    end
    s_tvalid <= 0; s_tlast <= 0;
    while (frames_done == start) begin
      m_tready <= gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      @(posedge aclk);
    end
    if (!gaps) chk(t_first_out - t_first_in == nwords - 1 + 31,
                   $sformatf("latency %0d", t_first_out - t_first_in));
    m_tready <= 1;
  endtask

  initial begin
    s_tvalid = 0; s_tlast = 0; m_tready = 1;
    repeat (3) @(posedge aclk);
    aresetn <= 1;
    @(posedge aclk);
    for (int f = 0; f < 10; f++) frame(f % 2 == 1, NW);
    frame(0, 2);   // ended early by tlast
    chk(frames_done == 11, "frame count");
    chk(stall_cnt > 0, "no output stall");
    chk(early_cnt == 1, "early tlast not seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
