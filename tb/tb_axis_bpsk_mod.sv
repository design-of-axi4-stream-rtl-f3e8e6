// tb_axis_bpsk_mod: self-checking test of the BPSK AXI4-Stream modulator.
//
// Sends random frames of NW input words and compares the 64 output words and
// TLAST with the reference model. Frames alternate between back-to-back
// input with m_axis_tready held high, where the latency from the first
// accepted input word to the first valid output must be the document's
// LAT clocks and the 64 words must leave in 64 clocks, and frames with
// random gaps on both streams, which exercise the handshake stalls.
module tb_axis_bpsk_mod;
  import vlc_ref_pkg::*;
  localparam int M   = 0;      // modulation: 0 BPSK, 1 QPSK, 2 QAM-16
  localparam int NW  = 1;      // input words per frame
  localparam int LAT = 31;     // expected latency (clocks)
  localparam int AMP = 1;
  localparam int NFRAMES = 40;

  logic        aclk = 0, aresetn = 0;
  logic [31:0] s_tdata;
  logic        s_tvalid, s_tlast, s_tready;
  logic [31:0] m_tdata;
  logic        m_tvalid, m_tlast, m_tready;

  int checks = 0, failures = 0;
  int cyc = 0;
  int stalls = 0;

  axis_bpsk_mod #(.AMP(AMP)) dut (
    .aclk, .aresetn,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tlast(s_tlast), .s_axis_tready(s_tready),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tlast(m_tlast), .m_axis_tready(m_tready)
  );

  always #5 aclk = ~aclk;
  always @(posedge aclk) cyc++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d] %s", cyc, what); end
  endtask

  // AXI4-Stream: a stalled output keeps valid and data
  logic        p_stall = 0;
  logic [31:0] p_data;
  always @(posedge aclk) begin
    if (aresetn && p_stall) chk(m_tvalid && m_tdata == p_data, "output changed while stalled");
    p_stall <= m_tvalid && !m_tready;
    p_data  <= m_tdata;
    if (m_tvalid && !m_tready) stalls++;
  end

  logic [31:0] w [4];
  int t_first_in, t_first_out;

  task automatic drive_in(bit gaps);
    for (int i = 0; i < NW; i++) begin
      int gap = gaps ? $urandom_range(0, 2) : 0;
      if (gap > 0) begin
        s_tvalid <= 1'b0;
        repeat (gap) @(posedge aclk);
      end
      s_tdata  <= w[i];
      s_tvalid <= 1'b1;
      s_tlast  <= (i == NW - 1);
      @(posedge aclk);
      while (!s_tready) @(posedge aclk);
      if (i == 0) t_first_in = cyc;
    end
    s_tvalid <= 1'b0;
    s_tlast  <= 1'b0;
  endtask

  int t_last_out;
  task automatic collect_out(bit gaps);
    int n_out = 0;
    bit got_first_out = 0;
    while (n_out < 64) begin
      m_tready <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(posedge aclk);
      if (m_tvalid && !got_first_out) begin got_first_out = 1; t_first_out = cyc; end
      if (m_tvalid && m_tready) begin
        chk(m_tdata == expect_word(M, w, n_out, AMP),
            $sformatf("word %0d got %h exp %h", n_out, m_tdata, expect_word(M, w, n_out, AMP)));
        chk(m_tlast == (n_out == 63), $sformatf("tlast at word %0d", n_out));
        chk(!s_tready, "input ready while sending");
        n_out++;
        t_last_out = cyc;
      end
    end
    m_tready <= 1'b1;
  endtask

  task automatic run_frame(bit gaps);
    for (int i = 0; i < 4; i++) w[i] = $urandom();
    fork
      drive_in(gaps);
      collect_out(gaps);
    join
    if (!gaps) begin
      chk(t_first_out - t_first_in == LAT,
          $sformatf("latency %0d, expected %0d", t_first_out - t_first_in, LAT));
      chk(t_last_out - t_first_out == 63, "64 output words not on consecutive clocks");
    end
  endtask

  initial begin
    s_tdata = '0; s_tvalid = 0; s_tlast = 0; m_tready = 1;
    repeat (3) @(posedge aclk);
    chk(!s_tready, "ready during reset");
    aresetn <= 1;
    @(posedge aclk);
    for (int f = 0; f < NFRAMES; f++) run_frame(f % 2 == 1);
    chk(stalls > 0, "no output stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * NFRAMES + 100) @(posedge aclk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
