// tb_axis_modulator: checks the three-way modulator core with its selector.
//
// Runs random frames with mod_type chosen at random among BPSK, QPSK and
// QAM-16 (changed only between frames), and compares the 64 output words
// and TLAST with the reference model. Gap-free frames also check the
// latency 31/32/34. It then checks that mod_type 11 accepts no input and
// produces no output, and counts that every mode, a mode change and an
// output stall have all occurred.
module tb_axis_modulator;
  import vlc_ref_pkg::*;
  localparam int AMP = 1;
  localparam int NFRAMES = 60;
  localparam int LAT [3] = '{31, 32, 34};

  logic        aclk = 0, aresetn = 0;
  logic [1:0]  mod_type;
  logic [31:0] s_tdata, m_tdata;
  logic        s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready;
  int checks = 0, failures = 0, cyc = 0;
  int mode_cnt [3] = '{0, 0, 0};
  int switches = 0, stalls = 0;

  axis_modulator #(.AMP(AMP)) dut (
    .aclk, .aresetn, .mod_type,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tlast(s_tlast), .s_axis_tready(s_tready),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tlast(m_tlast), .m_axis_tready(m_tready)
  );

  always #5 aclk = ~aclk;
  always @(posedge aclk) cyc++;
  always @(posedge aclk) if (m_tvalid && !m_tready) stalls++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d] %s", cyc, what); end
  endtask

  logic [31:0] w [4];
  int t_first_in, t_first_out, t_last_out;

  task automatic drive_in(int nw, bit gaps);
    int gap;
    for (int i = 0; i < nw; i++) begin
      gap = gaps ? $urandom_range(0, 2) : 0;
      if (gap > 0) begin s_tvalid <= 1'b0; repeat (gap) @(posedge aclk); end
      s_tdata <= w[i]; s_tvalid <= 1'b1; s_tlast <= (i == nw - 1);
      @(posedge aclk);
      while (!s_tready) @(posedge aclk);
      if (i == 0) t_first_in = cyc;
    end
    s_tvalid <= 1'b0; s_tlast <= 1'b0;
  endtask

  task automatic collect_out(int m, bit gaps);
    int n_out = 0;
    bit first = 0;
    while (n_out < 64) begin
      m_tready <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(posedge aclk);
      if (m_tvalid && !first) begin first = 1; t_first_out = cyc; end
      if (m_tvalid && m_tready) begin
        chk(m_tdata == expect_word(m, w, n_out, AMP),
            $sformatf("mode %0d word %0d got %h exp %h", m, n_out, m_tdata, expect_word(m, w, n_out, AMP)));
        chk(m_tlast == (n_out == 63), "tlast");
        n_out++;
        t_last_out = cyc;
      end
    end
    m_tready <= 1'b1;
  endtask

  initial begin
    int m, prev_m;
    bit gaps;
    s_tdata = 0; s_tvalid = 0; s_tlast = 0; m_tready = 1; mod_type = 2'b00;
    prev_m = 0;
    repeat (3) @(posedge aclk);
    aresetn <= 1;
    @(posedge aclk);
    for (int f = 0; f < NFRAMES; f++) begin
      m = (f < 3) ? f : $urandom_range(0, 2);
      gaps = (f >= 3) && ($urandom_range(0, 1) == 1);
      if (m != prev_m) switches++;
      prev_m = m;
      mod_type <= 2'(m);
      mode_cnt[m]++;
      for (int i = 0; i < 4; i++) w[i] = $urandom();
      @(posedge aclk);
      fork
        drive_in(bps_of(m), gaps);
        collect_out(m, gaps);
      join
      if (!gaps) begin
        chk(t_first_out - t_first_in == LAT[m],
            $sformatf("mode %0d latency %0d", m, t_first_out - t_first_in));
        chk(t_last_out - t_first_out == 63, "output burst not contiguous");
      end
    end
    // mod_type 11: nothing selected
    mod_type <= 2'b11;
    s_tvalid <= 1'b1;
    repeat (20) begin
      @(posedge aclk);
      chk(!s_tready && !m_tvalid, "mod_type 11 active");
    end
    s_tvalid <= 1'b0;
    chk(mode_cnt[0] > 0 && mode_cnt[1] > 0 && mode_cnt[2] > 0, "a mode was never used");
    chk(switches > 0, "no mode change");
    chk(stalls > 0, "no output stall");
    $display("modes %0d/%0d/%0d switches %0d stalls %0d", mode_cnt[0], mode_cnt[1], mode_cnt[2], switches, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250 * NFRAMES + 200) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
