// tb_rate_table: reproduces the latency and throughput tables of the
// reference system with the modulator core at a 100 MHz clock.
//
// For each mode it streams back-to-back frames into axis_modulator with an
// always-ready sink and measures, in clocks, the latency from the first
// accepted input word to the first valid output word, and the frame period.
// Expected: latency 31 / 32 / 34 clocks (310 / 320 / 340 ns); throughput =
// frame bits / latency = 95.36 / 184.77 / 347.81 Mbit/s, where Mbit is
// 2^20 bits; frame period NW + 30 + 64 clocks. Output words are also checked
// against the reference model.
module tb_rate_table;
  import vlc_ref_pkg::*;
  localparam real T_CLK_NS = 10.0;
  localparam int    LAT   [3] = '{31, 32, 34};
  localparam real   TPUT  [3] = '{95.36, 184.77, 347.81};
  localparam int    BITS  [3] = '{31, 62, 124};

  logic        aclk = 0, aresetn = 0;
  logic [1:0]  mod_type;
  logic [31:0] s_tdata, m_tdata;
  logic        s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready;
  int checks = 0, failures = 0, cyc = 0;

  axis_modulator dut (
    .aclk, .aresetn, .mod_type,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tlast(s_tlast), .s_axis_tready(s_tready),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tlast(m_tlast), .m_axis_tready(m_tready)
  );

  always #5 aclk = ~aclk;
  always @(posedge aclk) cyc++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d] %s", cyc, what); end
  endtask

  logic [31:0] w [4];
  int t_in, t_out, t_in_prev;

  task automatic one_frame(int m);
    int n = 0;
    bit first = 0;
    for (int i = 0; i < 4; i++) w[i] = $urandom();
    fork
      begin
        for (int i = 0; i < bps_of(m); i++) begin
          s_tdata <= w[i]; s_tvalid <= 1'b1; s_tlast <= (i == bps_of(m) - 1);
          @(posedge aclk);
          while (!s_tready) @(posedge aclk);
          if (i == 0) t_in = cyc;
        end
        s_tvalid <= 1'b0; s_tlast <= 1'b0;
      end
      begin
        while (n < 64) begin
          @(posedge aclk);
          if (m_tvalid && !first) begin first = 1; t_out = cyc; end
          if (m_tvalid) begin
            chk(m_tdata == expect_word(m, w, n, 1), "frame data");
            n++;
          end
        end
      end
    join
  endtask

  initial begin
    real tput;
    s_tdata = 0; s_tvalid = 0; s_tlast = 0; m_tready = 1; mod_type = 0;
    repeat (3) @(posedge aclk);
    aresetn <= 1;
    @(posedge aclk);
    for (int m = 0; m < 3; m++) begin
      mod_type <= 2'(m);
      @(posedge aclk);
      for (int f = 0; f < 4; f++) begin
        t_in_prev = t_in;
        one_frame(m);
        if (f > 0) chk(t_in - t_in_prev == bps_of(m) + 30 + 64,
                       $sformatf("mode %0d frame period %0d", m, t_in - t_in_prev));
        chk(t_out - t_in == LAT[m], $sformatf("mode %0d latency %0d", m, t_out - t_in));
      end
      tput = real'(BITS[m]) / (real'(t_out - t_in) * T_CLK_NS * 1.0e-9) / 1048576.0;
      $display("mode %0d: latency %0d clocks = %0.0f ns, throughput %0.2f Mbit/s (2^20 bits)",
               m, t_out - t_in, real'(t_out - t_in) * T_CLK_NS, tput);
      chk(tput > TPUT[m] - 0.02 && tput < TPUT[m] + 0.02, "throughput");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
