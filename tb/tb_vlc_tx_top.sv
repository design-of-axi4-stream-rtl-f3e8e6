// tb_vlc_tx_top: end-to-end test of the transmit front end at its default
// sizes (64-point frames, 31 data subcarriers, 4 data registers).
//
// A processor model writes CTRL and DATA0..DATA3 over AXI4-Lite; a sink
// model plays the IFFT input and checks every 64-word frame on m_axis
// against the reference model, built from the register values at the
// moment the triggering write (DATA0 / DATA1 / DATA3 for BPSK / QPSK /
// QAM-16) completed. The test covers, and counts:
//   - frames in each modulation, and changes of modulation between frames
//   - the latency from the first word entering the modulator to the first
//     output word (31, 32, 34 clocks) and a 64-clock output burst
//   - writes that do not complete a frame (no output)
//   - back-to-back frames, where register writes wait while a frame is
//     still being streamed to the busy modulator
//   - output stalls from the sink
//   - mod_type 11, which produces nothing
//   - register read-back and byte write strobes
module tb_vlc_tx_top;
  import vlc_ref_pkg::*;

  logic        aclk = 0, aresetn = 0;
  logic [31:0] awaddr, wdata, araddr, rdata, m_tdata;
  logic [3:0]  wstrb;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [1:0]  bresp, rresp;
  logic        m_tvalid, m_tlast, m_tready;

  vlc_tx_top dut (
    .aclk, .aresetn,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tlast(m_tlast), .m_axis_tready(m_tready)
  );

  always #5 aclk = ~aclk;
  int cyc = 0;
  always @(posedge aclk) cyc++;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d] %s", cyc, what); end
  endtask

  // ---------------- processor model ----------------
  logic [31:0] shadow_ctrl = 0;
  logic [31:0] shadow [4] = '{0, 0, 0, 0};
  int          q_mode [$];
  logic [127:0] q_words [$];
  int          frames_expected = 0;
  int          write_waits = 0;   // clocks a write waited for a busy stream
  int          silent_writes = 0; // data writes that must not start a frame

  function automatic int trig_of(int m);
    return (m == 0) ? 0 : (m == 1) ? 1 : 3;
  endfunction

  task automatic axi_write(logic [31:0] addr, logic [31:0] data, logic [3:0] strb = 4'hf);
    awaddr <= addr; wdata <= data; wstrb <= strb;
    awvalid <= 1; wvalid <= 1;
    @(posedge aclk);
    while (!(awready && wready)) begin
      if (dut.u_ctrl.busy_q) write_waits++;
      @(posedge aclk);
    end
    // the write happened at this clock: update the shadow model
    begin
      int idx;
      logic [31:0] old;
      idx = (addr[4:0] == 5'h00) ? -1 : int'(addr[3:2]);
      old = (idx < 0) ? shadow_ctrl : shadow[idx];
      for (int b = 0; b < 4; b++) if (strb[b]) old[8*b +: 8] = data[8*b +: 8];
      if (idx < 0) shadow_ctrl = old; else shadow[idx] = old;
      if (idx >= 0) begin
        int m = int'(shadow_ctrl[1:0]);
        if (m != 3 && idx == trig_of(m)) begin
          q_mode.push_back(m);
          q_words.push_back({shadow[3], shadow[2], shadow[1], shadow[0]});
          frames_expected++;
        end else silent_writes++;
      end
    end
    awvalid <= 0; wvalid <= 0;
    while (!bvalid) @(posedge aclk);
    @(posedge aclk);
  endtask

  task automatic axi_read(logic [31:0] addr, output logic [31:0] data);
    araddr <= addr; arvalid <= 1;
    @(posedge aclk);
    while (!arready) @(posedge aclk);
    arvalid <= 0;
    while (!rvalid) @(posedge aclk);
    data = rdata;
    @(posedge aclk);
  endtask

  // ---------------- IFFT-side sink ----------------
  int frames_seen = 0, out_idx = 0, stalls = 0;
  int cur_m;
  logic [31:0] cur_w [4];
  bit sink_stall_en = 0;
  int mode_frames [3] = '{0, 0, 0};
  int mode_switches = 0, last_mode = -1;

  always @(posedge aclk) if (aresetn) begin
    if (m_tvalid && !m_tready) stalls++;
    if (m_tvalid && m_tready) begin
      if (out_idx == 0) begin
        if (q_mode.size() == 0) begin
          chk(0, "unexpected output frame");
          cur_m = 0;
        end else begin
          logic [127:0] ww;
          cur_m = q_mode.pop_front();
          ww = q_words.pop_front();
          for (int i = 0; i < 4; i++) cur_w[i] = ww[32*i +: 32];
        end
      end
      chk(m_tdata == expect_word(cur_m, cur_w, out_idx, 1),
          $sformatf("frame %0d mode %0d word %0d got %h exp %h", frames_seen, cur_m, out_idx,
                    m_tdata, expect_word(cur_m, cur_w, out_idx, 1)));
      chk(m_tlast == (out_idx == 63), "tlast position");
      if (out_idx == 63) begin
        out_idx = 0;
        frames_seen++;
        mode_frames[cur_m]++;
        if (last_mode >= 0 && last_mode != cur_m) mode_switches++;
        last_mode = cur_m;
      end else out_idx++;
    end
    m_tready <= sink_stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  // latency probe: first word into the modulator to first output word
  int t_in = -1, t_out = -1;
  always @(posedge aclk) begin
    if (dut.u_mod.s_axis_tvalid && dut.u_mod.s_axis_tready && t_in < 0) t_in = cyc;
    if (m_tvalid && t_out < 0) t_out = cyc;
  end

  task automatic wait_frames();
    int guard = 0;
    while (frames_seen < frames_expected && guard < 2000) begin @(posedge aclk); guard++; end
    chk(frames_seen == frames_expected, "frame did not arrive");
  endtask

  task automatic send_frame(int m, bit measure);
    int t_first_write;
    for (int i = 0; i <= trig_of(m); i++) begin
      if (measure && i == trig_of(m)) begin t_in = -1; t_out = -1; end
      axi_write(32'h10 + 32'(4 * i), $urandom() & 32'h7fff_ffff);
    end
    if (measure) begin
      wait_frames();
      // the whole frame enters the modulator back to back, so the
      // latency is (words - 1) + 31
      chk(t_out - t_in == bps_of(m) - 1 + 31,
          $sformatf("mode %0d latency %0d", m, t_out - t_in));
    end
  endtask

  initial begin
    logic [31:0] rd;
    int m;
    awaddr = 0; wdata = 0; wstrb = 0; awvalid = 0; wvalid = 0; bready = 1;
    araddr = 0; arvalid = 0; rready = 1; m_tready = 1;
    repeat (4) @(posedge aclk);
    aresetn <= 1;
    repeat (2) @(posedge aclk);

    // 1. one measured frame per mode, sink always ready
    for (int mm = 0; mm < 3; mm++) begin
      axi_write(32'h00, 32'(mm));
      send_frame(mm, 1);
    end

    // 2. register read-back and byte strobes
    axi_write(32'h00, 32'h3);                 // mod_type 11: no frames
    axi_write(32'h18, 32'h1122_3344);
    axi_write(32'h18, 32'hAABB_CCDD, 4'b0101);
    axi_read(32'h18, rd);
    chk(rd == 32'h11BB_33DD, $sformatf("strobe readback %h", rd));
    for (int i = 0; i < 4; i++) begin
      axi_write(32'h10 + 32'(4 * i), 32'h1000 + 32'(i));
      axi_read(32'h10 + 32'(4 * i), rd);
      chk(rd == 32'h1000 + 32'(i), "data readback");
    end
    axi_read(32'h00, rd);
    chk(rd == 32'h3, "ctrl readback");
    axi_read(32'h04, rd);
    chk(rd == 32'h0, "unused register");
    repeat (200) @(posedge aclk);
    chk(frames_seen == frames_expected, "output in mod_type 11");

    // 3. random frames, random modes, sink stalls, back-to-back writes
    sink_stall_en = 1;
    for (int f = 0; f < 30; f++) begin
      m = $urandom_range(0, 2);
      if (int'(shadow_ctrl[1:0]) != m) begin
        wait_frames();                        // change mode only when idle
        axi_write(32'h00, 32'(m));
      end
      send_frame(m, 0);
    end
    wait_frames();
    sink_stall_en = 0;

    $display("frames %0d (BPSK %0d, QPSK %0d, QAM-16 %0d), mode switches %0d, stalls %0d, write waits %0d, silent writes %0d",
             frames_seen, mode_frames[0], mode_frames[1], mode_frames[2], mode_switches, stalls,
             write_waits, silent_writes);
    chk(mode_frames[0] > 0 && mode_frames[1] > 0 && mode_frames[2] > 0, "a mode never ran");
    chk(mode_switches > 0, "no mode switch");
    chk(stalls > 0, "no output stall");
    chk(write_waits > 0, "no write waited for a busy stream");
    chk(silent_writes > 0, "no non-triggering write");
    chk(q_mode.size() == 0, "frames left over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge aclk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
