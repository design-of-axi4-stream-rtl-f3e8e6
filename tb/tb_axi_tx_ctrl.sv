// tb_axi_tx_ctrl: checks the AXI4-Lite register slave and its stream output.
//
// For each mod_type it writes the data registers in order and checks that
// exactly the write to DATA0 (BPSK), DATA1 (QPSK) or DATA3 (QAM-16) starts a
// stream of 1, 2 or 4 words equal to the register contents, with TLAST on
// the last word, under a randomly stalling receiver. It checks that writes
// wait while a stream is pending, that mod_type 11 streams nothing, that
// strobes and read-back work and that mod_type follows CTRL[1:0].
module tb_axi_tx_ctrl;
  logic        aclk = 0, aresetn = 0;
  logic [31:0] awaddr, wdata, araddr, rdata, s_tdata;
  logic [3:0]  wstrb;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready;
  logic [1:0]  bresp, rresp, mod_type;
  logic        s_tvalid, s_tlast, s_tready;

  axi_tx_ctrl #(.ADDR_W(32)) dut (
    .aclk, .aresetn,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .mod_type,
    .m_axis_tdata(s_tdata), .m_axis_tvalid(s_tvalid), .m_axis_tlast(s_tlast), .m_axis_tready(s_tready)
  );

  always #5 aclk = ~aclk;
  int cyc = 0;
  always @(posedge aclk) cyc++;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d] %s", cyc, what); end
  endtask

  // receiver: random ready, records words
  logic [31:0] got [$];
  logic        got_last [$];
  int          waits = 0;
  bit          hold = 0;
  always @(posedge aclk) begin
    if (s_tvalid && s_tready) begin got.push_back(s_tdata); got_last.push_back(s_tlast); end
    if (awvalid && wvalid && !awready && s_tvalid) waits++;
    s_tready <= !hold && ($urandom_range(0, 3) == 0);
  end

  task automatic axi_write(logic [31:0] addr, logic [31:0] data, logic [3:0] strb = 4'hf);
    awaddr <= addr; wdata <= data; wstrb <= strb; awvalid <= 1; wvalid <= 1;
    @(posedge aclk);
    while (!(awready && wready)) @(posedge aclk);
    awvalid <= 0; wvalid <= 0;
    while (!bvalid) @(posedge aclk);
    chk(bresp == 2'b00, "bresp");
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

  task automatic drain();
    int g = 0;
    while ((s_tvalid || got.size() == 0) && g < 200) begin @(posedge aclk); g++; end
    repeat (2) @(posedge aclk);
  endtask

  initial begin
    logic [31:0] v [4];
    logic [31:0] rd;
    int n, trig;
    awaddr = 0; wdata = 0; wstrb = 0; awvalid = 0; wvalid = 0; bready = 1;
    araddr = 0; arvalid = 0; rready = 1;
    repeat (3) @(posedge aclk);
    aresetn <= 1;
    @(posedge aclk);
    for (int rep = 0; rep < 8; rep++) begin
      for (int m = 0; m < 3; m++) begin
        n = (m == 0) ? 1 : (m == 1) ? 2 : 4;
        trig = n - 1;
        axi_write(32'h00, 32'(m));
        chk(mod_type == 2'(m), "mod_type output");
        got.delete(); got_last.delete();
        for (int i = 0; i < 4; i++) begin
          v[i] = $urandom();
          axi_write(32'h10 + 32'(4 * i), v[i]);
          if (i < trig) chk(!s_tvalid && got.size() == 0, "stream started before the trigger register");
          if (i == trig) drain();
          if (i == trig) begin
            chk(got.size() == n, $sformatf("mode %0d: %0d words", m, got.size()));
            for (int j = 0; j < got.size() && j < n; j++) begin
              chk(got[j] == v[j], $sformatf("mode %0d word %0d", m, j));
              chk(got_last[j] == (j == n - 1), "tlast");
            end
            got.delete(); got_last.delete();
          end
        end
        // writes after the trigger of BPSK/QPSK start further frames
        drain();
        got.delete(); got_last.delete();
      end
    end
    // back-to-back BPSK triggers: the second write must wait
    axi_write(32'h00, 32'h0);
    hold = 1;
    axi_write(32'h10, 32'hA);
    fork
      axi_write(32'h10, 32'hB);
      begin repeat (10) @(posedge aclk); hold = 0; end
    join
    drain();
    chk(waits > 0, "no write waited for the stream");
    // mod_type 11
    axi_write(32'h00, 32'h3);
    got.delete();
    for (int i = 0; i < 4; i++) axi_write(32'h10 + 32'(4 * i), 32'(i));
    repeat (20) @(posedge aclk);
    chk(got.size() == 0 && !s_tvalid, "mod_type 11 streamed");
    // read-back and strobes
    axi_write(32'h14, 32'h1234_5678);
    axi_write(32'h14, 32'hFFFF_FFFF, 4'b1000);
    axi_read(32'h14, rd);
    chk(rd == 32'hFF34_5678, $sformatf("strobe %h", rd));
    axi_read(32'h00, rd);
    chk(rd == 32'h3, "ctrl read");
    axi_read(32'h1C, rd);
    chk(rd == 32'h3, "data3 read");
    axi_read(32'h08, rd);
    chk(rd == 32'h0, "unmapped read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
