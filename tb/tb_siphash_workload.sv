// tb_siphash_workload -- runs the message sizes of the throughput study on
// SipHash-2-4 and SipHash-1-3 accelerators side by side.
//
// Messages of 2^3 .. 2^20 bytes (8 bytes to 1 MiB), plus the same sizes less
// one byte, are streamed at one word per cycle into both accelerators, which
// share the key programmed over AXI-Lite and the input stream. For each
// message the hash is checked against the reference model and the time from
// the first word to the hash is checked to be w + D + 1 cycles for a message
// of w padded words. The cycles per byte and the throughput this gives at a
// 214.3 MHz clock are printed; for long messages they approach 0.125
// cycles/byte and 64 bits x 214.3 MHz = 13.7 Gbit/s.
module tb_siphash_workload;
  import siphash_ref_pkg::*;

  logic        clk = 1'b0;
  logic        aresetn;
  logic [4:0]  awaddr, araddr;
  logic        awvalid, wvalid, arvalid;
  logic [31:0] wdata;
  logic        awready [2], wready [2], bvalid [2], arready [2], rvalid [2];
  logic [1:0]  bresp [2], rresp [2];
  logic [31:0] rdata [2];
  logic [63:0] s_tdata, m_tdata [2];
  logic        s_tvalid, s_tlast, s_tready [2], m_tvalid [2], m_tlast [2];
  int          checks = 0, failures = 0;
  int          cycle = 0;
  int          hv_cycle [2];
  u64          key0, key1;

  // instance 0: SipHash-2-4 (defaults), instance 1: SipHash-1-3
  siphash_axi dut24 (
    .aclk(clk), .aresetn(aresetn),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready[0]),
    .s_axil_wdata(wdata), .s_axil_wstrb(4'hf), .s_axil_wvalid(wvalid), .s_axil_wready(wready[0]),
    .s_axil_bresp(bresp[0]), .s_axil_bvalid(bvalid[0]), .s_axil_bready(1'b1),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready[0]),
    .s_axil_rdata(rdata[0]), .s_axil_rresp(rresp[0]), .s_axil_rvalid(rvalid[0]),
    .s_axil_rready(1'b1),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tlast(s_tlast),
    .s_axis_tready(s_tready[0]),
    .m_axis_tdata(m_tdata[0]), .m_axis_tvalid(m_tvalid[0]), .m_axis_tlast(m_tlast[0]),
    .m_axis_tready(1'b1)
  );
  siphash_axi #(.C_ROUNDS(1), .D_ROUNDS(3)) dut13 (
    .aclk(clk), .aresetn(aresetn),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready[1]),
    .s_axil_wdata(wdata), .s_axil_wstrb(4'hf), .s_axil_wvalid(wvalid), .s_axil_wready(wready[1]),
    .s_axil_bresp(bresp[1]), .s_axil_bvalid(bvalid[1]), .s_axil_bready(1'b1),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready[1]),
    .s_axil_rdata(rdata[1]), .s_axil_rresp(rresp[1]), .s_axil_rvalid(rvalid[1]),
    .s_axil_rready(1'b1),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tlast(s_tlast),
    .s_axis_tready(s_tready[1]),
    .m_axis_tdata(m_tdata[1]), .m_axis_tvalid(m_tvalid[1]), .m_axis_tlast(m_tlast[1]),
    .m_axis_tready(1'b1)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // cycle in which each output stream offers a new hash
  always @(negedge clk) begin
    if (m_tvalid[0]) hv_cycle[0] = cycle;
    if (m_tvalid[1]) hv_cycle[1] = cycle;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  task automatic axil_write(logic [4:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1'b1; wdata = d; wvalid = 1'b1;
    do @(posedge clk); while (!(awready[0] && wready[0] && awready[1] && wready[1]));
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
  endtask

  task automatic run_size(int nbytes);
    bytes_t msg = ref_random_msg(nbytes);
    words_t w   = ref_pad(msg);
    int     t_first, expect24, expect13;
    u64     h24 = ref_hash_words(w, key0, key1, 2, 4);
    u64     h13 = ref_hash_words(w, key0, key1, 1, 3);
    hv_cycle = '{-1, -1};
    foreach (w[i]) begin
      @(negedge clk);
      s_tdata = w[i]; s_tvalid = 1'b1; s_tlast = (i == w.size() - 1);
      if (i == 0) t_first = cycle;
    end
    @(negedge clk);
    s_tvalid = 1'b0; s_tlast = 1'b0;
    repeat (6) @(negedge clk);
    // clock cycles from the one that presents the first word to the one in
    // which the hash is offered on the output, both counted
    expect24 = w.size() + 4 + 1;
    expect13 = w.size() + 3 + 1;
    check(m_tdata[0] == h24, "SipHash-2-4 hash");
    check(m_tdata[1] == h13, "SipHash-1-3 hash");
    check(hv_cycle[0] - t_first == expect24, "SipHash-2-4 cycles");
    check(hv_cycle[1] - t_first == expect13, "SipHash-1-3 cycles");
    $display("%8d bytes %6d words: 2-4 %0d cycles %.4f cyc/B %.2f Gbit/s | 1-3 %0d cycles %.4f cyc/B",
             nbytes, w.size(), hv_cycle[0] - t_first,
             real'(hv_cycle[0] - t_first) / nbytes,
             8.0 * nbytes * 214.3e6 / (hv_cycle[0] - t_first) / 1.0e9,
             hv_cycle[1] - t_first,
             real'(hv_cycle[1] - t_first) / nbytes);
  endtask

  initial begin
    aresetn = 1'b0; awvalid = 0; wvalid = 0; arvalid = 0; awaddr = '0; araddr = '0; wdata = '0;
    s_tdata = '0; s_tvalid = 1'b0; s_tlast = 1'b0;
    repeat (4) @(negedge clk);
    aresetn = 1'b1;
    key0 = {$urandom, $urandom};
    key1 = {$urandom, $urandom};
    axil_write(5'd0,  key0[31:0]);
    axil_write(5'd4,  key0[63:32]);
    axil_write(5'd8,  key1[31:0]);
    axil_write(5'd12, key1[63:32]);
    for (int p = 3; p <= 20; p++) begin
      run_size(1 << p);
      run_size((1 << p) - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
