// tb_siphash_axi -- end-to-end test of the SipHash-2-4 accelerator at its
// default parameters.
//
// A processor model programs the key over AXI-Lite, a stream source sends
// padded messages on the input AXI-Stream, and a sink takes the hashes from
// the output stream; the last hash and the hash count are also read back over
// AXI-Lite. Every hash is compared with the reference model. The test makes
// each mechanism of the design happen and counts it:
//   init      a message started from the key-derived initial state
//   feedback  a word absorbed into the running state
//   b2b       a message starting in the cycle right after the previous TLAST
//   latency   a hash appearing D+1 = 5 cycles after its TLAST beat
//   hold      the output beat held while TREADY is low
//   overwrite an unread hash replaced by a newer one
//   srst      a soft reset issued in the middle of a message
//   rekey     a key change between messages
// A mechanism that never happened counts as a failure.
module tb_siphash_axi;
  import siphash_ref_pkg::*;

  localparam int D = 4;
  localparam int C = 2;

  logic        clk = 1'b0;
  logic        aresetn;
  logic [4:0]  awaddr, araddr;
  logic        awvalid, wvalid, bready, arvalid, rready;
  logic [31:0] wdata;
  logic [3:0]  wstrb;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  logic [63:0] s_tdata, m_tdata;
  logic        s_tvalid, s_tlast, s_tready, m_tvalid, m_tlast, m_tready;
  int          checks = 0, failures = 0;
  int          cycle = 0;
  int          n_init = 0, n_feedback = 0, n_b2b = 0, n_latency = 0, n_hold = 0;
  int          n_overwrite = 0, n_srst = 0, n_rekey = 0;
  int          n_hashes = 0;
  u64          key0, key1;

  typedef struct { u64 h; int at; } exp_t;
  exp_t exp_q [$];

  siphash_axi dut (
    .aclk(clk), .aresetn(aresetn),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tlast(s_tlast),
    .s_axis_tready(s_tready),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tlast(m_tlast),
    .m_axis_tready(m_tready)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // ---------------- AXI-Lite master ----------------
  task automatic axil_write(logic [4:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1'b1; wdata = d; wstrb = 4'hf; wvalid = 1'b1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "AXI-Lite write OKAY");
  endtask

  task automatic axil_read(logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 1'b0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    check(rresp == 2'b00, "AXI-Lite read OKAY");
  endtask

  task automatic set_key(u64 k0, u64 k1);
    axil_write(5'd0,  k0[31:0]);
    axil_write(5'd4,  k0[63:32]);
    axil_write(5'd8,  k1[31:0]);
    axil_write(5'd12, k1[63:32]);
    key0 = k0; key1 = k1;
    n_rekey++;
  endtask

  task automatic soft_reset();
    axil_write(5'd16, 32'h1);
    axil_write(5'd16, 32'h0);
    n_srst++;
  endtask

  // ---------------- stream source ----------------
  int last_tlast_cycle = -10;

  task automatic send(bytes_t msg, bit gaps);
    words_t w = ref_pad(msg);
    foreach (w[i]) begin
      if (gaps) repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        s_tvalid = 1'b0;
      end
      @(negedge clk);
      check(s_tready, "input ready");
      s_tdata = w[i]; s_tvalid = 1'b1; s_tlast = (i == w.size() - 1);
      if (i == 0) begin
        n_init++;
        if (last_tlast_cycle == cycle) n_b2b++;
      end else begin
        n_feedback++;
      end
    end
    last_tlast_cycle = cycle + 1;
    exp_q.push_back('{ref_hash_words(w, key0, key1, C, D), cycle + 1 + D + 1});
  endtask

  task automatic idle(int n = 1);
    @(negedge clk);
    s_tvalid = 1'b0; s_tlast = 1'b0;
    repeat (n - 1) @(negedge clk);
  endtask

  // ---------------- stream sink / scoreboard ----------------
  logic monitor_on = 1'b1;
  always @(negedge clk) begin
    if (aresetn && monitor_on && dut.hash_valid) begin
      exp_t e;
      check(exp_q.size() > 0, "unexpected hash");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        check(m_tvalid && m_tlast && m_tdata == e.h, "hash on output stream");
        check(cycle == e.at, "hash latency D+1");
        if (cycle == e.at) n_latency++;
        n_hashes++;
      end
    end
  end

  initial begin
    logic [31:0] r, rh;
    int          words, t0;
    u64          first_h;

    aresetn = 1'b0; awvalid = 0; wvalid = 0; arvalid = 0; bready = 1; rready = 1;
    awaddr = '0; araddr = '0; wdata = '0; wstrb = '0;
    s_tdata = '0; s_tvalid = 1'b0; s_tlast = 1'b0; m_tready = 1'b1;
    key0 = '0; key1 = '0;
    repeat (4) @(negedge clk);
    aresetn = 1'b1;

    // published vector through the whole system
    set_key(KAT_K0, KAT_K1);
    send(ref_counting_msg(15), 1'b0);
    idle(D + 4);
    axil_read(5'd24, r);
    axil_read(5'd28, rh);
    check({rh, r} == KAT_15BYTES_24, "published vector via registers");

    // random messages with gaps, then back to back, under two keys
    for (int k = 0; k < 2; k++) begin
      set_key({$urandom, $urandom}, {$urandom, $urandom});
      for (int m = 0; m < 20; m++) send(ref_random_msg($urandom_range(0, 64)), 1'b1);
      idle();
      words = 0;
      t0 = cycle;
      for (int m = 0; m < 20; m++) begin
        int n = $urandom_range(0, 64);
        send(ref_random_msg(n), 1'b0);
        words += n / 8 + 1;
      end
      check(cycle - t0 == words, "one word per cycle");
      idle(D + 4);
    end
    check(exp_q.size() == 0, "all hashes produced");
    axil_read(5'd20, r);
    check(r == 32'(n_hashes), "hash count register");

    // output held while the sink is not ready, then overwritten by a newer hash
    m_tready = 1'b0;
    send(ref_random_msg(30), 1'b0);
    idle(D + 4);
    first_h = m_tdata;
    check(m_tvalid, "output waits for TREADY");
    if (m_tvalid) n_hold++;
    send(ref_random_msg(31), 1'b0);
    idle(D + 4);
    check(m_tvalid && m_tdata != first_h, "unread hash overwritten");
    if (m_tvalid && m_tdata != first_h) n_overwrite++;
    m_tready = 1'b1;
    @(negedge clk);
    check(!m_tvalid, "output taken");

    // soft reset in the middle of a message: the partial message is dropped
    // and the next one starts again from the key
    monitor_on = 1'b0;
    @(negedge clk);
    s_tdata = {$urandom, $urandom}; s_tvalid = 1'b1; s_tlast = 1'b0;
    idle(2);
    soft_reset();
    axil_read(5'd20, r);
    check(r == 0, "hash count cleared by soft reset");
    monitor_on = 1'b1;
    send(ref_counting_msg(15), 1'b0);
    idle(D + 4);
    check(m_tdata == ref_hash(ref_counting_msg(15), key0, key1, C, D), "hash after soft reset");
    axil_read(5'd20, r);
    check(r == 1, "hash count after soft reset");

    // every mechanism must have happened
    check(n_init > 0,      "mechanism init exercised");
    check(n_feedback > 0,  "mechanism feedback exercised");
    check(n_b2b > 0,       "mechanism b2b exercised");
    check(n_latency > 0,   "mechanism latency exercised");
    check(n_hold > 0,      "mechanism hold exercised");
    check(n_overwrite > 0, "mechanism overwrite exercised");
    check(n_srst > 0,      "mechanism srst exercised");
    check(n_rekey > 1,     "mechanism rekey exercised");
    $display("mechanisms: init=%0d feedback=%0d b2b=%0d latency=%0d hold=%0d overwrite=%0d srst=%0d rekey=%0d",
             n_init, n_feedback, n_b2b, n_latency, n_hold, n_overwrite, n_srst, n_rekey);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
