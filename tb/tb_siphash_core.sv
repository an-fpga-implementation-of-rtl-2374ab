// tb_siphash_core -- end-to-end check of the AXI-Stream SipHash core.
//
// Two cores run side by side, SipHash-2-4 and SipHash-1-3, fed the same
// stream. The stream holds the two published SipHash-2-4 vectors and random
// messages of 0..40 bytes under random keys, first with random idle cycles,
// then back to back. Every hash is compared with the reference model and its
// latency (D+1 cycles after the TLAST beat) is checked; the back-to-back
// phase must take exactly one cycle per word. Finally the output is held off
// with TREADY low to check that TVALID and the data wait for it.
module tb_siphash_core;
  import siphash_pkg::*;
  import siphash_ref_pkg::*;

  logic  clk = 1'b0;
  logic  srst;
  word_t k0, k1;
  word_t tdata;
  logic  tvalid, tlast;
  logic  tready24, tready13;
  word_t o24, o13, h24, h13;
  logic  ov24, ov13, ol24, ol13, hv24, hv13;
  logic  oready;
  int    checks = 0, failures = 0;
  int    cycle = 0;

  typedef struct { u64 h; int at; } exp_t;
  exp_t q24 [$], q13 [$];

  siphash_core #(.C_ROUNDS(2), .D_ROUNDS(4)) dut24 (
    .clk(clk), .srst(srst), .k0(k0), .k1(k1),
    .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tlast(tlast), .s_axis_tready(tready24),
    .m_axis_tdata(o24), .m_axis_tvalid(ov24), .m_axis_tlast(ol24), .m_axis_tready(oready),
    .hash_o(h24), .hash_valid_o(hv24)
  );
  siphash_core #(.C_ROUNDS(1), .D_ROUNDS(3)) dut13 (
    .clk(clk), .srst(srst), .k0(k0), .k1(k1),
    .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tlast(tlast), .s_axis_tready(tready13),
    .m_axis_tdata(o13), .m_axis_tvalid(ov13), .m_axis_tlast(ol13), .m_axis_tready(oready),
    .hash_o(h13), .hash_valid_o(hv13)
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

  // output monitors: each new hash must match the oldest expected one
  always @(negedge clk) if (!srst && hv24) begin
    check(q24.size() > 0, "2-4 unexpected hash");
    if (q24.size() > 0) begin
      exp_t e;
      e = q24.pop_front();
      check(h24 == e.h && o24 == h24 && ov24 && ol24, "2-4 hash value");
      check(cycle == e.at, "2-4 latency D+1");
    end
  end
  always @(negedge clk) if (!srst && hv13) begin
    check(q13.size() > 0, "1-3 unexpected hash");
    if (q13.size() > 0) begin
      exp_t e;
      e = q13.pop_front();
      check(h13 == e.h && o13 == h13 && ov13 && ol13, "1-3 hash value");
      check(cycle == e.at, "1-3 latency D+1");
    end
  end

  // Send one message; words go out on consecutive cycles unless gaps is set.
  // Returns the number of words sent.
  task automatic send(bytes_t msg, u64 mk0, u64 mk1, bit gaps, output int nw);
    words_t w = ref_pad(msg);
    nw = w.size();
    for (int i = 0; i < w.size(); i++) begin
      if (gaps) repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        tvalid = 1'b0;
        tdata  = {$urandom, $urandom};
      end
      @(negedge clk);
      check(tready24 && tready13, "input ready");
      k0 = (i == 0) ? mk0 : {$urandom, $urandom};
      k1 = (i == 0) ? mk1 : {$urandom, $urandom};
      tdata = w[i]; tvalid = 1'b1; tlast = (i == w.size() - 1);
    end
    // the last word is taken at the next posedge: cycle+1, hash at +D+1
    q24.push_back('{ref_hash_words(w, mk0, mk1, 2, 4), cycle + 1 + 5});
    q13.push_back('{ref_hash_words(w, mk0, mk1, 1, 3), cycle + 1 + 4});
  endtask

  task automatic idle();
    @(negedge clk);
    tvalid = 1'b0; tlast = 1'b0;
  endtask

  initial begin
    int nw, total, t0;
    u64 held;
    srst = 1'b1; tvalid = 1'b0; tlast = 1'b0; tdata = '0; k0 = '0; k1 = '0; oready = 1'b1;
    repeat (3) @(negedge clk);
    srst = 1'b0;

    // reference model against the published vectors
    check(ref_hash(ref_counting_msg(0), KAT_K0, KAT_K1, 2, 4) == KAT_EMPTY_24, "model KAT empty");
    check(ref_hash(ref_counting_msg(15), KAT_K0, KAT_K1, 2, 4) == KAT_15BYTES_24, "model KAT 15");

    send(ref_counting_msg(15), KAT_K0, KAT_K1, 1'b0, nw);
    idle();
    repeat (8) @(negedge clk);
    check(h24 == KAT_15BYTES_24, "core KAT 15 bytes");
    send(ref_counting_msg(0), KAT_K0, KAT_K1, 1'b0, nw);
    idle();
    repeat (8) @(negedge clk);
    check(h24 == KAT_EMPTY_24, "core KAT empty");

    // random messages with gaps
    for (int m = 0; m < 60; m++)
      send(ref_random_msg($urandom_range(0, 40)), {$urandom, $urandom}, {$urandom, $urandom},
           1'b1, nw);
    idle();
    repeat (8) @(negedge clk);

    // back to back: one word per cycle across message borders
    total = 0;
    t0 = cycle;
    for (int m = 0; m < 60; m++) begin
      send(ref_random_msg($urandom_range(0, 40)), {$urandom, $urandom}, {$urandom, $urandom},
           1'b0, nw);
      total += nw;
    end
    check(cycle - t0 == total, "one word per cycle");
    idle();
    repeat (8) @(negedge clk);
    check(q24.size() == 0 && q13.size() == 0, "all hashes produced");

    // output back-pressure: TVALID and data wait for TREADY
    oready = 1'b0;
    send(ref_random_msg(20), 64'h1, 64'h2, 1'b0, nw);
    idle();
    repeat (10) @(negedge clk);
    held = h24;
    check(ov24 && ov13 && o24 == held, "output held while not ready");
    oready = 1'b1;
    @(negedge clk);
    check(!ov24 && !ov13, "output taken");

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
