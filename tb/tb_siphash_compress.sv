// tb_siphash_compress -- checks the compression loop word by word.
//
// Random messages of 1..6 words are fed with random idle cycles between words
// and, in a second phase, back to back. After every accepted word the state
// register must equal the reference state; done_o must pulse exactly in the
// cycle after each last word. The key inputs are changed in the middle of
// messages to check that the key is only used for the first word.
module tb_siphash_compress;
  import siphash_pkg::*;
  import siphash_ref_pkg::*;

  localparam int C = 2;

  logic   clk = 1'b0;
  logic   srst;
  word_t  k0, k1, word;
  logic   valid, last;
  state_t st;
  logic   done;
  int     checks = 0, failures = 0;
  int     cycle = 0;

  siphash_compress #(.C_ROUNDS(C)) dut (
    .clk(clk), .srst(srst), .k0(k0), .k1(k1), .word_i(word),
    .word_valid(valid), .word_last(last), .state_o(st), .done_o(done)
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

  task automatic run_message(int nwords, bit gaps);
    st_t v;
    u64  mk0 = {$urandom, $urandom};
    u64  mk1 = {$urandom, $urandom};
    v = ref_init(mk0, mk1);
    for (int i = 0; i < nwords; i++) begin
      if (gaps) begin
        int g = $urandom_range(0, 2);
        repeat (g) begin
          @(negedge clk);
          valid = 1'b0;
          word  = {$urandom, $urandom};
          check(done == 1'b0, "done low while idle");
        end
      end
      @(negedge clk);
      if (i == 0) begin k0 = mk0; k1 = mk1; end
      else begin k0 = {$urandom, $urandom}; k1 = {$urandom, $urandom}; end
      word  = {$urandom, $urandom};
      valid = 1'b1;
      last  = (i == nwords - 1);
      v     = ref_absorb(v, word, C);
      @(negedge clk);
      valid = 1'b0;
      check(st.v0 == v[0] && st.v1 == v[1] && st.v2 == v[2] && st.v3 == v[3],
            "state after word");
      check(done == (i == nwords - 1), "done pulse");
      // for back-to-back: re-present next word in this same cycle
      if (!gaps) ;
    end
  endtask

  // back-to-back stream: words in consecutive cycles across message borders
  task automatic run_stream(int nmsg);
    st_t v;
    u64  mk0, mk1;
    int  n;
    bit  expect_done = 0;
    st_t exp_v;
    for (int m = 0; m < nmsg; m++) begin
      mk0 = {$urandom, $urandom}; mk1 = {$urandom, $urandom};
      v   = ref_init(mk0, mk1);
      n   = $urandom_range(1, 4);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        if (cycle > 0 && (m > 0 || i > 0)) begin
          check(st.v0 == exp_v[0] && st.v3 == exp_v[3] && st.v1 == exp_v[1]
                && st.v2 == exp_v[2], "stream state");
          check(done == expect_done, "stream done");
        end
        k0 = (i == 0) ? mk0 : ~mk0; k1 = (i == 0) ? mk1 : ~mk1;
        word = {$urandom, $urandom}; valid = 1'b1; last = (i == n - 1);
        v = ref_absorb(v, word, C);
        exp_v = v; expect_done = last;
      end
    end
    @(negedge clk);
    valid = 1'b0;
    check(st.v0 == exp_v[0] && st.v3 == exp_v[3], "stream final state");
    check(done == expect_done, "stream final done");
  endtask

  initial begin
    srst = 1'b1; valid = 1'b0; last = 1'b0; word = '0; k0 = '0; k1 = '0;
    repeat (3) @(negedge clk);
    srst = 1'b0;
    for (int m = 0; m < 40; m++) run_message($urandom_range(1, 6), 1'b1);
    run_stream(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
