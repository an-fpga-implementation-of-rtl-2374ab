// tb_siphash_finalize -- checks the finalization pipeline.
//
// Random compressed states are started with random gaps and back to back.
// Each hash must appear on hash_o with hash_valid_o exactly D clock edges after
// the edge that samples its start, in order, and hash_o must keep its value while no new hash
// arrives.
module tb_siphash_finalize;
  import siphash_pkg::*;
  import siphash_ref_pkg::*;

  localparam int D = 4;

  logic   clk = 1'b0;
  logic   srst;
  state_t st;
  logic   start;
  word_t  hash;
  logic   hvalid;
  int     checks = 0, failures = 0;
  int     cycle = 0;
  int     started = 0, seen = 0;

  u64 exp_hash [$];
  int exp_cycle [$];
  u64 last_hash = '0;

  siphash_finalize #(.D_ROUNDS(D)) dut (
    .clk(clk), .srst(srst), .state_i(st), .start_i(start),
    .hash_o(hash), .hash_valid_o(hvalid)
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

  // monitor, sampled mid-cycle
  always @(negedge clk) begin
    if (!srst) begin
      if (hvalid) begin
        check(exp_hash.size() > 0, "unexpected hash");
        if (exp_hash.size() > 0) begin
          check(hash == exp_hash[0], "hash value");
          check(cycle == exp_cycle[0], "hash latency D");
          last_hash = exp_hash.pop_front();
          void'(exp_cycle.pop_front());
          seen++;
        end
      end else begin
        check(hash == last_hash, "hash held");
      end
    end
  end

  initial begin
    st_t v;
    srst = 1'b1; start = 1'b0; st = '0;
    repeat (3) @(negedge clk);
    srst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      #1;
      foreach (v[w]) v[w] = {$urandom, $urandom};
      st    = '{v0: v[0], v1: v[1], v2: v[2], v3: v[3]};
      start = (i < 100) ? ($urandom_range(0, 2) == 0) : 1'b1;
      if (start) begin
        // sampled at the coming posedge (cycle+1), loaded D edges later
        exp_hash.push_back(ref_final(v, D));
        exp_cycle.push_back(cycle + 1 + D);
        started++;
      end
    end
    @(negedge clk);
    start = 1'b0;
    repeat (D + 4) @(negedge clk);
    check(started == seen && started > 100, "every hash produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
