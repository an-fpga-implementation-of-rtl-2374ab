// tb_sipround -- checks the combinational SipRound against the reference
// model on random states and on corner states (all zeros, all ones, single
// bits set), which exercise every carry chain and rotation.
module tb_sipround;
  import siphash_pkg::*;
  import siphash_ref_pkg::*;

  state_t si, so;
  int checks = 0, failures = 0;

  sipround dut (.state_i(si), .state_o(so));

  task automatic check_one(st_t v);
    st_t e;
    si = '{v0: v[0], v1: v[1], v2: v[2], v3: v[3]};
    #1;
    e = ref_round(v);
    checks++;
    if (so.v0 !== e[0] || so.v1 !== e[1] || so.v2 !== e[2] || so.v3 !== e[3]) begin
      failures++;
      $display("FAIL sipround in=%h %h %h %h got=%h %h %h %h exp=%h %h %h %h",
               v[0], v[1], v[2], v[3], so.v0, so.v1, so.v2, so.v3, e[0], e[1], e[2], e[3]);
    end
  endtask

  initial begin
    st_t v;
    v = '{default: '0};          check_one(v);
    v = '{default: '1};          check_one(v);
    for (int b = 0; b < 64; b += 7) begin
      for (int w = 0; w < 4; w++) begin
        v = '{default: '0};
        v[w][b] = 1'b1;
        check_one(v);
      end
    end
    for (int i = 0; i < 500; i++) begin
      foreach (v[w]) v[w] = {$urandom, $urandom};
      check_one(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
