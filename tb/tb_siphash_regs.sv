// tb_siphash_regs -- checks the AXI-Lite register block.
//
// Writes and reads back the four key registers (also with partial byte
// strobes and with the address arriving before the data), checks that
// read-only registers ignore writes, that the hash count follows the
// hash-valid pulses and is cleared by the soft_rst-reset bit, that the hash
// registers show the hash input, and that responses wait for BREADY/RREADY.
module tb_siphash_regs;
  import siphash_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [4:0]  awaddr, araddr;
  logic        awvalid, wvalid, bready, arvalid, rready;
  logic [31:0] wdata;
  logic [3:0]  wstrb;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  word_t       k0, k1, hash;
  logic        soft_rst, hvalid;
  int          checks = 0, failures = 0;

  siphash_regs dut (
    .clk(clk), .rst(rst),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .k0_o(k0), .k1_o(k1), .soft_reset_o(soft_rst), .hash_i(hash), .hash_valid_i(hvalid)
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // write; the data phase is delayed by 'lag' cycles after the address
  task automatic axil_write(logic [4:0] a, logic [31:0] d, logic [3:0] s = 4'hf, int lag = 0);
    @(negedge clk);
    awaddr = a; awvalid = 1'b1;
    repeat (lag) begin
      @(negedge clk);
      check(!awready, "no AWREADY before data");
    end
    wdata = d; wstrb = s; wvalid = 1'b1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    check(bvalid && bresp == 2'b00, "write response");
    bready = 1'b0;
    @(negedge clk);
    check(bvalid, "BVALID held");
    bready = 1'b1;
    @(negedge clk);
    check(!bvalid, "BVALID cleared");
  endtask

  task automatic axil_read(logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 1'b0;
    rready  = 1'b0;
    check(rvalid && rresp == 2'b00, "read response");
    d = rdata;
    @(negedge clk);
    check(rvalid && rdata == d, "RDATA held");
    rready = 1'b1;
    @(negedge clk);
    check(!rvalid, "RVALID cleared");
  endtask

  initial begin
    logic [31:0] r;
    logic [31:0] kv [4];
    rst = 1'b1; awvalid = 0; wvalid = 0; arvalid = 0; bready = 1; rready = 1;
    awaddr = '0; araddr = '0; wdata = '0; wstrb = '0; hash = '0; hvalid = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    foreach (kv[i]) begin
      kv[i] = $urandom;
      axil_write(5'(4 * i), kv[i], 4'hf, i);
    end
    check(k0 == {kv[1], kv[0]} && k1 == {kv[3], kv[2]}, "key outputs");
    foreach (kv[i]) begin
      axil_read(5'(4 * i), r);
      check(r == kv[i], "key readback");
    end
    // partial strobe: only byte 2 of k1[63:32]
    axil_write(5'd12, 32'hAABBCCDD, 4'b0100);
    kv[3][23:16] = 8'hBB;
    axil_read(5'd12, r);
    check(r == kv[3] && k1[63:32] == kv[3], "byte strobe");

    // read-only registers ignore writes
    axil_write(5'd20, 32'h12345678);
    axil_write(5'd24, 32'h12345678);
    axil_read(5'd20, r);
    check(r == 0, "count starts at zero and is read only");

    // hashes arrive
    for (int i = 0; i < 7; i++) begin
      @(negedge clk);
      hash = {$urandom, $urandom}; hvalid = 1'b1;
      @(negedge clk);
      hvalid = 1'b0;
    end
    axil_read(5'd20, r);
    check(r == 7, "hash count");
    axil_read(5'd24, r);
    check(r == hash[31:0], "hash low");
    axil_read(5'd28, r);
    check(r == hash[63:32], "hash high");

    // soft reset
    axil_write(5'd16, 32'h1);
    check(soft_rst, "soft reset asserted");
    axil_read(5'd16, r);
    check(r == 1, "soft reset readback");
    axil_write(5'd16, 32'h0);
    check(!soft_rst, "soft reset released");
    axil_read(5'd20, r);
    check(r == 0, "count cleared by soft reset");
    axil_read(5'd0, r);
    check(r == kv[0], "key kept over soft reset");

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
