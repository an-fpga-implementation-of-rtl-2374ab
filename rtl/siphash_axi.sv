// siphash_axi -- SipHash-C-D accelerator: core plus AXI-Lite register block.
//
// This is the unit a system instantiates: messages stream in on the slave
// AXI-Stream port (64-bit words, already padded, TLAST on the last word),
// hashes stream out on the master AXI-Stream port, and a processor sets the
// 128-bit key, soft-resets the core and reads the last hash and the number of
// hashes through the AXI-Lite registers of siphash_regs.
//
// All logic runs on aclk. The core is reset when aresetn is low or the
// soft-reset register bit is set; the register block itself only by aresetn,
// so the keys survive a soft reset. While in reset the core drops
// s_axis_tready.
//
// Throughput: one 64-bit word per cycle, so a message of w words takes w
// cycles of the input and its hash appears D_ROUNDS + 1 cycles after the
// last word; back-to-back messages hide that latency.
//
// Defaults give SipHash-2-4; C_ROUNDS = 1, D_ROUNDS = 3 gives SipHash-1-3.
module siphash_axi
  import siphash_pkg::*;
#(
  parameter int unsigned C_ROUNDS = 2,
  parameter int unsigned D_ROUNDS = 4
) (
  input  logic        aclk,
  input  logic        aresetn,
  // AXI-Lite configuration port
  input  logic [4:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [4:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // message input stream
  input  logic [63:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  input  logic        s_axis_tlast,
  output logic        s_axis_tready,
  // hash output stream
  output logic [63:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  output logic        m_axis_tlast,
  input  logic        m_axis_tready
);

  logic  bus_rst;
  logic  soft_reset;
  logic  core_rst;
  word_t k0, k1;
  word_t hash;
  logic  hash_valid;

  assign bus_rst  = !aresetn;
  assign core_rst = bus_rst || soft_reset;

  siphash_regs #(.ADDR_W(5)) u_regs (
    .clk            (aclk),
    .rst            (bus_rst),
    .s_axil_awaddr  (s_axil_awaddr),
    .s_axil_awvalid (s_axil_awvalid),
    .s_axil_awready (s_axil_awready),
    .s_axil_wdata   (s_axil_wdata),
    .s_axil_wstrb   (s_axil_wstrb),
    .s_axil_wvalid  (s_axil_wvalid),
    .s_axil_wready  (s_axil_wready),
    .s_axil_bresp   (s_axil_bresp),
    .s_axil_bvalid  (s_axil_bvalid),
    .s_axil_bready  (s_axil_bready),
    .s_axil_araddr  (s_axil_araddr),
    .s_axil_arvalid (s_axil_arvalid),
    .s_axil_arready (s_axil_arready),
    .s_axil_rdata   (s_axil_rdata),
    .s_axil_rresp   (s_axil_rresp),
    .s_axil_rvalid  (s_axil_rvalid),
    .s_axil_rready  (s_axil_rready),
    .k0_o           (k0),
    .k1_o           (k1),
    .soft_reset_o   (soft_reset),
    .hash_i         (hash),
    .hash_valid_i   (hash_valid)
  );

  siphash_core #(.C_ROUNDS(C_ROUNDS), .D_ROUNDS(D_ROUNDS)) u_core (
    .clk           (aclk),
    .srst          (core_rst),
    .k0            (k0),
    .k1            (k1),
    .s_axis_tdata  (s_axis_tdata),
    .s_axis_tvalid (s_axis_tvalid),
    .s_axis_tlast  (s_axis_tlast),
    .s_axis_tready (s_axis_tready),
    .m_axis_tdata  (m_axis_tdata),
    .m_axis_tvalid (m_axis_tvalid),
    .m_axis_tlast  (m_axis_tlast),
    .m_axis_tready (m_axis_tready),
    .hash_o        (hash),
    .hash_valid_o  (hash_valid)
  );

endmodule
