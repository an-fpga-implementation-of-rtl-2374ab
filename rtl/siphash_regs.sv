// siphash_regs -- AXI-Lite configuration and status registers of the core.
//
// Eight 32-bit registers at byte offsets 0..28:
//   0  (0x00)  k0[31:0]        read/write
//   1  (0x04)  k0[63:32]       read/write
//   2  (0x08)  k1[31:0]        read/write
//   3  (0x0C)  k1[63:32]       read/write
//   4  (0x10)  soft reset      read/write, bit 0 only, active high
//   5  (0x14)  hash count      read only, hashes produced since last reset
//   6  (0x18)  hash[31:0]      read only, last valid hash
//   7  (0x1C)  hash[63:32]     read only
// The register map is the one of the published architecture of this accelerator. Writes
// to read-only registers are ignored; byte strobes are honoured; every access
// answers OKAY. The hash count is cleared by the bus reset and by the soft
// reset; the keys and the soft-reset bit only by the bus reset, so software
// writes the keys, then sets and clears the soft-reset bit. These reset rules
// and the handshake details are this design's own choices.
//
// AXI-Lite handshake: a write is taken in the cycle where AWVALID and WVALID
// are both high and no write response is pending (AWREADY = WREADY = that
// condition); BVALID follows on the next cycle. A read is taken when ARVALID
// is high and no read data is pending; RVALID and RDATA follow on the next
// cycle. One transaction of each kind is outstanding at most.
//
// rst is synchronous and active high (the inverted bus reset).
module siphash_regs
  import siphash_pkg::*;
#(
  parameter int unsigned ADDR_W = 5   // byte address width, at least 5
) (
  input  logic              clk,
  input  logic              rst,
  // AXI-Lite slave
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // to / from the core
  output word_t             k0_o,
  output word_t             k1_o,
  output logic              soft_reset_o,
  input  word_t             hash_i,
  input  logic              hash_valid_i
);

  typedef enum logic [2:0] {
    REG_K0_LO  = 3'd0,
    REG_K0_HI  = 3'd1,
    REG_K1_LO  = 3'd2,
    REG_K1_HI  = 3'd3,
    REG_SRST   = 3'd4,
    REG_COUNT  = 3'd5,
    REG_HASH_LO = 3'd6,
    REG_HASH_HI = 3'd7
  } reg_idx_e;

  localparam logic [1:0] RESP_OKAY = 2'b00;

  logic [31:0] key_q [4];   // k0 lo, k0 hi, k1 lo, k1 hi
  logic        srst_bit_q;
  logic [31:0] count_q;
  logic        bvalid_q, rvalid_q;
  logic [31:0] rdata_q;
  logic        wr_en, rd_en;
  reg_idx_e    wr_idx, rd_idx;

  assign wr_en  = s_axil_awvalid && s_axil_wvalid && !bvalid_q;
  assign rd_en  = s_axil_arvalid && !rvalid_q;
  // Registers are word aligned: address bits [1:0] select a byte within the
  // word and are not decoded; bits above [4:2] are not decoded either.
  assign wr_idx = reg_idx_e'(s_axil_awaddr[4:2]);
  assign rd_idx = reg_idx_e'(s_axil_araddr[4:2]);

  assign s_axil_awready = wr_en;
  assign s_axil_wready  = wr_en;
  assign s_axil_bvalid  = bvalid_q;
  assign s_axil_bresp   = RESP_OKAY;
  assign s_axil_arready = rd_en;
  assign s_axil_rvalid  = rvalid_q;
  assign s_axil_rdata   = rdata_q;
  assign s_axil_rresp   = RESP_OKAY;

  function automatic logic [31:0] apply_strb(logic [31:0] old, logic [31:0] data,
                                             logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      r[8*b +: 8] = strb[b] ? data[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  // write channel and writable registers
  always_ff @(posedge clk) begin
    if (rst) begin
      key_q      <= '{default: '0};
      srst_bit_q <= 1'b0;
      bvalid_q   <= 1'b0;
    end else begin
      if (wr_en) begin
        bvalid_q <= 1'b1;
        case (wr_idx)
          REG_K0_LO, REG_K0_HI, REG_K1_LO, REG_K1_HI:
            key_q[wr_idx[1:0]] <= apply_strb(key_q[wr_idx[1:0]], s_axil_wdata, s_axil_wstrb);
          REG_SRST:
            if (s_axil_wstrb[0]) srst_bit_q <= s_axil_wdata[0];
          default: ;  // read-only registers
        endcase
      end else if (s_axil_bready) begin
        bvalid_q <= 1'b0;
      end
    end
  end

  // hash counter, cleared by either reset
  always_ff @(posedge clk) begin
    if (rst || srst_bit_q)
      count_q <= '0;
    else if (hash_valid_i)
      count_q <= count_q + 32'd1;
  end

  // read channel
  always_ff @(posedge clk) begin
    if (rst) begin
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else if (rd_en) begin
      rvalid_q <= 1'b1;
      unique case (rd_idx)
        REG_K0_LO, REG_K0_HI, REG_K1_LO, REG_K1_HI: rdata_q <= key_q[rd_idx[1:0]];
        REG_SRST:    rdata_q <= {31'd0, srst_bit_q};
        REG_COUNT:   rdata_q <= count_q;
        REG_HASH_LO: rdata_q <= hash_i[31:0];
        REG_HASH_HI: rdata_q <= hash_i[63:32];
      endcase
    end else if (s_axil_rready) begin
      rvalid_q <= 1'b0;
    end
  end

  assign k0_o         = {key_q[1], key_q[0]};
  assign k1_o         = {key_q[3], key_q[2]};
  assign soft_reset_o = srst_bit_q;

  // AXI-Lite: responses stay valid and stable until accepted.
  a_b_hold : assert property (@(posedge clk) disable iff (rst)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_r_hold : assert property (@(posedge clk) disable iff (rst)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));

endmodule
