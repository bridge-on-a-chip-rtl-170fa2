// atm_cfg_regs -- configuration and status registers of the ATM-SAR unit.
//
// The inter-networking ARM sets up and controls the Segmentation and
// Reassembly Processors through these registers on the inter-networking
// ASB: the base addresses and sizes of the tables and rings the two
// processors use in common memory, the software producer/consumer indices of
// the free buffer queue and of the Rx descriptor ring, the enables, and the
// schedule slot length that sets the transmit cell rate. The processors'
// ring indices and counters read back as status.
//
// Register map (byte offsets; unlisted offsets read 0):
//   0x00 CTRL        bit0 rx_en, bit1 tx_en
//   0x04 RCT_BASE    0x08 FBQ_BASE    0x0C FBQ_SIZE   0x10 FBQ_PROD
//   0x14 RXD_BASE    0x18 RXD_SIZE    0x1C RXD_CONS   0x20 BUF_BYTES
//   0x24 TST_BASE    0x28 TST_LEN     0x2C SQD_BASE   0x30 SLOT_CYCLES
//   0x40 FBQ_CONS    0x44 RXD_PROD    0x48 RX_CELLS   0x4C RX_PKTS     (read only)
//   0x50 DROP_UNKNOWN 0x54 DROP_NOBUF 0x58 CRC_ERR
//   0x60 TX_CELLS    0x64 TX_PKTS     0x68 TST_IDX                     (read only)
//
// Bus timing: a request is taken on the first edge it is seen and answered
// with ready one cycle later (two cycles per transfer); only address bits
// 7:2 are decoded. The register set and map are this design's own; the
// architecture only says that configuration and control pass through ASB
// configuration registers inside the RP and SP.
module atm_cfg_regs
  import boc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t s_req,
  output bus_rsp_t s_rsp,
  output atm_cfg_t cfg,
  input  rp_stat_t rp_stat,
  input  sp_stat_t sp_stat
);

  logic        rdy_q;
  logic [31:0] rdata_q;
  logic        take;
  logic [5:0]  idx;

  assign take = s_req.req && !rdy_q;
  assign idx  = s_req.addr[7:2];

  function automatic logic [31:0] read_reg(logic [5:0] i, atm_cfg_t c, rp_stat_t r, sp_stat_t s);
    case (i)
      6'h00: return {30'h0, c.tx_en, c.rx_en};
      6'h01: return c.rct_base;
      6'h02: return c.fbq_base;
      6'h03: return {16'h0, c.fbq_size};
      6'h04: return {16'h0, c.fbq_prod};
      6'h05: return c.rxd_base;
      6'h06: return {16'h0, c.rxd_size};
      6'h07: return {16'h0, c.rxd_cons};
      6'h08: return {16'h0, c.buf_bytes};
      6'h09: return c.tst_base;
      6'h0A: return {16'h0, c.tst_len};
      6'h0B: return c.sqd_base;
      6'h0C: return {16'h0, c.slot_cycles};
      6'h10: return {16'h0, r.fbq_cons};
      6'h11: return {16'h0, r.rxd_prod};
      6'h12: return {16'h0, r.cells};
      6'h13: return {16'h0, r.pkts};
      6'h14: return {16'h0, r.drop_unknown};
      6'h15: return {16'h0, r.drop_nobuf};
      6'h16: return {16'h0, r.crc_err};
      6'h18: return {16'h0, s.cells};
      6'h19: return {16'h0, s.pkts};
      6'h1A: return {16'h0, s.tst_idx};
      default: return 32'h0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy_q   <= 1'b0;
      rdata_q <= '0;
      cfg     <= '0;
    end else begin
      rdy_q <= take;
      if (take) begin
        rdata_q <= read_reg(idx, cfg, rp_stat, sp_stat);
        if (s_req.we) begin
          case (idx)
            6'h00: {cfg.tx_en, cfg.rx_en} <= s_req.wdata[1:0];
            6'h01: cfg.rct_base    <= s_req.wdata;
            6'h02: cfg.fbq_base    <= s_req.wdata;
            6'h03: cfg.fbq_size    <= s_req.wdata[15:0];
            6'h04: cfg.fbq_prod    <= s_req.wdata[15:0];
            6'h05: cfg.rxd_base    <= s_req.wdata;
            6'h06: cfg.rxd_size    <= s_req.wdata[15:0];
            6'h07: cfg.rxd_cons    <= s_req.wdata[15:0];
            6'h08: cfg.buf_bytes   <= s_req.wdata[15:0];
            6'h09: cfg.tst_base    <= s_req.wdata;
            6'h0A: cfg.tst_len     <= s_req.wdata[15:0];
            6'h0B: cfg.sqd_base    <= s_req.wdata;
            6'h0C: cfg.slot_cycles <= s_req.wdata[15:0];
            default: ;
          endcase
        end
      end
    end
  end

  assign s_rsp.ready = rdy_q;
  assign s_rsp.rdata = rdata_q;

endmodule
