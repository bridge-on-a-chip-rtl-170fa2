// bridge_on_a_chip -- single-chip bridge between an ATM network and an
// IEEE 802.11 wireless LAN.
//
// The chip sits between an ATM PHY (UTOPIA), a wireless PHY and one shared
// data memory. Two ARM cores, outside this RTL, run the protocol software:
// the inter-networking ARM (IWARM) does the bridge relay and network
// management, the WLAN ARM does the 802.11 MAC. Everything with a byte or
// cell rate is hardware:
//
//   ATM-SAR unit   rx_fifo -> reassembly_processor -> common memory
//                  common memory -> segmentation_processor -> tx_fifo
//                  atm_cfg_regs, programmed by IWARM, configures both
//   CMIC           cmic arbitrates SP, RP, IWARM and WLANARM for the
//                  external data memory (ports 0..3 in that order)
//   IW bus         IWARM master -> asb_decoder -> IWMEM (prog_mem_ctrl),
//                  CMIC, ATM config registers, WLAN config registers,
//                  interrupt controller, one timer
//   WLAN bus       WLANARM and the PAI DMA -> asb_arbiter -> asb_decoder ->
//                  WLANMEM, CMIC, WLAN config registers, interrupt
//                  controller, two timers, PAI registers
//   WLAN config    wlan_cfg_regs: mailbox and doorbells between the buses
//   WPAI           pai: FIFOs, DMA, FCS and TSF toward the wireless PHY
//
// Address map of both buses (bits 31:28 select the slave):
//   0x0 program memory   0x1 common memory   0x2 ATM config (IW bus only)
//   0x3 WLAN config      0x4 interrupt ctrl  0x5 timer 0
//   0x6 timer 1 (WLAN bus only)              0x7 PAI (WLAN bus only)
// Common memory addresses stored in tables and descriptors may carry the
// 0x1 region code or not: the memory controller ignores the upper bits.
//
// Interrupt sources, IW controller: 0 packet reassembled, 1 packet
// segmented, 2 WLAN doorbell, 3 timer, 4 UTOPIA parity error, 5 short
// cell, 6 bus decode error. WLAN controller: 0 frame received, 1 frame
// sent, 2 receive DMA done, 3 IW doorbell, 4 timer 0, 5 timer 1, 6 bus
// decode error.
//
// External pins (split data buses; bidirectional pads are outside):
// UTOPIA Rx and Tx, 13 signals each; data memory, 55 (20 address, 32 data,
// 3 strobes); two program memories, 35 each; wireless PHY, 20. The ARM
// cores connect through iw_m_req/iw_m_rsp and wl_m_req/wl_m_rsp and get
// iw_irq/wl_irq. One clock runs the whole chip.
//
// Following the architecture: the block set, the two independent ARM buses,
// the shared memory with its four-way arbitration, the dedicated
// segmentation and reassembly paths, the configuration registers on the
// inter-networking bus, and the pin counts. Own choices: the on-chip bus
// protocol (a simplified ASB), the address map, interrupt assignment and
// the single clock.
module bridge_on_a_chip
  import boc_pkg::*;
#(
  parameter int unsigned RX_CELLS  = 4,
  parameter int unsigned TX_CELLS  = 4,
  parameter int unsigned RCT_BITS  = 10,
  parameter int unsigned MEM_AW    = 20,
  parameter int unsigned PM_AW     = 16,
  parameter int unsigned RXF_BYTES = 4096,
  parameter int unsigned TXF_BYTES = 64,
  parameter int unsigned US_DIV    = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // UTOPIA receive
  input  logic [7:0]        utp_rx_data,
  input  logic              utp_rx_soc,
  input  logic              utp_rx_prty,
  input  logic              utp_rx_clav,
  output logic              utp_rx_enb_n,
  // UTOPIA transmit
  output logic [7:0]        utp_tx_data,
  output logic              utp_tx_soc,
  output logic              utp_tx_prty,
  output logic              utp_tx_enb_n,
  input  logic              utp_tx_clav,
  // common data memory
  output logic [MEM_AW-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata,
  output logic              mem_ce_n,
  output logic              mem_oe_n,
  output logic              mem_we_n,
  // program memory of the inter-networking unit
  output logic [PM_AW-1:0]  iwpm_addr,
  output logic [15:0]       iwpm_wdata,
  input  logic [15:0]       iwpm_rdata,
  output logic              iwpm_ce_n,
  output logic              iwpm_oe_n,
  output logic              iwpm_we_n,
  // program memory of the WLAN unit
  output logic [PM_AW-1:0]  wlpm_addr,
  output logic [15:0]       wlpm_wdata,
  input  logic [15:0]       wlpm_rdata,
  output logic              wlpm_ce_n,
  output logic              wlpm_oe_n,
  output logic              wlpm_we_n,
  // wireless PHY
  output logic [7:0]        phy_tx_data,
  output logic              phy_tx_en,
  input  logic              phy_tx_rdy,
  input  logic [7:0]        phy_rx_data,
  input  logic              phy_rx_valid,
  input  logic              phy_rx_end,
  // the two ARM cores
  input  bus_req_t          iw_m_req,
  output bus_rsp_t          iw_m_rsp,
  output logic              iw_irq,
  input  bus_req_t          wl_m_req,
  output bus_rsp_t          wl_m_rsp,
  output logic              wl_irq,
  // activity strobes for monitoring
  output logic              mem_contention,
  output logic              wlan_bus_conflict
);

  // ---------------- ATM-SAR unit ----------------
  atm_cfg_t atm_cfg;
  rp_stat_t rp_stat;
  sp_stat_t sp_stat;
  logic       rxf_avail, rxf_rd, rxf_par_err, rxf_short;
  logic [7:0] rxf_data;
  logic       txf_room, txf_wr;
  logic [7:0] txf_data;
  logic       rp_done, sp_done;

  bus_req_t cm_req [4];
  bus_rsp_t cm_rsp [4];

  rx_fifo #(.DEPTH_CELLS(RX_CELLS)) u_rx_fifo (
    .clk, .rst_n,
    .rx_data(utp_rx_data), .rx_soc(utp_rx_soc), .rx_prty(utp_rx_prty),
    .rx_clav(utp_rx_clav), .rx_enb_n(utp_rx_enb_n),
    .rd_en(rxf_rd), .rd_data(rxf_data), .cell_avail(rxf_avail),
    .err_parity(rxf_par_err), .err_short(rxf_short)
  );

  reassembly_processor #(.RCT_BITS(RCT_BITS)) u_rp (
    .clk, .rst_n, .cfg(atm_cfg),
    .fifo_avail(rxf_avail), .fifo_data(rxf_data), .fifo_rd(rxf_rd),
    .m_req(cm_req[1]), .m_rsp(cm_rsp[1]), .stat(rp_stat), .pkt_done(rp_done)
  );

  segmentation_processor u_sp (
    .clk, .rst_n, .cfg(atm_cfg),
    .fifo_room(txf_room), .fifo_wr(txf_wr), .fifo_data(txf_data),
    .m_req(cm_req[0]), .m_rsp(cm_rsp[0]), .stat(sp_stat), .pkt_done(sp_done)
  );

  tx_fifo #(.DEPTH_CELLS(TX_CELLS)) u_tx_fifo (
    .clk, .rst_n,
    .wr_en(txf_wr), .wr_data(txf_data), .cell_room(txf_room),
    .tx_data(utp_tx_data), .tx_soc(utp_tx_soc), .tx_prty(utp_tx_prty),
    .tx_enb_n(utp_tx_enb_n), .tx_clav(utp_tx_clav)
  );

  // ---------------- common memory interface controller ----------------
  cmic #(.NM(4), .ADDR_W(MEM_AW)) u_cmic (
    .clk, .rst_n, .s_req(cm_req), .s_rsp(cm_rsp),
    .mem_addr, .mem_wdata, .mem_rdata, .mem_ce_n, .mem_oe_n, .mem_we_n,
    .contention(mem_contention)
  );

  // ---------------- inter-networking bus ----------------
  localparam int unsigned IW_NS = 6;
  bus_req_t iw_s_req [IW_NS];
  bus_rsp_t iw_s_rsp [IW_NS];
  logic     iw_dec_err, iw_tmr_irq, db_to_iw, db_to_wl;

  asb_decoder #(.NS(IW_NS), .REGIONS(24'h54_3210)) u_iw_dec (
    .clk, .rst_n, .m_req(iw_m_req), .m_rsp(iw_m_rsp),
    .s_req(iw_s_req), .s_rsp(iw_s_rsp), .err(iw_dec_err)
  );

  prog_mem_ctrl #(.PADDR_W(PM_AW)) u_iwmem (
    .clk, .rst_n, .s_req(iw_s_req[0]), .s_rsp(iw_s_rsp[0]),
    .pm_addr(iwpm_addr), .pm_wdata(iwpm_wdata), .pm_rdata(iwpm_rdata),
    .pm_ce_n(iwpm_ce_n), .pm_oe_n(iwpm_oe_n), .pm_we_n(iwpm_we_n)
  );

  assign cm_req[2]    = iw_s_req[1];
  assign iw_s_rsp[1]  = cm_rsp[2];

  atm_cfg_regs u_atm_cfg (
    .clk, .rst_n, .s_req(iw_s_req[2]), .s_rsp(iw_s_rsp[2]),
    .cfg(atm_cfg), .rp_stat(rp_stat), .sp_stat(sp_stat)
  );

  int_ctrl #(.NSRC(8)) u_iw_intc (
    .clk, .rst_n, .s_req(iw_s_req[4]), .s_rsp(iw_s_rsp[4]),
    .src({1'b0, iw_dec_err, rxf_short, rxf_par_err, iw_tmr_irq, db_to_iw, sp_done, rp_done}),
    .irq(iw_irq)
  );

  timer32 u_iw_timer (
    .clk, .rst_n, .s_req(iw_s_req[5]), .s_rsp(iw_s_rsp[5]), .irq(iw_tmr_irq)
  );

  // ---------------- WLAN config registers (both buses) ----------------
  localparam int unsigned WL_NS = 7;
  bus_req_t wl_s_req [WL_NS];
  bus_rsp_t wl_s_rsp [WL_NS];

  wlan_cfg_regs u_wlan_cfg (
    .clk, .rst_n,
    .iw_req(iw_s_req[3]), .iw_rsp(iw_s_rsp[3]),
    .wl_req(wl_s_req[2]), .wl_rsp(wl_s_rsp[2]),
    .irq_to_iw(db_to_iw), .irq_to_wl(db_to_wl)
  );

  // ---------------- WLAN bus ----------------
  bus_req_t wl_arb_req [2];
  bus_rsp_t wl_arb_rsp [2];
  bus_req_t wl_bus_req;
  bus_rsp_t wl_bus_rsp;
  bus_req_t pai_dma_req;
  bus_rsp_t pai_dma_rsp;
  logic     wl_dec_err, wl_tmr0_irq, wl_tmr1_irq, pai_irq_rx, pai_irq_tx, pai_irq_dma;

  assign wl_arb_req[0] = wl_m_req;
  assign wl_m_rsp      = wl_arb_rsp[0];
  assign wl_arb_req[1] = pai_dma_req;
  assign pai_dma_rsp   = wl_arb_rsp[1];

  asb_arbiter u_wl_arb (
    .clk, .rst_n, .m_req(wl_arb_req), .m_rsp(wl_arb_rsp),
    .s_req(wl_bus_req), .s_rsp(wl_bus_rsp), .conflict(wlan_bus_conflict)
  );

  asb_decoder #(.NS(WL_NS), .REGIONS(28'h765_4310)) u_wl_dec (
    .clk, .rst_n, .m_req(wl_bus_req), .m_rsp(wl_bus_rsp),
    .s_req(wl_s_req), .s_rsp(wl_s_rsp), .err(wl_dec_err)
  );

  prog_mem_ctrl #(.PADDR_W(PM_AW)) u_wlanmem (
    .clk, .rst_n, .s_req(wl_s_req[0]), .s_rsp(wl_s_rsp[0]),
    .pm_addr(wlpm_addr), .pm_wdata(wlpm_wdata), .pm_rdata(wlpm_rdata),
    .pm_ce_n(wlpm_ce_n), .pm_oe_n(wlpm_oe_n), .pm_we_n(wlpm_we_n)
  );

  assign cm_req[3]   = wl_s_req[1];
  assign wl_s_rsp[1] = cm_rsp[3];

  int_ctrl #(.NSRC(8)) u_wl_intc (
    .clk, .rst_n, .s_req(wl_s_req[3]), .s_rsp(wl_s_rsp[3]),
    .src({1'b0, wl_dec_err, wl_tmr1_irq, wl_tmr0_irq, db_to_wl, pai_irq_dma, pai_irq_tx, pai_irq_rx}),
    .irq(wl_irq)
  );

  timer32 u_wl_timer0 (
    .clk, .rst_n, .s_req(wl_s_req[4]), .s_rsp(wl_s_rsp[4]), .irq(wl_tmr0_irq)
  );

  timer32 u_wl_timer1 (
    .clk, .rst_n, .s_req(wl_s_req[5]), .s_rsp(wl_s_rsp[5]), .irq(wl_tmr1_irq)
  );

  pai #(.RXF_BYTES(RXF_BYTES), .TXF_BYTES(TXF_BYTES), .US_DIV(US_DIV)) u_pai (
    .clk, .rst_n, .s_req(wl_s_req[6]), .s_rsp(wl_s_rsp[6]),
    .m_req(pai_dma_req), .m_rsp(pai_dma_rsp),
    .tx_data(phy_tx_data), .tx_en(phy_tx_en), .tx_rdy(phy_tx_rdy),
    .rx_data(phy_rx_data), .rx_valid(phy_rx_valid), .rx_end(phy_rx_end),
    .irq_rx(pai_irq_rx), .irq_tx(pai_irq_tx), .irq_dma(pai_irq_dma)
  );

endmodule
