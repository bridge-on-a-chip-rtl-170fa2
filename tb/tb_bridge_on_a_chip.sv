// tb_bridge_on_a_chip -- end-to-end test of the whole bridge at its default
// parameters.
//
// Around the chip sit behavioural models of everything outside it: the
// 1M x 32 common data memory and two 64K x 16 program memories (tb_sram),
// an ATM PHY that sends cells over UTOPIA receive and takes cells from
// UTOPIA transmit with random cell-available pauses, and a wireless PHY
// that sends frames and takes frames byte by byte with random ready gaps.
// The two ARM cores are played by two testbench threads that act as their
// firmware would, using only bus transfers and interrupts:
//
//   ATM -> WLAN: the inter-networking (IW) firmware configures the ATM-SAR
//     unit (connection table entry, free buffers, descriptor ring). The ATM
//     PHY sends AAL5 packets on the open VC. For each reassembled packet
//     the IW firmware reads the Rx descriptor from common memory, passes
//     its buffer address and length to the WLAN side through the mailbox
//     and rings the doorbell. The WLAN firmware writes a 24-byte 802.11
//     header in front of the payload, starts the PAI transmit DMA and polls
//     the PAI while it runs; when the frame is out it rings back, and the
//     IW firmware returns the buffer to the free buffer queue.
//   WLAN -> ATM: the wireless PHY sends frames. The WLAN firmware reads the
//     PAI receive status, starts the receive DMA into a common memory
//     buffer and, if the FCS was good, mails the body's address and length
//     to the IW side. The IW firmware builds a Tx buffer descriptor, the
//     VC's segmentation queue descriptor and the transmit schedule and
//     enables transmission; the SP segments the body into cells. Good
//     frames alternate between two mailbox slots: the first is sent on an
//     AAL5 VC, the second on an AAL3/4 VC.
//   AAL3/4 receive: a two-segment message on an AAL3/4 connection is
//     reassembled, and the IW firmware checks its descriptor.
//
// Checked against reference models (tb_pkg): every 802.11 frame on the PHY
// (header, payload and FCS), every ATM cell on UTOPIA transmit (header,
// HEC, AAL5 PDU with its CRC or AAL3/4 SAR-PDU with its CRC-10, odd parity), the program memory data, the
// reassembly counters, and the errors being caught: a cell on an unopened
// VC, a packet with a corrupted CRC, a cell with a parity error, a short
// cell, a frame with a bad FCS, accesses to unmapped addresses. Each
// mechanism is counted and one that never happened counts as a failure:
// memory contention between the four CMIC masters, WLAN bus conflicts
// between the ARM and the PAI DMA, UTOPIA back-pressure both ways, PHY
// transmit stalls, interrupts and doorbells on both cores, timer expiries,
// program memory accesses.
module tb_bridge_on_a_chip;
  import boc_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  utp_rx_data = 0;
  logic        utp_rx_soc = 0, utp_rx_prty = 1, utp_rx_clav = 0, utp_rx_enb_n;
  logic [7:0]  utp_tx_data;
  logic        utp_tx_soc, utp_tx_prty, utp_tx_enb_n, utp_tx_clav = 0;
  logic [19:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic        mem_ce_n, mem_oe_n, mem_we_n;
  logic [15:0] iwpm_addr, wlpm_addr;
  logic [15:0] iwpm_wdata, iwpm_rdata, wlpm_wdata, wlpm_rdata;
  logic        iwpm_ce_n, iwpm_oe_n, iwpm_we_n, wlpm_ce_n, wlpm_oe_n, wlpm_we_n;
  logic [7:0]  phy_tx_data, phy_rx_data = 0;
  logic        phy_tx_en, phy_tx_rdy = 0, phy_rx_valid = 0, phy_rx_end = 0;
  bus_req_t    iw_m_req = BUS_REQ_IDLE, wl_m_req = BUS_REQ_IDLE;
  bus_rsp_t    iw_m_rsp, wl_m_rsp;
  logic        iw_irq, wl_irq, mem_contention, wlan_bus_conflict;

  bridge_on_a_chip dut (.*);

  tb_sram #(.AW(20), .DW(32)) u_mem (
    .clk, .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata),
    .ce_n(mem_ce_n), .oe_n(mem_oe_n), .we_n(mem_we_n));
  tb_sram #(.AW(16), .DW(16)) u_iwpm (
    .clk, .addr(iwpm_addr), .wdata(iwpm_wdata), .rdata(iwpm_rdata),
    .ce_n(iwpm_ce_n), .oe_n(iwpm_oe_n), .we_n(iwpm_we_n));
  tb_sram #(.AW(16), .DW(16)) u_wlpm (
    .clk, .addr(wlpm_addr), .wdata(wlpm_wdata), .rdata(wlpm_rdata),
    .ce_n(wlpm_ce_n), .oe_n(wlpm_oe_n), .we_n(wlpm_we_n));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- address map used by the firmware ----------------
  localparam logic [31:0] CM        = 32'h1000_0000;
  localparam logic [31:0] ATMC      = 32'h2000_0000;
  localparam logic [31:0] WCFG      = 32'h3000_0000;
  localparam logic [31:0] INTC      = 32'h4000_0000;
  localparam logic [31:0] TMR0      = 32'h5000_0000;
  localparam logic [31:0] TMR1      = 32'h6000_0000;
  localparam logic [31:0] PAI       = 32'h7000_0000;
  localparam logic [31:0] RCT_BASE  = CM + 32'h0001_0000;
  localparam logic [31:0] FBQ_BASE  = CM + 32'h0002_0000;
  localparam logic [31:0] RXD_BASE  = CM + 32'h0002_1000;
  localparam logic [31:0] BUF_BASE  = CM + 32'h0003_0000;   // 2 KB each, 24 B header room
  localparam logic [31:0] WRX_BASE  = CM + 32'h0005_0000;   // WLAN receive buffers
  localparam logic [31:0] TBD_BASE  = CM + 32'h0006_0000;
  localparam logic [31:0] SQD_BASE  = CM + 32'h0007_0000;
  localparam logic [31:0] TST_BASE  = CM + 32'h0008_0000;
  localparam int NBUF = 4, FBQ_SIZE = 8, RXD_SIZE = 4;
  localparam logic [7:0]  RX_VPI = 8'd1;
  localparam logic [15:0] RX_VCI = 16'd5;
  localparam logic [7:0]  TX_VPI = 8'd2;
  localparam logic [15:0] TX_VCI = 16'd33;
  localparam int TX_VC = 3;
  localparam logic [15:0] TX_VCI34 = 16'd34;   // AAL3/4 transmit VC
  localparam int TX_VC34 = 4;
  localparam logic [15:0] RX_VCI34 = 16'd6;    // AAL3/4 receive VC
  localparam logic [9:0]  TX_MID = 10'h07;

  // ---------------- the two cores' bus transfers ----------------
  task automatic iw_bus(bit we, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd);
    #1 iw_m_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    do @(posedge clk); while (!iw_m_rsp.ready);
    rd = iw_m_rsp.rdata;
    #1 iw_m_req = BUS_REQ_IDLE;
  endtask

  task automatic wl_bus(bit we, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd);
    #1 wl_m_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    do @(posedge clk); while (!wl_m_rsp.ready);
    rd = wl_m_rsp.rdata;
    #1 wl_m_req = BUS_REQ_IDLE;
  endtask

  task automatic iw_wr(logic [31:0] a, logic [31:0] wd);
    logic [31:0] rd;
    iw_bus(1, a, wd, rd);
  endtask
  task automatic wl_wr(logic [31:0] a, logic [31:0] wd);
    logic [31:0] rd;
    wl_bus(1, a, wd, rd);
  endtask

  // common memory seen from the testbench (word index of a bus address)
  function automatic int widx(logic [31:0] a);
    return int'(a[21:2]);
  endfunction

  // ---------------- traffic and expected results ----------------
  function automatic bytes_t make_bytes(int n, int seed);
    bytes_t p;
    for (int i = 0; i < n; i++) p.push_back(8'(seed * 11 + i * 7 + (i >> 3)));
    return p;
  endfunction

  function automatic bytes_t mac_header(int seq);
    bytes_t h;
    byte unsigned fixed[24] = '{8'h08, 8'h01, 8'h00, 8'h00,
                                8'h02, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55,
                                8'h02, 8'hAA, 8'hBB, 8'hCC, 8'hDD, 8'hEE,
                                8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01,
                                8'h00, 8'h00};
    foreach (fixed[i]) h.push_back(fixed[i]);
    h[22] = 8'(seq << 4);
    h[23] = 8'(seq >> 4);
    return h;
  endfunction

  bytes_t exp_frames[$];    // 802.11 frames (without FCS) the PHY must see
  bytes_t exp_cells[$];     // ATM cells UTOPIA transmit must carry, AAL5 VC
  bytes_t exp_cells34[$];   // the same for the AAL3/4 VC

  // ---------------- mechanism counters ----------------
  int n_contention = 0, n_conflict = 0, n_rx_backpressure = 0, n_tx_clav_stall = 0;
  int n_phy_stall = 0, n_iwpm = 0, n_wlpm = 0;
  int n_iw_irq_rp = 0, n_iw_irq_sp = 0, n_iw_db = 0, n_iw_tmr = 0, n_iw_par = 0,
      n_iw_short = 0, n_iw_dec = 0;
  int n_wl_rx = 0, n_wl_tx = 0, n_wl_dma = 0, n_wl_db = 0, n_wl_tmr0 = 0, n_wl_tmr1 = 0,
      n_wl_dec = 0, n_wl_badfcs = 0, n_iw_crcerr = 0;
  int frames_seen = 0, cells_seen = 0, buffers_returned = 0;

  always @(posedge clk) if (rst_n) begin
    if (mem_contention)            n_contention++;
    if (wlan_bus_conflict)         n_conflict++;
    if (utp_rx_clav && utp_rx_enb_n) n_rx_backpressure++;
    if (!iwpm_ce_n)                n_iwpm++;
    if (!wlpm_ce_n)                n_wlpm++;
  end

  // ---------------- ATM PHY model ----------------
  task automatic utp_byte(byte unsigned b, bit soc, bit bad_par);
    #1 utp_rx_data = b; utp_rx_soc = soc; utp_rx_prty = ~^b ^ bad_par; utp_rx_clav = 1;
    do @(posedge clk); while (utp_rx_enb_n);
    #1 utp_rx_clav = 0; utp_rx_soc = 0;
  endtask

  function automatic bytes_t make_cell(logic [7:0] vpi, logic [15:0] vci, bit last, bytes_t pay);
    bytes_t c;
    logic [31:0] h;
    h = {4'h0, vpi, vci, 2'b00, last, 1'b0};
    for (int b = 3; b >= 0; b--) c.push_back(h[8*b +: 8]);
    c.push_back(ref_hec(h));
    foreach (pay[i]) c.push_back(pay[i]);
    return c;
  endfunction

  task automatic utp_send_cell(bytes_t c, int bad_at, int len);
    for (int i = 0; i < len; i++) utp_byte(c[i], i == 0, i == bad_at);
  endtask

  // cells of an AAL5 packet; corrupt flips a payload bit after the CRC
  function automatic void packet_cells(logic [7:0] vpi, logic [15:0] vci, bytes_t pkt,
                                       bit corrupt, ref bytes_t cells[$]);
    bytes_t pdu, pay;
    pdu = ref_aal5_pdu(pkt);
    if (corrupt) pdu[3] = pdu[3] ^ 8'h10;
    for (int c = 0; c < pdu.size() / 48; c++) begin
      pay.delete();
      for (int i = 0; i < 48; i++) pay.push_back(pdu[48*c + i]);
      cells.push_back(make_cell(vpi, vci, c == pdu.size() / 48 - 1, pay));
    end
  endfunction

  // UTOPIA transmit side: random cell-available, checks each cell
  initial begin
    bytes_t cur, e;
    forever begin
      #1 utp_tx_clav = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (rst_n && !utp_tx_clav && cur.size() != 0) n_tx_clav_stall++;
      if (rst_n && utp_tx_clav && !utp_tx_enb_n) begin
        check(utp_tx_soc == (cur.size() == 0), "UTOPIA tx SOC on octet 0 only");
        check(utp_tx_prty == ~^utp_tx_data, "UTOPIA tx odd parity");
        cur.push_back(utp_tx_data);
        if (cur.size() == 53) begin
          cells_seen++;
          if ({cur[1][3:0], cur[2], cur[3][7:4]} == TX_VCI34) begin
            if (exp_cells34.size() == 0) check(0, "unexpected AAL3/4 cell");
            else begin
              e = exp_cells34.pop_front();
              check(cur == e, $sformatf("ATM cell %0d matches the AAL3/4 reference", cells_seen));
            end
          end else if (exp_cells.size() == 0) check(0, "unexpected ATM cell");
          else begin
            e = exp_cells.pop_front();
            check(cur == e, $sformatf("ATM cell %0d matches the AAL5 reference", cells_seen));
          end
          cur.delete();
        end
      end
    end
  end

  // ---------------- wireless PHY model ----------------
  initial begin
    bytes_t cur, e;
    logic [31:0] c;
    bit was_en;
    was_en = 0;
    forever begin
      #1 phy_tx_rdy = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (phy_tx_en && !phy_tx_rdy) n_phy_stall++;
      if (phy_tx_en && phy_tx_rdy) cur.push_back(phy_tx_data);
      if (was_en && !phy_tx_en) begin
        frames_seen++;
        if (exp_frames.size() == 0 || cur.size() < 4) check(0, "unexpected WLAN frame");
        else begin
          e = exp_frames.pop_front();
          c = ref_crc32_lsb(e);
          for (int b = 0; b < 4; b++) e.push_back(c[8*b +: 8]);
          check(cur == e, $sformatf("WLAN frame %0d: header, payload and FCS (%0d bytes, expected %0d)",
                                    frames_seen, cur.size(), e.size()));
        end
        cur.delete();
      end
      was_en = phy_tx_en;
    end
  end

  task automatic phy_send(bytes_t f, bit good_fcs);
    logic [31:0] c;
    c = ref_crc32_lsb(f) ^ (good_fcs ? 32'h0 : 32'h1);
    for (int b = 0; b < 4; b++) f.push_back(c[8*b +: 8]);
    foreach (f[i]) begin
      #1 phy_rx_valid = 1; phy_rx_data = f[i];
      @(posedge clk); #1 phy_rx_valid = 0;
      repeat ($urandom_range(0, 1)) @(posedge clk);
    end
    #1 phy_rx_end = 1; @(posedge clk); #1 phy_rx_end = 0;
    repeat (2) @(posedge clk);
  endtask

  // ---------------- IW firmware ----------------
  logic [31:0] fwd_q[$];          // {buffer address} of packets waiting for the WLAN side
  int          fwd_len[$];
  bit          wl_busy = 0;
  bit          fw_stop = 0;
  int          iw_tx_pkts = 0;
  int          iw_rxd_cons = 0, iw_fbq_prod = 0, tbd_n = 0, tst_on = 0;
  logic [31:0] inflight_buf;

  task automatic iw_give_buffer(logic [31:0] b);
    iw_wr(FBQ_BASE + 32'(4 * iw_fbq_prod), b);
    iw_fbq_prod = (iw_fbq_prod + 1) % FBQ_SIZE;
    iw_wr(ATMC + 32'h10, 32'(iw_fbq_prod));
  endtask

  task automatic iw_handler();
    logic [31:0] st, rd, prod, d0, d1, d2, db, a, n;
    iw_bus(0, INTC, 0, st);
    iw_wr(INTC, st);                         // clear first: later events set their bits again
    if (st[0]) begin
      n_iw_irq_rp++;
      iw_bus(0, ATMC + 32'h44, 0, prod);
      while (iw_rxd_cons != int'(prod[15:0])) begin
        iw_bus(0, RXD_BASE + 32'(16 * iw_rxd_cons), 0, d0);
        iw_bus(0, RXD_BASE + 32'(16 * iw_rxd_cons + 4), 0, d1);
        iw_bus(0, RXD_BASE + 32'(16 * iw_rxd_cons + 8), 0, d2);
        if (d2[15:0] == RX_VCI34) begin           // AAL3/4 message: checked and consumed here
          n_aal34_rx++;
          check(d1 == 32'd96, $sformatf("AAL3/4 descriptor: no CRC-10 or sequence error, 96 bytes (%08x)", d1));
          iw_give_buffer(d0);
        end else if (d1[31]) begin
          n_iw_crcerr++;
          iw_give_buffer(d0);
        end else begin
          fwd_q.push_back(d0);
          fwd_len.push_back(int'(d1[15:0]));
        end
        iw_rxd_cons = (iw_rxd_cons + 1) % RXD_SIZE;
        iw_wr(ATMC + 32'h1C, 32'(iw_rxd_cons));
      end
    end
    if (st[1]) begin                         // the SP's packet count must have moved
      n_iw_irq_sp++;
      iw_bus(0, ATMC + 32'h64, 0, rd);
      check(rd > 32'(iw_tx_pkts), "segmentation interrupt follows a segmented packet");
      iw_tx_pkts = int'(rd);
    end
    if (st[2]) begin
      n_iw_db++;
      iw_bus(0, WCFG + 32'h40, 0, db);
      iw_wr(WCFG + 32'h44, db);
      if (db[1]) begin                       // WLAN sent the frame: buffer is free again
        wl_busy = 0;
        iw_give_buffer(inflight_buf);
        buffers_returned++;
      end
      if (db[0]) begin                       // WLAN received a frame: send it as AAL5
        iw_bus(0, WCFG + 32'h20, 0, a);
        iw_bus(0, WCFG + 32'h24, 0, n);
        iw_queue(a, n, TX_VC, TX_VCI, 1'b0);
      end
      if (db[2]) begin                       // second mailbox slot: send it as AAL3/4
        iw_bus(0, WCFG + 32'h28, 0, a);
        iw_bus(0, WCFG + 32'h2C, 0, n);
        iw_queue(a, n, TX_VC34, TX_VCI34, 1'b1);
      end
    end
    if (st[3]) n_iw_tmr++;
    if (st[4]) n_iw_par++;
    if (st[5]) n_iw_short++;
    if (st[6]) n_iw_dec++;
  endtask

  // put one packet on the (empty) segmentation queue of a VC
  task automatic iw_queue(logic [31:0] a, logic [31:0] n, int vc, logic [15:0] vci, bit a34);
    logic [31:0] tbd;
    tbd = TBD_BASE + 32'(16 * tbd_n);
    tbd_n++;
    iw_wr(tbd, a);
    iw_wr(tbd + 4, {1'b0, a34, 4'h0, a34 ? TX_MID : 10'h0, n[15:0]});
    iw_wr(tbd + 8, 0);
    iw_wr(SQD_BASE + 32'(16 * vc),     {4'h0, TX_VPI, vci, 4'h0});
    iw_wr(SQD_BASE + 32'(16 * vc) + 4, tbd);
    iw_wr(SQD_BASE + 32'(16 * vc) + 8, 0);
    iw_wr(SQD_BASE + 32'(16 * vc) + 12, 0);
    if (!tst_on) begin
      iw_wr(TST_BASE,     {1'b1, 15'h0, 16'(TX_VC)});
      iw_wr(TST_BASE + 4, 32'h0);               // an idle slot
      iw_wr(TST_BASE + 8, {1'b1, 15'h0, 16'(TX_VC34)});
      iw_wr(ATMC + 32'h24, TST_BASE);
      iw_wr(ATMC + 32'h28, 3);
      iw_wr(ATMC + 32'h2C, SQD_BASE);
      iw_wr(ATMC + 32'h30, 150);
      iw_wr(ATMC + 32'h00, 3);
      tst_on = 1;
    end
  endtask

  task automatic iw_forward();
    if (!wl_busy && fwd_q.size() != 0) begin
      inflight_buf = fwd_q.pop_front();
      iw_wr(WCFG + 32'h00, inflight_buf);
      iw_wr(WCFG + 32'h04, 32'(fwd_len.pop_front()));
      wl_busy = 1;
      iw_wr(WCFG + 32'h40, 1);
    end
  endtask

  // ---------------- WLAN firmware ----------------
  int wl_seq = 0, wrx_n = 0, wl_good = 0, n_aal34_rx = 0;

  task automatic wl_handler();
    logic [31:0] st, rd, db, a, n, rs, buf_a, hw;
    bytes_t h;
    wl_bus(0, INTC, 0, st);
    wl_wr(INTC, st);
    if (st[3]) begin
      n_wl_db++;
      wl_bus(0, WCFG + 32'h40, 0, db);
      wl_wr(WCFG + 32'h44, db);
      if (db[0]) begin
        wl_bus(0, WCFG + 32'h00, 0, a);
        wl_bus(0, WCFG + 32'h04, 0, n);
        h = mac_header(wl_seq++);
        for (int w = 0; w < 6; w++) begin
          hw = {h[4*w], h[4*w+1], h[4*w+2], h[4*w+3]};
          wl_wr(a - 32'd24 + 32'(4 * w), hw);
        end
        wl_wr(PAI + 32'h04, a - 32'd24);
        wl_wr(PAI + 32'h08, n + 32'd24);
        wl_wr(PAI + 32'h00, 1);
        do wl_bus(0, PAI + 32'h14, 0, rs); while (rs[0]);   // poll while the DMA runs
      end
    end
    if (st[1]) begin
      n_wl_tx++;
      wl_wr(WCFG + 32'h40, 2);                               // tell IW the buffer is free
    end
    if (st[0] || st[2]) begin
      if (st[0]) n_wl_rx++;
      if (st[2]) n_wl_dma++;
      wl_bus(0, PAI + 32'h10, 0, rs);
      while (rs[31]) begin
        buf_a = WRX_BASE + 32'(2048 * wrx_n);
        wrx_n++;
        wl_wr(PAI + 32'h0C, buf_a);
        wl_wr(PAI + 32'h00, 2);
        do wl_bus(0, PAI + 32'h14, 0, rd); while (rd[1]);
        check(rs[23:16] == 8'h08, "PAI reports a data frame header type");
        if (rs[30]) begin                    // good frames alternate between two mailbox slots
          wl_wr(WCFG + 32'h20 + 32'(8 * (wl_good % 2)), buf_a + 32'd24);
          wl_wr(WCFG + 32'h24 + 32'(8 * (wl_good % 2)), {16'h0, rs[15:0]} - 32'd28);
          wl_wr(WCFG + 32'h40, (wl_good % 2) ? 4 : 1);
          wl_good++;
        end else n_wl_badfcs++;
        wl_bus(0, PAI + 32'h10, 0, rs);
      end
    end
    if (st[4]) begin
      n_wl_tmr0++;
      if (n_wl_tmr0 == 3) wl_wr(TMR0 + 32'h08, 0);          // stop the periodic timer
    end
    if (st[5]) n_wl_tmr1++;
    if (st[6]) n_wl_dec++;
  endtask

  // ---------------- the test ----------------
  initial begin
    logic [31:0] rd;
    bytes_t pa, pb, pc, body_d, body_e, body_f, f, cells[$];
    int t0, n_exp_cells;

    // memory contents are undefined at power-up; the firmware expects zeros
    for (int i = 0; i < (1 << 20); i++) u_mem.mem[i] = '0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // program memories: write and read back a word on each core
    iw_wr(32'h0000_0100, 32'hCAFE_F00D);
    iw_bus(0, 32'h0000_0100, 0, rd);
    check(rd == 32'hCAFE_F00D, "IW program memory word read back");
    check(u_iwpm.mem[16'h80] == 16'hCAFE && u_iwpm.mem[16'h81] == 16'hF00D,
          "IW program memory holds the word as two halfwords");
    wl_wr(32'h0000_0200, 32'h1234_5678);
    wl_bus(0, 32'h0000_0200, 0, rd);
    check(rd == 32'h1234_5678, "WLAN program memory word read back");

    // unmapped addresses answer zero
    iw_bus(0, 32'h9000_0000, 0, rd);
    check(rd == 0, "IW unmapped read returns 0");
    wl_bus(0, ATMC, 0, rd);
    check(rd == 0, "WLAN bus has no ATM config registers");

    // interrupt controllers and timers
    iw_wr(INTC + 32'h04, 32'h7F);
    wl_wr(INTC + 32'h04, 32'h7F);
    iw_wr(TMR0, 300);
    iw_wr(TMR0 + 32'h08, 1);
    wl_wr(TMR0, 700);
    wl_wr(TMR0 + 32'h08, 3);
    wl_wr(TMR1, 500);
    wl_wr(TMR1 + 32'h08, 1);

    // ATM-SAR configuration by the IW core
    iw_wr(RCT_BASE + 32'(16 * RX_VCI), {1'b1, 7'h0, RX_VPI, RX_VCI});
    iw_wr(RCT_BASE + 32'(16 * RX_VCI34), {1'b1, 1'b1, 6'h0, RX_VPI, RX_VCI34});
    iw_wr(ATMC + 32'h04, RCT_BASE);
    iw_wr(ATMC + 32'h08, FBQ_BASE);
    iw_wr(ATMC + 32'h0C, FBQ_SIZE);
    iw_wr(ATMC + 32'h14, RXD_BASE);
    iw_wr(ATMC + 32'h18, RXD_SIZE);
    iw_wr(ATMC + 32'h20, 1024);
    for (int b = 0; b < NBUF; b++) iw_give_buffer(BUF_BASE + 32'(2048 * b) + 32'd24);
    iw_bus(0, ATMC + 32'h08, 0, rd);
    check(rd == FBQ_BASE, "ATM config register read back");
    iw_wr(ATMC + 32'h00, 1);

    // traffic
    pa = make_bytes(100, 1);
    pb = make_bytes(60, 2);
    pc = make_bytes(200, 3);
    body_d = make_bytes(90, 4);
    body_e = make_bytes(40, 5);
    exp_frames.push_back({mac_header(0), pa});
    exp_frames.push_back({mac_header(1), pc});
    packet_cells(TX_VPI, TX_VCI, body_d, 0, exp_cells);
    body_f = make_bytes(60, 6);
    for (int s = 0; s < 2; s++) begin
      bytes_t seg;
      seg.delete();
      for (int i = 44 * s; i < 44 * s + 44 && i < 60; i++) seg.push_back(body_f[i]);
      exp_cells34.push_back(make_cell(TX_VPI, TX_VCI34, 0,
                            ref_sar34(s == 0 ? 2'b10 : 2'b01, 4'(s), TX_MID, seg)));
    end
    n_exp_cells = exp_cells.size() + exp_cells34.size();

    fork
      while (!fw_stop) begin
        wait (iw_irq || fw_stop);
        if (fw_stop) break;
        iw_handler();
        iw_forward();
        repeat (2) @(posedge clk);
      end
      while (!fw_stop) begin
        wait (wl_irq || fw_stop);
        if (fw_stop) break;
        wl_handler();
        repeat (2) @(posedge clk);
      end
      begin   // ATM side traffic
        cells.delete();
        utp_send_cell(make_cell(RX_VPI, 16'd9, 1, make_bytes(48, 9)), -1, 53);   // VC not open
        utp_send_cell(make_cell(RX_VPI, RX_VCI, 1, make_bytes(48, 8)), 17, 53);  // parity error
        utp_send_cell(make_cell(RX_VPI, RX_VCI, 1, make_bytes(48, 7)), -1, 30);  // cut short
        packet_cells(RX_VPI, RX_VCI, pa, 0, cells);
        packet_cells(RX_VPI, RX_VCI, pb, 1, cells);
        packet_cells(RX_VPI, RX_VCI, pc, 0, cells);
        for (int s = 0; s < 2; s++)                  // an AAL3/4 message, BOM and EOM
          cells.push_back(make_cell(RX_VPI, RX_VCI34, 0,
                          ref_sar34(s == 0 ? 2'b10 : 2'b01, 4'(s), 10'h2A, make_bytes(44, 20 + s))));
        foreach (cells[i]) utp_send_cell(cells[i], -1, 53);
      end
      begin   // wireless side traffic
        repeat (300) @(posedge clk);
        phy_send({mac_header(7), body_e}, 0);                // bad FCS
        phy_send({mac_header(8), body_d}, 1);
        phy_send({mac_header(9), body_f}, 1);
      end
    join_none

    t0 = 0;
    while ((frames_seen < 2 || cells_seen < n_exp_cells || buffers_returned < 2) && t0 < 400000) begin
      @(posedge clk);
      t0++;
    end
    repeat (200) @(posedge clk);

    // results
    check(frames_seen == 2, $sformatf("two frames relayed ATM -> WLAN (%0d)", frames_seen));
    check(cells_seen == 5 && n_exp_cells == 5 && exp_cells.size() == 0 && exp_cells34.size() == 0,
          $sformatf("frame bodies relayed WLAN -> ATM as 3 AAL5 and 2 AAL3/4 cells (%0d)", cells_seen));
    check(n_aal34_rx == 1, $sformatf("AAL3/4 message reassembled (%0d)", n_aal34_rx));
    fw_stop = 1;                             // the firmware threads finish what they do
    repeat (500) @(posedge clk);
    iw_bus(0, ATMC + 32'h4C, 0, rd);
    check(rd == 4, $sformatf("RP reassembled 4 packets (%0d)", rd));
    iw_bus(0, ATMC + 32'h58, 0, rd);
    check(rd == 1, "RP flagged one CRC error");
    iw_bus(0, ATMC + 32'h50, 0, rd);
    check(rd == 1, "RP dropped the cell on the unopened VC");
    iw_bus(0, ATMC + 32'h48, 0, rd);
    check(rd == 13, $sformatf("RP took 13 cells (%0d)", rd));
    iw_bus(0, ATMC + 32'h64, 0, rd);
    check(rd == 2, "SP segmented two packets");
    iw_bus(0, ATMC + 32'h60, 0, rd);
    check(rd == 5, "SP sent 5 cells");
    check(u_mem.mem[widx(TBD_BASE + 4)][31] && u_mem.mem[widx(TBD_BASE + 20)][31], "SP marked the Tx buffer descriptors done");
    f = {mac_header(8), body_d};
    begin
      bit ok;
      ok = 1;
      foreach (f[i]) if (u_mem.mem[widx(WRX_BASE + 32'd2048) + i / 4][31 - 8 * (i % 4) -: 8] != f[i]) ok = 0;
      check(ok, "received frame in common memory");
    end

    // every mechanism happened
    check(n_contention > 0,      $sformatf("common memory contention (%0d)", n_contention));
    check(n_conflict > 0,        $sformatf("WLAN bus conflicts ARM/DMA (%0d)", n_conflict));
    check(n_rx_backpressure > 0, $sformatf("UTOPIA receive back-pressure (%0d)", n_rx_backpressure));
    check(n_tx_clav_stall > 0,   $sformatf("UTOPIA transmit stalls (%0d)", n_tx_clav_stall));
    check(n_phy_stall > 0,       $sformatf("wireless PHY transmit stalls (%0d)", n_phy_stall));
    check(n_iwpm > 0 && n_wlpm > 0, "program memory accesses");
    check(n_iw_irq_rp > 0,       $sformatf("IW interrupts: packet reassembled (%0d)", n_iw_irq_rp));
    check(n_iw_irq_sp > 0,       $sformatf("IW interrupts: packet segmented (%0d)", n_iw_irq_sp));
    check(n_iw_db > 0,           $sformatf("IW doorbells (%0d)", n_iw_db));
    check(n_iw_tmr == 1,         $sformatf("IW timer expiry (%0d)", n_iw_tmr));
    check(n_iw_par > 0,          $sformatf("UTOPIA parity error interrupt (%0d)", n_iw_par));
    check(n_iw_short > 0,        $sformatf("UTOPIA short cell interrupt (%0d)", n_iw_short));
    check(n_iw_dec > 0 && n_wl_dec > 0, $sformatf("bus decode errors (%0d, %0d)", n_iw_dec, n_wl_dec));
    check(n_iw_crcerr == 1,      $sformatf("IW saw the CRC error in the descriptor (%0d)", n_iw_crcerr));
    check(n_wl_rx > 0,           $sformatf("WLAN interrupts: frame received (%0d)", n_wl_rx));
    check(n_wl_tx == 2,          $sformatf("WLAN interrupts: frame sent (%0d)", n_wl_tx));
    check(n_wl_db > 0,           $sformatf("WLAN doorbells (%0d)", n_wl_db));
    check(n_wl_dma > 0,          $sformatf("WLAN interrupts: receive DMA done (%0d)", n_wl_dma));
    check(n_wl_tmr0 >= 3,        $sformatf("WLAN periodic timer expiries (%0d)", n_wl_tmr0));
    check(n_wl_tmr1 == 1,        $sformatf("WLAN one-shot timer expiry (%0d)", n_wl_tmr1));
    check(n_wl_badfcs == 1,      $sformatf("frame with a bad FCS rejected (%0d)", n_wl_badfcs));
    check(buffers_returned == 2, "buffers returned to the free buffer queue");

    $display("mechanisms: contention=%0d conflict=%0d rx_bp=%0d tx_stall=%0d phy_stall=%0d",
             n_contention, n_conflict, n_rx_backpressure, n_tx_clav_stall, n_phy_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
