// pai -- Wireless Physical Attachment Interface (WPAI) of the WLAN MAC unit.
//
// The hardware between the WLAN ARM core, the common memory and the
// wireless PHY. The ARM does the IEEE 802.11 MAC protocol in software; the
// PAI does the byte-rate work:
//   * transmit: the ARM programs TX_ADDR and TX_LEN and starts the DMA
//     engine, which fetches the frame (MAC header and body, already built
//     in common memory) word by word into the transmit FIFO. Once the FIFO
//     is full or holds the whole frame, the PAI raises tx_en and hands the
//     PHY one byte per tx_rdy, computing the CRC-32 on the fly and
//     appending it as the 4-byte frame check sequence (FCS);
//   * receive: bytes from the PHY (rx_valid) enter the receive FIFO while
//     the FCS is checked; at rx_end the frame is committed, its length,
//     FCS verdict and header type (the first, frame control byte) are
//     queued (up to 4 frames) and irq_rx tells the ARM. The
//     ARM reads RX_STATUS, picks a buffer, writes RX_ADDR and starts the
//     receive DMA, which moves the frame (FCS included) into common memory
//     and pulses irq_dma. A frame that does not fit in the FIFO or the
//     status queue is dropped and counted;
//   * the TSF counter: a 64-bit microsecond timer (US_DIV clock cycles per
//     microsecond) that software can read and load.
//
// Register map (byte offsets): 0x00 CTRL (write: bit0 start transmit,
// bit1 start receive DMA), 0x04 TX_ADDR, 0x08 TX_LEN, 0x0C RX_ADDR,
// 0x10 RX_STATUS {frame pending, FCS ok, 6'b0, frame control byte
// (protocol version, type, subtype), length incl. FCS},
// 0x14 STATUS {rx overruns[31:16], 13'b0, tx underrun, rx DMA busy,
// tx busy}, 0x18 TSF_LO, 0x1C TSF_HI (read/write).
//
// PHY interface, 20 signals: tx_data[7:0], tx_en (frame in progress),
// tx_rdy (PHY takes tx_data on this edge), rx_data[7:0], rx_valid (one
// byte), rx_end (end of frame, in a cycle without a byte).
// Timing: register transfers take two cycles; each DMA word is one bus
// transfer on the master port (through the WLAN bus arbiter and the
// memory controller). Bytes are big-endian in memory words.
//
// Following the architecture: an internal FIFO, a DMA engine programmed by
// the WLAN ARM, CRC-32 support, the TSF counter, and the report of packet
// reception with header type and CRC status to the ARM. Own choices: the
// 20-signal PHY interface, the FIFO sizes, the register map and the
// microsecond prescaler. Baseband (PHY) programming through the PAI is not
// built: the document gives no PHY register interface.
module pai
  import boc_pkg::*;
#(
  parameter int unsigned RXF_BYTES = 4096,
  parameter int unsigned TXF_BYTES = 64,
  parameter int unsigned US_DIV    = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  // register port on the WLAN bus
  input  bus_req_t   s_req,
  output bus_rsp_t   s_rsp,
  // DMA master port on the WLAN bus
  output bus_req_t   m_req,
  input  bus_rsp_t   m_rsp,
  // wireless PHY
  output logic [7:0] tx_data,
  output logic       tx_en,
  input  logic       tx_rdy,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  input  logic       rx_end,
  // interrupt pulses
  output logic       irq_rx,
  output logic       irq_tx,
  output logic       irq_dma
);

  localparam int unsigned RW = $clog2(RXF_BYTES);
  localparam int unsigned TW = $clog2(TXF_BYTES);
  localparam int unsigned NSQ = 4;

  // ---------------- registers ----------------
  logic [31:0] tx_addr, rx_addr;
  logic [15:0] tx_len;
  logic [63:0] tsf;
  logic [$clog2(US_DIV+1)-1:0] us_cnt;
  logic [15:0] rx_overruns;
  logic        tx_underrun;
  logic        rdy_q;
  logic [31:0] rdata_q;
  logic        take, start_tx, start_rx;

  assign take     = s_req.req && !rdy_q;
  assign start_tx = take && s_req.we && s_req.addr[4:2] == 3'd0 && s_req.wdata[0];
  assign start_rx = take && s_req.we && s_req.addr[4:2] == 3'd0 && s_req.wdata[1];

  // ---------------- transmit FIFO and PHY side ----------------
  logic [7:0]  txf [TXF_BYTES];
  logic [TW:0] txf_cnt;
  logic [TW-1:0] txf_wp, txf_rp;
  logic [15:0] tx_fetch_left;   // bytes the DMA still has to fetch
  logic [31:0] tx_fetch_addr;
  logic [15:0] tx_send_left;    // data bytes still to hand to the PHY
  logic [31:0] tx_crc;
  logic [2:0]  fcs_idx;
  typedef enum logic [1:0] {T_IDLE, T_FILL, T_DATA, T_FCS} tstate_t;
  tstate_t tst;

  // ---------------- receive FIFO and status queue ----------------
  logic [7:0]  rxf [RXF_BYTES];
  logic [RW:0] rxf_used;        // committed bytes
  logic [RW:0] rx_frame_cnt;    // bytes of the frame being received
  logic [RW-1:0] rxf_wp, rxf_rp;
  logic [31:0] rx_crc;
  logic        rx_bad;
  logic [24:0] sq [NSQ];        // {frame control, fcs_ok, length}
  logic [7:0]  rx_fc;           // first byte of the frame being received
  logic [2:0]  sq_cnt;
  logic [1:0]  sq_rp, sq_wp;
  logic [15:0] rx_dma_left;
  logic [31:0] rx_dma_addr;

  // ---------------- DMA engine ----------------
  typedef enum logic [1:0] {D_IDLE, D_TXRD, D_RXWR} dstate_t;
  dstate_t dst;
  logic [2:0] tx_nb, rx_nb;     // bytes moved by the current word
  assign tx_nb = (tx_fetch_left >= 16'd4) ? 3'd4 : 3'(tx_fetch_left);
  assign rx_nb = (rx_dma_left   >= 16'd4) ? 3'd4 : 3'(rx_dma_left);

  logic [31:0] rx_word;
  always_comb begin
    for (int b = 0; b < 4; b++)
      rx_word[31 - 8*b -: 8] = (3'(b) < rx_nb) ? rxf[RW'(rxf_rp + RW'(b))] : 8'h00;
  end

  always_comb begin
    m_req = BUS_REQ_IDLE;
    case (dst)
      D_TXRD: m_req = '{req: 1'b1, we: 1'b0, addr: tx_fetch_addr, wdata: 32'h0};
      D_RXWR: m_req = '{req: 1'b1, we: 1'b1, addr: rx_dma_addr, wdata: rx_word};
      default: ;
    endcase
  end

  // ---------------- PHY transmit side ----------------
  logic tx_take;
  assign tx_en   = (tst == T_DATA) || (tst == T_FCS);
  assign tx_take = tx_en && tx_rdy;
  logic [31:0] fcs;
  assign fcs = ~tx_crc;
  assign tx_data = (tst == T_FCS) ? fcs[8*fcs_idx[1:0] +: 8] : txf[txf_rp];

  logic tx_pop;
  assign tx_pop = tx_take && (tst == T_DATA) && (txf_cnt != 0);

  logic tx_push;
  assign tx_push = (dst == D_TXRD) && m_rsp.ready;

  always_ff @(posedge clk) begin
    if (tx_push)
      for (int b = 0; b < 4; b++)
        if (3'(b) < tx_nb) txf[TW'(txf_wp + TW'(b))] <= m_rsp.rdata[31 - 8*b -: 8];
    if (rx_valid && !rx_bad && (rxf_used + rx_frame_cnt) < (RW+1)'(RXF_BYTES))
      rxf[rxf_wp] <= rx_data;
  end

  logic rx_pop;
  assign rx_pop = (dst == D_RXWR) && m_rsp.ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_addr <= '0; rx_addr <= '0; tx_len <= '0; tsf <= '0; us_cnt <= '0;
      rx_overruns <= '0; tx_underrun <= 1'b0; rdy_q <= 1'b0; rdata_q <= '0;
      txf_cnt <= '0; txf_wp <= '0; txf_rp <= '0; tx_fetch_left <= '0;
      tx_fetch_addr <= '0; tx_send_left <= '0; tx_crc <= '1; fcs_idx <= '0;
      tst <= T_IDLE;
      rxf_used <= '0; rx_frame_cnt <= '0; rxf_wp <= '0; rxf_rp <= '0;
      rx_crc <= '1; rx_bad <= 1'b0; rx_fc <= '0;
      for (int i = 0; i < NSQ; i++) sq[i] <= '0;
      sq_cnt <= '0; sq_rp <= '0; sq_wp <= '0;
      rx_dma_left <= '0; rx_dma_addr <= '0;
      dst <= D_IDLE;
      irq_rx <= 1'b0; irq_tx <= 1'b0; irq_dma <= 1'b0;
    end else begin
      irq_rx  <= 1'b0;
      irq_tx  <= 1'b0;
      irq_dma <= 1'b0;

      // TSF counter
      if (32'(us_cnt) + 32'd1 >= US_DIV) begin
        us_cnt <= '0;
        tsf    <= tsf + 64'd1;
      end else us_cnt <= us_cnt + 1'b1;

      // register port
      rdy_q <= take;
      if (take) begin
        case (s_req.addr[4:2])
          3'd0: rdata_q <= {30'h0, (dst == D_RXWR) || rx_dma_left != 0, tst != T_IDLE};
          3'd1: rdata_q <= tx_addr;
          3'd2: rdata_q <= {16'h0, tx_len};
          3'd3: rdata_q <= rx_addr;
          3'd4: rdata_q <= {sq_cnt != 0, sq[sq_rp][16], 6'h0, sq[sq_rp][24:17], sq[sq_rp][15:0]};
          3'd5: rdata_q <= {rx_overruns, 13'h0, tx_underrun, rx_dma_left != 0, tst != T_IDLE};
          3'd6: rdata_q <= tsf[31:0];
          default: rdata_q <= tsf[63:32];
        endcase
        if (s_req.we) begin
          case (s_req.addr[4:2])
            3'd1: tx_addr <= s_req.wdata;
            3'd2: tx_len  <= s_req.wdata[15:0];
            3'd3: rx_addr <= s_req.wdata;
            3'd6: tsf[31:0]  <= s_req.wdata;
            3'd7: tsf[63:32] <= s_req.wdata;
            default: ;
          endcase
        end
      end

      // transmit control
      case (tst)
        T_IDLE: if (start_tx && tx_len != 0) begin
          tx_fetch_left <= tx_len;
          tx_fetch_addr <= tx_addr;
          tx_send_left  <= tx_len;
          tx_crc        <= '1;
          tx_underrun   <= 1'b0;
          tst           <= T_FILL;
        end
        T_FILL: if (txf_cnt == (TW+1)'(TXF_BYTES) || (tx_fetch_left == 0 && dst != D_TXRD))
          tst <= T_DATA;
        T_DATA: if (tx_take) begin
          if (txf_cnt == 0) tx_underrun <= 1'b1;
          else begin
            tx_crc       <= crc32_byte_lsb(tx_crc, tx_data);
            tx_send_left <= tx_send_left - 1'b1;
            if (tx_send_left == 16'd1) begin
              fcs_idx <= '0;
              tst     <= T_FCS;
            end
          end
        end
        T_FCS: if (tx_take) begin
          fcs_idx <= fcs_idx + 1'b1;
          if (fcs_idx == 3'd3) begin
            tst    <= T_IDLE;
            irq_tx <= 1'b1;
          end
        end
        default: tst <= T_IDLE;
      endcase
      if (tx_pop) txf_rp <= txf_rp + 1'b1;
      if (tx_push) txf_wp <= txf_wp + TW'(tx_nb);
      txf_cnt <= txf_cnt + (tx_push ? (TW+1)'(tx_nb) : '0) - (TW+1)'(tx_pop);

      // receive from the PHY
      if (rx_valid && !rx_bad) begin
        if ((rxf_used + rx_frame_cnt) < (RW+1)'(RXF_BYTES)) begin
          rxf_wp       <= rxf_wp + 1'b1;
          rx_frame_cnt <= rx_frame_cnt + 1'b1;
          rx_crc       <= crc32_byte_lsb(rx_crc, rx_data);
          if (rx_frame_cnt == 0) rx_fc <= rx_data;
        end else rx_bad <= 1'b1;
      end
      if (rx_end) begin
        if (rx_bad || sq_cnt == 3'(NSQ) || rx_frame_cnt == 0) begin
          rx_overruns <= rx_overruns + 1'b1;
          rxf_wp      <= rxf_wp - RW'(rx_frame_cnt);       // drop the frame
        end else begin
          sq[sq_wp] <= {rx_fc, rx_crc == FCS_RESIDUE, 16'(rx_frame_cnt)};
          sq_wp     <= sq_wp + 1'b1;
          irq_rx    <= 1'b1;
        end
        rx_frame_cnt <= '0;
        rx_crc       <= '1;
        rx_bad       <= 1'b0;
      end

      // receive DMA start
      if (start_rx && sq_cnt != 0 && rx_dma_left == 0) begin
        rx_dma_left <= sq[sq_rp][15:0];
        rx_dma_addr <= rx_addr;
      end

      // DMA engine: one word transfer at a time, transmit first
      case (dst)
        D_IDLE:
          if (tst != T_IDLE && tx_fetch_left != 0 &&
              (TW+1)'(TXF_BYTES) - txf_cnt >= (TW+1)'(4)) dst <= D_TXRD;
          else if (rx_dma_left != 0) dst <= D_RXWR;
        D_TXRD: if (m_rsp.ready) begin
          tx_fetch_left <= tx_fetch_left - 16'(tx_nb);
          tx_fetch_addr <= tx_fetch_addr + 32'd4;
          dst           <= D_IDLE;
        end
        D_RXWR: if (m_rsp.ready) begin
          rx_dma_left <= rx_dma_left - 16'(rx_nb);
          rx_dma_addr <= rx_dma_addr + 32'd4;
          rxf_rp      <= rxf_rp + RW'(rx_nb);
          if (rx_dma_left == 16'(rx_nb)) begin
            irq_dma <= 1'b1;
            sq_rp   <= sq_rp + 1'b1;
          end
          dst <= D_IDLE;
        end
        default: dst <= D_IDLE;
      endcase

      // committed receive bytes and status queue occupancy
      rxf_used <= rxf_used
                  + ((rx_end && !(rx_bad || sq_cnt == 3'(NSQ) || rx_frame_cnt == 0)) ? rx_frame_cnt : '0)
                  - (rx_pop ? (RW+1)'(rx_nb) : '0);
      sq_cnt <= sq_cnt
                + 3'(rx_end && !(rx_bad || sq_cnt == 3'(NSQ) || rx_frame_cnt == 0))
                - 3'(rx_pop && rx_dma_left == 16'(rx_nb));
    end
  end

  assign s_rsp = '{ready: rdy_q, rdata: rdata_q};

endmodule
