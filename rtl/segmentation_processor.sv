// segmentation_processor -- Segmentation Processor (SP) with its AAL5 and AAL3/4 engine.
//
// Cuts the packets queued by the inter-networking unit into ATM cells. A
// slot timer ticks every SLOT_CYCLES clock cycles; each tick lets the SP
// serve the next entry of the Transmit Schedule Table (TST), so the number
// of entries naming a VC sets that VC's share of the cell rate (constant
// bit rate scheduling). For a scheduled VC the SP
//   1. reads the VC's segmentation queue descriptor (SQD),
//   2. reads the Tx buffer descriptor (TBD) at the head of the queue,
//   3. reads up to 12 payload words from the Tx data buffer, padding with
//      zeros past the end of the packet; in the packet's last cell it places
//      the AAL5 trailer (UU = 0, CPI = 0, length, CRC-32) in words 10 and 11,
//   4. builds the cell header from the SQD template, setting PTI bit 0 in
//      the last cell, adds the HEC, and writes the 53 bytes into the Tx FIFO,
//   5. writes back its progress; after the last cell it marks the TBD done,
//      advances the queue to the next TBD and pulses pkt_done.
// A packet whose TBD has bit 30 set is sent as AAL3/4 instead: 44 bytes
// (11 data words) per cell, framed as a SAR-PDU. The header is {ST, SN,
// MID}: ST is BOM, COM, EOM or SSM, SN counts from 0 in the SQD's q3 and
// MID comes from the TBD. The trailer is {LI, CRC-10}, with the CRC-10
// computed as the bytes go into the FIFO. The buffer must then hold the
// whole CPCS-PDU, which software builds.
// A slot is skipped when its TST entry is not valid or the queue is empty.
//
// Memory layouts (byte addresses, big-endian words):
//   TST: TST_LEN words at TST_BASE, {valid, 15'b0, VC number}
//   SQD at SQD_BASE + 16*VC: q0 header template {GFC, VPI, VCI, PTI, CLP},
//       q1 head TBD address (0: queue empty), q2 bytes already sent,
//       q3 running CRC, or next SN for AAL3/4 (q2 and q3 owned by the SP)
//   TBD: t0 buffer address (word aligned),
//       t1 {done, AAL3/4, 4'b0, MID, length},
//       t2 next TBD address (0: none)
//
// Timing: at most one cell per slot. A cell takes the TST, SQD and TBD
// reads, up to 12 data reads, 53 cycles into the FIFO and up to 4 writes;
// a slot shorter than that simply lowers the rate to what the SP sustains
// (a tick that arrives while busy is held, one deep). No cell is started
// unless the Tx FIFO has room for it.
//
// Following the architecture: the SP reads the Transmit Schedule Table,
// the Segmentation Queue Descriptors and the Tx buffer descriptors, builds
// the cell header, and its AAL engine generates the CRC and moves the cell
// from the Tx data buffer into the Tx FIFO, with the AAL5 CRC-32 or the
// AAL3/4 CRC-10 and sequence numbers. Own choices: all formats and the
// slot timer. VBR and ABR rate control are not built, because the
// architecture only names them.
module segmentation_processor
  import boc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  atm_cfg_t   cfg,
  // Tx FIFO write port
  input  logic       fifo_room,
  output logic       fifo_wr,
  output logic [7:0] fifo_data,
  // segmentation path to the common memory controller
  output bus_req_t   m_req,
  input  bus_rsp_t   m_rsp,
  output sp_stat_t   stat,
  output logic       pkt_done
);

  typedef enum logic [3:0] {
    S_IDLE, S_RD_TST, S_RD_SQD, S_RD_TBD, S_DATA, S_EMIT, S_WB_TBD, S_WB_SQD
  } state_t;

  state_t      st;
  logic [15:0] slot_cnt;
  logic        tick_pend;
  logic [3:0]  k;
  logic [5:0]  bcnt;
  logic [31:0] sqd_addr;
  logic [31:0] q  [4];
  logic [31:0] t  [3];
  logic [31:0] cw [PAYLOAD_WORDS];
  logic [31:0] crc;

  logic [15:0] len, off, pos;
  logic        last_cell, a34, trl5;
  assign len       = t[1][15:0];
  assign off       = q[2][15:0];
  assign a34       = t[1][30];                // AAL3/4 packet
  // AAL5: the rest of the packet fits with the 8-byte trailer;
  // AAL3/4: the rest fits in one 44-byte SAR-SDU
  assign last_cell = (off + (a34 ? 16'd44 : 16'd40)) >= len;
  assign trl5      = !a34 && last_cell;       // AAL5 trailer in words 10 and 11
  assign pos       = off + {10'h0, k, 2'b00};

  // what word k of the cell holds: trailer, zero pad, or data from memory
  logic need_read;
  assign need_read = !(trl5 && k >= 4'd10) && !(a34 && k == 4'd11) && (pos < len);

  // AAL3/4 SAR fields: segment type, sequence number, MID, length indicator
  logic [1:0] seg_st;
  logic [3:0] sn;
  logic [9:0] mid;
  logic [5:0] li;
  logic [5:0] sdu_idx;
  logic [9:0] crc10, crc10_fin;
  assign seg_st    = {off == 16'd0, last_cell};       // BOM 10, COM 00, EOM 01, SSM 11
  assign sn        = (off == 16'd0) ? 4'd0 : q[3][3:0];
  assign mid       = t[1][25:16];
  assign li        = last_cell ? 6'(len - off) : 6'd44;
  assign sdu_idx   = bcnt - 6'd7;
  // CRC-10 of the SAR-PDU: bytes 0..45 (in crc10) followed by the 6 LI bits
  always_comb begin
    crc10_fin = crc10;
    for (int i = 5; i >= 0; i--) begin
      if (crc10_fin[9] ^ li[i]) crc10_fin = (crc10_fin << 1) ^ CRC10_POLY;
      else                      crc10_fin = crc10_fin << 1;
    end
  end

  logic [31:0] data_word;
  always_comb begin
    data_word = m_rsp.rdata;
    for (int b = 0; b < 4; b++)
      if (pos + 16'(b) >= len) data_word[31 - 8*b -: 8] = 8'h00;
  end

  // word k of the cell: trailer, data or zero pad
  logic [31:0] cell_word;
  always_comb begin
    if (trl5 && k == 4'd10)           cell_word = {16'h0, len};
    else if (trl5 && k == 4'd11)      cell_word = ~crc;
    else if (need_read)               cell_word = data_word;
    else                              cell_word = 32'h0;
  end

  logic [31:0] hdr;
  assign hdr = {q[0][31:2], trl5, q[0][0]};

  function automatic logic [15:0] inc_mod(logic [15:0] v, logic [15:0] size);
    return (v + 16'd1 >= size) ? 16'd0 : v + 16'd1;
  endfunction

  always_comb begin
    m_req = BUS_REQ_IDLE;
    case (st)
      S_RD_TST: m_req = '{req: 1'b1, we: 1'b0, addr: cfg.tst_base + {14'h0, stat.tst_idx, 2'b00}, wdata: 32'h0};
      S_RD_SQD: m_req = '{req: 1'b1, we: 1'b0, addr: sqd_addr + {26'h0, k, 2'b00}, wdata: 32'h0};
      S_RD_TBD: m_req = '{req: 1'b1, we: 1'b0, addr: q[1] + {26'h0, k, 2'b00}, wdata: 32'h0};
      S_DATA:   m_req = '{req: need_read, we: 1'b0, addr: t[0] + {16'h0, pos}, wdata: 32'h0};
      S_WB_TBD: m_req = '{req: 1'b1, we: 1'b1, addr: q[1] + 32'd4, wdata: {1'b1, t[1][30:0]}};
      S_WB_SQD: begin
        m_req.req  = 1'b1;
        m_req.we   = 1'b1;
        m_req.addr = sqd_addr + {26'h0, k, 2'b00};
        case (k[1:0])
          2'd1:    m_req.wdata = last_cell ? t[2] : q[1];
          2'd2:    m_req.wdata = last_cell ? 32'h0 : {16'h0, off + (a34 ? 16'd44 : 16'(PAYLOAD_BYTES))};
          default: m_req.wdata = a34 ? {28'h0, sn + 4'd1} : (last_cell ? 32'hFFFF_FFFF : crc);
        endcase
      end
      default: ;
    endcase
  end

  // byte bcnt of the outgoing cell
  logic [5:0] pay_idx;
  assign pay_idx = bcnt - 6'd5;
  always_comb begin
    if (bcnt < 6'd4)       fifo_data = hdr[31 - 8*bcnt[1:0] -: 8];
    else if (bcnt == 6'd4) fifo_data = atm_hec(hdr);
    else if (!a34)         fifo_data = cw[pay_idx[5:2]][31 - 8*pay_idx[1:0] -: 8];
    else if (bcnt == 6'd5) fifo_data = {seg_st, sn, mid[9:8]};
    else if (bcnt == 6'd6) fifo_data = mid[7:0];
    else if (bcnt < 6'd51) fifo_data = cw[sdu_idx[5:2]][31 - 8*sdu_idx[1:0] -: 8];
    else if (bcnt == 6'd51) fifo_data = {li, crc10_fin[9:8]};
    else                   fifo_data = crc10_fin[7:0];
  end
  assign fifo_wr = (st == S_EMIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      slot_cnt  <= '0;
      tick_pend <= 1'b0;
      k         <= '0;
      bcnt      <= '0;
      sqd_addr  <= '0;
      crc       <= '1;
      crc10     <= '0;
      stat      <= '0;
      pkt_done  <= 1'b0;
      for (int i = 0; i < 4; i++) q[i] <= '0;
      for (int i = 0; i < 3; i++) t[i] <= '0;
      for (int i = 0; i < PAYLOAD_WORDS; i++) cw[i] <= '0;
    end else begin
      pkt_done <= 1'b0;
      // slot timer
      if (!cfg.tx_en) begin
        slot_cnt  <= '0;
        tick_pend <= 1'b0;
      end else if (slot_cnt + 16'd1 >= cfg.slot_cycles) begin
        slot_cnt  <= '0;
        tick_pend <= 1'b1;
      end else begin
        slot_cnt <= slot_cnt + 16'd1;
      end

      case (st)
        S_IDLE: if (cfg.tx_en && tick_pend && fifo_room && cfg.tst_len != 0) begin
          tick_pend <= 1'b0;
          st        <= S_RD_TST;
        end
        S_RD_TST: if (m_rsp.ready) begin
          stat.tst_idx <= inc_mod(stat.tst_idx, cfg.tst_len);
          sqd_addr     <= cfg.sqd_base + {12'h0, m_rsp.rdata[15:0], 4'h0};
          k            <= '0;
          st           <= m_rsp.rdata[31] ? S_RD_SQD : S_IDLE;
        end
        S_RD_SQD: if (m_rsp.ready) begin
          q[k[1:0]] <= m_rsp.rdata;
          k <= k + 1'b1;
          if (k == 4'd3) begin
            k  <= '0;
            st <= (q[1] == 32'h0) ? S_IDLE : S_RD_TBD;
          end
        end
        S_RD_TBD: if (m_rsp.ready) begin
          t[k[1:0]] <= m_rsp.rdata;
          k <= k + 1'b1;
          if (k == 4'd2) begin
            k   <= '0;
            crc <= (off == 16'd0) ? 32'hFFFF_FFFF : q[3];
            st  <= S_DATA;
          end
        end
        S_DATA: if (m_rsp.ready || !need_read) begin
          cw[k] <= cell_word;
          crc   <= crc32_word(crc, cell_word);
          k     <= k + 1'b1;
          if (k == 4'(PAYLOAD_WORDS - 1)) begin
            k    <= '0;
            bcnt <= '0;
            st   <= S_EMIT;
          end
        end
        S_EMIT: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt < 6'd5)        crc10 <= '0;
          else if (bcnt < 6'd51)  crc10 <= crc10_byte(crc10, fifo_data);
          if (bcnt == 6'(CELL_BYTES - 1)) begin
            stat.cells <= stat.cells + 1'b1;
            k  <= 4'd1;
            st <= last_cell ? S_WB_TBD : S_WB_SQD;
          end
        end
        S_WB_TBD: if (m_rsp.ready) st <= S_WB_SQD;
        S_WB_SQD: if (m_rsp.ready) begin
          k <= k + 1'b1;
          if (k == 4'd3) begin
            if (last_cell) begin
              stat.pkts <= stat.pkts + 1'b1;
              pkt_done  <= 1'b1;
            end
            st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
