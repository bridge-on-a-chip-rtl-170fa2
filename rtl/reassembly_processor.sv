// reassembly_processor -- Reassembly Processor (RP) with its AAL5 and AAL3/4 engine.
//
// Turns the stream of received ATM cells back into packets in common memory.
// For every cell in the Rx FIFO it
//   1. pops the 53 bytes, forming the VPI/VCI from the header,
//   2. reads the 4-word Rx connection table entry indexed by the low
//      RCT_BITS bits of the VCI and checks that it is valid and belongs to
//      this VPI/VCI (otherwise the cell is dropped and counted),
//   3. on the first cell of a packet takes a data buffer from the free
//      buffer queue and presets the running CRC,
//   4. writes the 12 payload words to the buffer while updating the AAL5
//      CRC-32, and
//   5. on the last cell of the packet (PTI bit 0 set) checks the CRC
//      residue and the length field of the AAL5 trailer, writes a 4-word Rx
//      buffer descriptor into the descriptor ring and pulses pkt_done, the
//      interrupt that tells the inter-networking unit a packet is ready.
// Finally it writes the updated entry words back.
//
// A connection whose entry has bit 30 set carries AAL3/4 instead. Each cell
// is then a SAR-PDU: a 2-byte header {ST, SN, MID}, 44 bytes and a 2-byte
// trailer {LI, CRC-10}. The RP checks the CRC-10 of every cell (computed
// while the cell is popped) and that the sequence numbers run on by one. It
// starts a message at a BOM or SSM segment, ends it at an EOM or SSM, and
// drops a segment that arrives with no message open. It stores the whole
// 48-byte SAR-PDUs; software removes the SAR and CPCS fields. The
// descriptor then reports the CRC-10 and sequence errors, and the stored
// byte count as the length.
//
// Memory layouts (byte addresses, big-endian words):
//   connection entry at RCT_BASE + 16*VCI[RCT_BITS-1:0]
//     w0 {valid, AAL3/4, 6'b0, VPI, VCI}  written by software
//     w1 current buffer address (0: none)
//     w2 {overflow, SN error, CRC-10 error, 9'b0, next SN, bytes}
//     w3 running CRC                      (w1..w3 owned by the RP)
//   free buffer queue: FBQ_SIZE buffer addresses at FBQ_BASE; the RP
//     consumes (index fbq_cons), software produces (cfg.fbq_prod)
//   Rx descriptor ring: RXD_SIZE entries of 16 bytes at RXD_BASE
//     d0 buffer address   d1 {crc_err, len_err, overflow, sn_err, 12'b0, length}
//     d2 {8'b0, VPI, VCI} d3 bytes received including pad and trailer
// Payload beyond BUF_BYTES is not written and sets the overflow flag. When
// the descriptor ring is full at the end of a packet the packet is dropped
// and its buffer kept for the next packet on the same connection.
// Non-user cells (PTI bit 2 set) are dropped and counted as unknown.
//
// Timing: 53 cycles to pop a cell, then one memory transfer per table
// word, data word and descriptor word, each as long as the memory
// controller takes (3 cycles when uncontended).
//
// Following the architecture: the RP steps above (cell header to VPI/VCI,
// connection table lookup and validity check, AAL functions with CRC
// checking for AAL5 and CRC-10 plus sequence number checking for AAL3/4,
// transfer into an Rx data buffer, Rx buffer descriptors and
// notification). Own choices: the table and descriptor formats, the
// direct-indexed table, the free buffer queue, one AAL3/4 message at a time
// per connection (no MID interleaving), the AAL3/4 CPCS layer left to
// software, and the HEC byte is ignored (the PHY checks it).
module reassembly_processor
  import boc_pkg::*;
#(
  parameter int unsigned RCT_BITS = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  atm_cfg_t   cfg,
  // Rx FIFO read port
  input  logic       fifo_avail,
  input  logic [7:0] fifo_data,
  output logic       fifo_rd,
  // reassembly path to the common memory controller
  output bus_req_t   m_req,
  input  bus_rsp_t   m_rsp,
  output rp_stat_t   stat,
  output logic       pkt_done
);

  typedef enum logic [3:0] {
    S_IDLE, S_POP, S_LOOK, S_RD_ENT, S_CHECK, S_RD_FBQ, S_WR_DATA,
    S_EOP, S_WR_DESC, S_WR_ENT
  } state_t;

  state_t      st;
  logic [5:0]  bcnt;
  logic [3:0]  k;
  atm_hdr_t    hdr;
  logic [31:0] cw  [PAYLOAD_WORDS];
  logic [31:0] ent [4];
  logic [31:0] ent_addr;
  logic        crc_bad, len_bad;

  logic [15:0] count;
  logic [15:0] trailer_len;
  logic [15:0] padded;
  assign count       = ent[2][15:0];
  assign trailer_len = cw[10][15:0];
  assign padded      = trailer_len + 16'd8;

  function automatic logic [15:0] inc_mod(logic [15:0] v, logic [15:0] size);
    return (v + 16'd1 >= size) ? 16'd0 : v + 16'd1;
  endfunction

  assign fifo_rd = (st == S_POP);

  // payload word that byte bcnt of the cell belongs to
  logic [5:0] pay_idx;
  assign pay_idx = bcnt - 6'd5;

  // AAL3/4 connections (entry w0 bit 30): SAR header and trailer fields
  logic       aal34;
  logic [1:0] sar_st;       // segment type: 10 BOM, 00 COM, 01 EOM, 11 SSM
  logic [3:0] sar_sn;
  logic [9:0] crc10;        // running CRC-10 of the cell being popped
  logic       start_pkt, last_cell;
  assign aal34     = ent[0][30];
  assign sar_st    = cw[0][31:30];
  assign sar_sn    = cw[0][29:26];
  assign start_pkt = aal34 ? sar_st[1] : (count == 16'd0);
  assign last_cell = aal34 ? sar_st[0] : hdr.pti[0];

  logic ent_match;
  assign ent_match = ent[0][31] && ent[0][23:16] == hdr.vpi && ent[0][15:0] == hdr.vci;

  logic [31:0] data_addr;
  assign data_addr = ent[1] + {16'h0, count} + {26'h0, k, 2'b00};
  logic data_fits;
  assign data_fits = ({16'h0, count} + {26'h0, k, 2'b00}) < {16'h0, cfg.buf_bytes};

  logic ring_full;
  assign ring_full = inc_mod(stat.rxd_prod, cfg.rxd_size) == cfg.rxd_cons;

  // memory request for the current state
  always_comb begin
    m_req = BUS_REQ_IDLE;
    case (st)
      S_RD_ENT:  m_req = '{req: 1'b1, we: 1'b0, addr: ent_addr + {26'h0, k, 2'b00}, wdata: 32'h0};
      S_RD_FBQ:  m_req = '{req: 1'b1, we: 1'b0,
                          addr: cfg.fbq_base + {14'h0, stat.fbq_cons, 2'b00}, wdata: 32'h0};
      S_WR_DATA: m_req = '{req: data_fits, we: 1'b1, addr: data_addr, wdata: cw[k]};
      S_WR_DESC: begin
        m_req.req  = 1'b1;
        m_req.we   = 1'b1;
        m_req.addr = cfg.rxd_base + {12'h0, stat.rxd_prod, 4'h0} + {26'h0, k, 2'b00};
        case (k[1:0])
          2'd0:    m_req.wdata = ent[1];
          2'd1:    m_req.wdata = {crc_bad, len_bad, ent[2][31], aal34 && ent[2][30], 12'h0,
                                  aal34 ? count : trailer_len};
          2'd2:    m_req.wdata = {8'h0, hdr.vpi, hdr.vci};
          default: m_req.wdata = {16'h0, count};
        endcase
      end
      S_WR_ENT:  m_req = '{req: (k != 4'd0), we: 1'b1, addr: ent_addr + {26'h0, k, 2'b00}, wdata: ent[k[1:0]]};
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      bcnt     <= '0;
      k        <= '0;
      hdr      <= '0;
      ent_addr <= '0;
      crc_bad  <= 1'b0;
      len_bad  <= 1'b0;
      crc10    <= '0;
      stat     <= '0;
      pkt_done <= 1'b0;
      for (int i = 0; i < 4; i++) ent[i] <= '0;
      for (int i = 0; i < PAYLOAD_WORDS; i++) cw[i] <= '0;
    end else begin
      pkt_done <= 1'b0;
      case (st)
        S_IDLE: if (cfg.rx_en && fifo_avail) begin
          st   <= S_POP;
          bcnt <= '0;
        end
        S_POP: begin
          if (bcnt < 6'd4) hdr <= {hdr[23:0], fifo_data};
          else if (bcnt >= 6'd5) cw[pay_idx[5:2]] <= {cw[pay_idx[5:2]][23:0], fifo_data};
          crc10 <= (bcnt < 6'd5) ? 10'h0 : crc10_byte(crc10, fifo_data);
          bcnt <= bcnt + 1'b1;
          if (bcnt == 6'(CELL_BYTES - 1)) st <= S_LOOK;
        end
        S_LOOK: begin
          stat.cells <= stat.cells + 1'b1;
          if (hdr.pti[2]) begin
            stat.drop_unknown <= stat.drop_unknown + 1'b1;
            st <= S_IDLE;
          end else begin
            ent_addr <= cfg.rct_base + {{(28-RCT_BITS){1'b0}}, hdr.vci[RCT_BITS-1:0], 4'h0};
            k  <= '0;
            st <= S_RD_ENT;
          end
        end
        S_RD_ENT: if (m_rsp.ready) begin
          ent[k[1:0]] <= m_rsp.rdata;
          k <= k + 1'b1;
          if (k == 4'd3) st <= S_CHECK;
        end
        S_CHECK: begin
          k <= '0;
          if (!ent_match) begin
            stat.drop_unknown <= stat.drop_unknown + 1'b1;
            st <= S_IDLE;
          end else if (aal34 && !start_pkt && count == 16'd0) begin
            stat.drop_unknown <= stat.drop_unknown + 1'b1;  // message without its BOM
            st <= S_IDLE;
          end else if (start_pkt) begin
            ent[2] <= '0;
            ent[3] <= '1;
            if (ent[1] != 32'h0) st <= S_WR_DATA;       // buffer kept from a dropped packet
            else if (stat.fbq_cons == cfg.fbq_prod) begin
              stat.drop_nobuf <= stat.drop_nobuf + 1'b1;
              st <= S_IDLE;
            end else st <= S_RD_FBQ;
          end else st <= S_WR_DATA;
          // AAL3/4: next sequence number, sticky CRC-10 and sequence errors
          if (aal34 && (start_pkt || count != 16'd0)) begin
            ent[2][19:16] <= sar_sn + 4'd1;
            ent[2][29]    <= (!start_pkt && ent[2][29]) || (crc10 != 10'h0);
            ent[2][30]    <= (!start_pkt && ent[2][30]) || (!start_pkt && sar_sn != ent[2][19:16]);
          end
        end
        S_RD_FBQ: if (m_rsp.ready) begin
          ent[1]        <= m_rsp.rdata;
          stat.fbq_cons <= inc_mod(stat.fbq_cons, cfg.fbq_size);
          st            <= S_WR_DATA;
        end
        S_WR_DATA: if (m_rsp.ready || !data_fits) begin
          ent[3] <= crc32_word(ent[3], cw[k]);
          if (!data_fits) ent[2][31] <= 1'b1;
          k <= k + 1'b1;
          if (k == 4'(PAYLOAD_WORDS - 1)) begin
            ent[2][15:0] <= count + 16'(PAYLOAD_BYTES);
            k  <= '0;
            st <= last_cell ? S_EOP : S_WR_ENT;
          end
        end
        S_EOP: begin
          crc_bad <= aal34 ? ent[2][29] : (ent[3] != CRC32_RESIDUE);
          len_bad <= !aal34 && ((trailer_len == 16'd0) || (padded > count) ||
                                (count - padded >= 16'(PAYLOAD_BYTES)));
          if (ring_full) begin
            stat.drop_nobuf <= stat.drop_nobuf + 1'b1;
            ent[2] <= '0;
            st <= S_WR_ENT;
          end else st <= S_WR_DESC;
        end
        S_WR_DESC: if (m_rsp.ready) begin
          k <= k + 1'b1;
          if (k == 4'd3) begin
            k             <= '0;
            stat.rxd_prod <= inc_mod(stat.rxd_prod, cfg.rxd_size);
            stat.pkts     <= stat.pkts + 1'b1;
            if (crc_bad) stat.crc_err <= stat.crc_err + 1'b1;
            pkt_done      <= 1'b1;
            ent[1]        <= '0;
            ent[2]        <= '0;
            st            <= S_WR_ENT;
          end
        end
        S_WR_ENT: begin
          if (k == 4'd0) k <= 4'd1;                     // w0 belongs to software
          else if (m_rsp.ready) begin
            k <= k + 1'b1;
            if (k == 4'd3) st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
