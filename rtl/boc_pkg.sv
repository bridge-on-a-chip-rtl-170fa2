// boc_pkg -- types, constants and functions shared by the bridge-on-a-chip.
//
// The on-chip buses (inter-networking ASB, WLAN ASB, segmentation and
// reassembly paths to the common memory controller) all use one simplified
// transfer handshake, carried by the two structs below: a master raises
// req with we/addr/wdata and holds them unchanged until the slave answers
// with a one-cycle ready (read data valid in that same cycle). Addresses are
// byte addresses; every transfer is one aligned 32-bit word, and words are
// big-endian (byte 0 of a cell payload or frame sits in bits 31:24). This
// stands in for the AMBA ASB named by the architecture; its transfer types,
// wait/error/last signals and bus handover are not modelled.
//
// The ATM constants follow the UNI cell format (5-byte header, 48-byte
// payload) and AAL5 (CRC-32 generator 0x04C11DB7, preset to all ones,
// complemented, sent most significant bit first). The frame check sequence
// of IEEE 802.11 uses the same generator bit-reflected, see crc32_byte_lsb.
// AAL3/4 protects each SAR-PDU with a CRC-10, see crc10_byte.
package boc_pkg;

  localparam int unsigned CELL_BYTES    = 53;
  localparam int unsigned PAYLOAD_BYTES = 48;
  localparam int unsigned PAYLOAD_WORDS = 12;
  localparam logic [31:0] CRC32_POLY    = 32'h04C1_1DB7;
  localparam logic [31:0] CRC32_RESIDUE = 32'hC704_DD7B;  // AAL5 check value
  localparam logic [31:0] FCS_RESIDUE   = 32'hDEBB_20E3;  // 802.11 FCS check value (reflected)

  typedef struct packed {
    logic        req;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic        ready;
    logic [31:0] rdata;
  } bus_rsp_t;

  localparam bus_req_t BUS_REQ_IDLE = '{req: 1'b0, we: 1'b0, addr: 32'h0, wdata: 32'h0};
  localparam bus_rsp_t BUS_RSP_IDLE = '{ready: 1'b0, rdata: 32'h0};

  // UNI cell header as held in one 32-bit word (HEC travels separately).
  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
    logic [2:0]  pti;
    logic        clp;
  } atm_hdr_t;

  // Configuration of the ATM-SAR unit, written by the inter-networking ARM.
  typedef struct packed {
    logic        rx_en;
    logic [31:0] rct_base;      // Rx connection table, 16 bytes per entry
    logic [31:0] fbq_base;      // free buffer queue, one pointer per word
    logic [15:0] fbq_size;      // entries in the free buffer queue
    logic [15:0] fbq_prod;      // producer index (written by software)
    logic [31:0] rxd_base;      // Rx descriptor ring, 16 bytes per entry
    logic [15:0] rxd_size;
    logic [15:0] rxd_cons;      // consumer index (written by software)
    logic [15:0] buf_bytes;     // size of one Rx data buffer
    logic        tx_en;
    logic [31:0] tst_base;      // transmit schedule table, one word per slot
    logic [15:0] tst_len;
    logic [31:0] sqd_base;      // segmentation queue descriptors, 16 bytes per VC
    logic [15:0] slot_cycles;   // clock cycles per schedule slot (cell rate)
  } atm_cfg_t;

  typedef struct packed {
    logic [15:0] fbq_cons;
    logic [15:0] rxd_prod;
    logic [15:0] cells;
    logic [15:0] pkts;
    logic [15:0] drop_unknown;  // cells of an unopened VPI/VCI
    logic [15:0] drop_nobuf;    // cells dropped for want of a buffer or descriptor
    logic [15:0] crc_err;
  } rp_stat_t;

  typedef struct packed {
    logic [15:0] cells;
    logic [15:0] pkts;
    logic [15:0] tst_idx;
  } sp_stat_t;

  // One input byte into a CRC-32 register, MSB first (AAL5).
  function automatic logic [31:0] crc32_byte(logic [31:0] crc, logic [7:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (c[31] ^ d[i]) c = (c << 1) ^ CRC32_POLY;
      else              c = c << 1;
    end
    return c;
  endfunction

  function automatic logic [31:0] crc32_word(logic [31:0] crc, logic [31:0] w);
    logic [31:0] c;
    c = crc;
    for (int b = 3; b >= 0; b--) c = crc32_byte(c, w[8*b +: 8]);
    return c;
  endfunction

  // One input byte into a bit-reflected CRC-32 register, LSB first (802.11 FCS).
  function automatic logic [31:0] crc32_byte_lsb(logic [31:0] crc, logic [7:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ d[i]) c = (c >> 1) ^ 32'hEDB8_8320;
      else             c = c >> 1;
    end
    return c;
  endfunction

  // Header error control: CRC-8 (x^8 + x^2 + x + 1) over the four header
  // bytes, XORed with the coset 0x55 (ITU-T I.432).
  function automatic logic [7:0] atm_hec(logic [31:0] hdr);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      if (c[7] ^ hdr[i]) c = (c << 1) ^ 8'h07;
      else               c = c << 1;
    end
    return c ^ 8'h55;
  endfunction

  // AAL3/4 SAR CRC-10, x^10 + x^9 + x^5 + x^4 + x + 1, MSB first, preset to
  // zero. Run over a whole 48-byte SAR-PDU (CRC field included) it leaves 0.
  localparam logic [9:0] CRC10_POLY = 10'h233;

  function automatic logic [9:0] crc10_byte(logic [9:0] crc, logic [7:0] d);
    logic [9:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (c[9] ^ d[i]) c = (c << 1) ^ CRC10_POLY;
      else             c = c << 1;
    end
    return c;
  endfunction

endpackage
