// tb_reassembly_processor -- self-checking testbench of the Reassembly Processor.
//
// The testbench plays the Rx FIFO (a byte queue of whole cells) and the
// common memory (a bus memory model), sets up a connection table, a free
// buffer queue and a descriptor ring, and sends AAL5 packets built by the
// independent reference model in tb_pkg. Checked: the reassembled bytes
// in the data buffers, each descriptor (buffer, length, error flags,
// VPI/VCI), the CRC error flag on a corrupted packet, cells of two VCs
// interleaved, cells of an unknown VC and non-user cells dropped, a packet
// dropped when the descriptor ring is full with its buffer reused
// afterwards, and one pkt_done pulse per descriptor. On an AAL3/4
// connection: a good three-segment message, one with a skipped sequence
// number and one with a corrupted segment (CRC-10), each checked in its
// descriptor and buffer, and a segment with no message open dropped.
module tb_reassembly_processor;
  import boc_pkg::*;
  import tb_pkg::*;
  localparam int WORDS = 16384;
  localparam logic [31:0] RCT = 32'h1000, FBQ = 32'h3000, RXD = 32'h3400, BUFS = 32'h4000;
  logic clk = 0, rst_n = 0;
  atm_cfg_t cfg;
  logic fifo_avail, fifo_rd; logic [7:0] fifo_data;
  bus_req_t m_req; bus_rsp_t m_rsp;
  rp_stat_t stat; logic pkt_done;
  int checks = 0, failures = 0, n_done = 0;
  byte unsigned cellq[$];

  reassembly_processor #(.RCT_BITS(10)) dut (.*);
  tb_bus_mem #(.WORDS(WORDS), .LAT(2)) mem (.clk, .rst_n, .s_req(m_req), .s_rsp(m_rsp));
  always #5 clk = ~clk;

  assign fifo_avail = cellq.size() >= 53;
  assign fifo_data  = (cellq.size() > 0) ? cellq[0] : 8'h00;
  always @(posedge clk) begin
    if (rst_n && fifo_rd && cellq.size() > 0) void'(cellq.pop_front());
    if (rst_n && pkt_done) n_done++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] rd32(logic [31:0] a);
    return mem.mem[(a >> 2) % WORDS];
  endfunction

  function automatic bytes_t make_pkt(int n, int seed);
    bytes_t p;
    for (int i = 0; i < n; i++) p.push_back(8'(seed + i * 11));
    return p;
  endfunction

  // cells of one PDU as 53-byte cells
  function automatic bytes_t cell_of(bytes_t pdu, int c, logic [7:0] vpi, logic [15:0] vci, bit oam);
    bytes_t cl;
    logic [31:0] h;
    bit last;
    last = (c + 1) * 48 >= pdu.size();
    h = {4'h0, vpi, vci, oam ? 3'b100 : {2'b00, last}, 1'b0};
    for (int b = 3; b >= 0; b--) cl.push_back(h[8*b +: 8]);
    cl.push_back(ref_hec(h));
    for (int i = 0; i < 48; i++) cl.push_back(pdu[c * 48 + i]);
    return cl;
  endfunction

  task automatic push_cells(bytes_t cl);
    foreach (cl[i]) cellq.push_back(cl[i]);
  endtask

  task automatic send_pdu(bytes_t pdu, logic [7:0] vpi, logic [15:0] vci);
    for (int c = 0; c < pdu.size() / 48; c++) push_cells(cell_of(pdu, c, vpi, vci, 0));
  endtask

  task automatic wait_idle();
    int quiet;
    quiet = 0;
    while (quiet < 20) begin
      @(posedge clk);
      if (cellq.size() == 0 && !m_req.req) quiet++; else quiet = 0;
    end
  endtask

  task automatic check_desc(int idx, bytes_t pkt, logic [7:0] vpi, logic [15:0] vci,
                            bit exp_crc_err, string tag);
    logic [31:0] d0, d1, d2;
    bit ok;
    d0 = rd32(RXD + idx * 16); d1 = rd32(RXD + idx * 16 + 4); d2 = rd32(RXD + idx * 16 + 8);
    check(d1[15:0] == 16'(pkt.size()), $sformatf("%s: length %0d exp %0d", tag, d1[15:0], pkt.size()));
    check(d1[31] == exp_crc_err && !d1[30] && !d1[29], $sformatf("%s: flags %08x", tag, d1));
    check(d2 == {8'h0, vpi, vci}, $sformatf("%s: vc %08x", tag, d2));
    ok = 1;
    for (int i = 0; i < pkt.size(); i++)
      if (rd32(d0 + 32'(i & ~3))[31 - 8 * (i % 4) -: 8] != pkt[i]) ok = 0;
    check(ok || exp_crc_err, $sformatf("%s: buffer content", tag));
  endtask

  initial begin
    bytes_t p1, p2, p3, p4, p5, pdu, pdu3, pdu_a, pdu_b;
    logic [31:0] kept;
    check(ref_selftest() == 0, "reference CRC self test");
    for (int i = 0; i < WORDS; i++) mem.mem[i] = 32'h0;
    // connection entries for VCI 5 and 6 (VPI 1); entry for VCI 9 left invalid
    mem.mem[(RCT + 5 * 16) >> 2] = {1'b1, 7'h0, 8'd1, 16'd5};
    mem.mem[(RCT + 6 * 16) >> 2] = {1'b1, 7'h0, 8'd1, 16'd6};
    for (int i = 0; i < 8; i++) mem.mem[(FBQ >> 2) + i] = BUFS + 32'(i * 32'h800);
    cfg = '0;
    cfg.rx_en = 1; cfg.rct_base = RCT; cfg.fbq_base = FBQ; cfg.fbq_size = 8; cfg.fbq_prod = 7;
    cfg.rxd_base = RXD; cfg.rxd_size = 8; cfg.rxd_cons = 0; cfg.buf_bytes = 16'h800;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // 1. one packet of 100 bytes (3 cells)
    p1 = make_pkt(100, 3);
    send_pdu(ref_aal5_pdu(p1), 8'd1, 16'd5);
    wait_idle();
    check(stat.rxd_prod == 1 && stat.pkts == 1, "one descriptor");
    check(rd32(RXD) == BUFS, "first free buffer used");
    check_desc(0, p1, 8'd1, 16'd5, 0, "pkt1");

    // 2. unknown VC and a non-user cell are dropped
    push_cells(cell_of(ref_aal5_pdu(p1), 0, 8'd1, 16'd9, 0));
    push_cells(cell_of(ref_aal5_pdu(p1), 0, 8'd1, 16'd5, 1));
    wait_idle();
    check(stat.drop_unknown == 2, $sformatf("two cells dropped (%0d)", stat.drop_unknown));
    check(stat.rxd_prod == 1, "no descriptor for dropped cells");

    // 3. corrupted packet: CRC error flagged
    p2 = make_pkt(40, 77);
    pdu = ref_aal5_pdu(p2);
    pdu[7] = pdu[7] ^ 8'h10;
    send_pdu(pdu, 8'd1, 16'd5);
    wait_idle();
    check(stat.crc_err == 1, "CRC error counted");
    check_desc(1, p2, 8'd1, 16'd5, 1, "pkt2");

    // 4. two VCs interleaved cell by cell
    p3 = make_pkt(150, 9);
    p4 = make_pkt(200, 200);
    pdu_a = ref_aal5_pdu(p3);
    pdu_b = ref_aal5_pdu(p4);
    for (int c = 0; c < 5; c++) begin
      if (c < pdu_a.size() / 48) push_cells(cell_of(pdu_a, c, 8'd1, 16'd5, 0));
      if (c < pdu_b.size() / 48) push_cells(cell_of(pdu_b, c, 8'd1, 16'd6, 0));
    end
    wait_idle();
    check(stat.rxd_prod == 4, "two more descriptors");
    check_desc(2, p3, 8'd1, 16'd5, 0, "pkt3");
    check_desc(3, p4, 8'd1, 16'd6, 0, "pkt4");

    // 5. ring full: the packet is dropped and its buffer kept for the next one
    cfg.rxd_cons = 5;
    p5 = make_pkt(60, 5);
    send_pdu(ref_aal5_pdu(p5), 8'd1, 16'd6);
    wait_idle();
    check(stat.rxd_prod == 4 && stat.drop_nobuf == 1, "packet dropped on full ring");
    kept = rd32(RCT + 6 * 16 + 4);
    check(kept != 0, "buffer kept in the connection entry");
    cfg.rxd_cons = 4;
    send_pdu(ref_aal5_pdu(p5), 8'd1, 16'd6);
    wait_idle();
    check(stat.rxd_prod == 5, "packet accepted after the ring drained");
    check(rd32(RXD + 4 * 16) == kept, "kept buffer reused");
    check_desc(4, p5, 8'd1, 16'd6, 0, "pkt5");
    check(stat.fbq_cons == 5, $sformatf("five buffers taken (%0d)", stat.fbq_cons));
    check(n_done == 5, $sformatf("pkt_done pulses %0d", n_done));

    // 6. AAL3/4 connection (VCI 7): CRC-10 and sequence number checks
    mem.mem[(RCT + 7 * 16) >> 2] = {1'b1, 1'b1, 6'h0, 8'd1, 16'd7};
    cfg.fbq_prod = 0;
    for (int m = 0; m < 3; m++) begin
      bytes_t msg, seg, all;
      logic [3:0] sn;
      logic [31:0] d0, d1;
      bit ok;
      msg = make_pkt(120, 40 + m);
      all.delete();
      for (int s = 0; s < 3; s++) begin
        seg.delete();
        for (int i = 44 * s; i < 44 * s + 44 && i < msg.size(); i++) seg.push_back(msg[i]);
        sn = 4'(s + ((m == 1 && s > 0) ? 1 : 0));         // message 1 skips a number
        seg = ref_sar34(s == 0 ? 2'b10 : (s == 2 ? 2'b01 : 2'b00), sn, 10'h15, seg);
        if (m == 2 && s == 1) seg[20] = seg[20] ^ 8'h04;   // message 2 is corrupted
        foreach (seg[i]) all.push_back(seg[i]);
        push_cells(cell_of(seg, 0, 8'd1, 16'd7, 0));
      end
      wait_idle();
      d0 = rd32(RXD + 32'((5 + m) % 8) * 16);
      d1 = rd32(RXD + 32'((5 + m) % 8) * 16 + 4);
      check(d1 == {m == 2, 2'b00, m == 1, 12'h0, 16'd144},
            $sformatf("AAL3/4 message %0d: descriptor flags and length %08x", m, d1));
      ok = 1;
      for (int i = 0; i < 144; i++)
        if (rd32(d0 + 32'(i & ~3))[31 - 8 * (i % 4) -: 8] != all[i]) ok = 0;
      check(ok, $sformatf("AAL3/4 message %0d: SAR-PDUs in the buffer", m));
    end
    check(stat.crc_err == 2, $sformatf("AAL3/4 CRC-10 error counted (%0d)", stat.crc_err));
    // a continuation segment without its beginning is dropped
    begin
      bytes_t seg;
      seg = ref_sar34(2'b00, 4'd3, 10'h15, make_pkt(44, 1));
      push_cells(cell_of(seg, 0, 8'd1, 16'd7, 0));
      wait_idle();
      check(stat.drop_unknown == 3 && stat.pkts == 8, "AAL3/4 segment without BOM dropped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
