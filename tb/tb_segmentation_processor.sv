// tb_segmentation_processor -- self-checking testbench of the Segmentation Processor.
//
// The testbench plays the Tx FIFO (it collects the bytes written and can
// refuse room) and the common memory. It sets up a four-slot transmit
// schedule table with one idle slot, two VCs with queue descriptors, and
// three packets: 100 bytes (three cells), 45 bytes (two cells, the trailer
// spilling into its own cell) and 40 bytes (one cell). Checked against the
// independent AAL5 reference: every cell header, HEC and payload, PTI
// marking the last cell, the Tx buffer descriptors marked done and the
// queues advanced; and the scheduling: at most one cell per slot, a held
// Tx FIFO stops all writes, and one pkt_done pulse per packet. Last, a
// 100-byte AAL3/4 packet on a third VC is checked against the reference
// SAR-PDUs (segment types, sequence numbers, MID, LI and CRC-10).
module tb_segmentation_processor;
  import boc_pkg::*;
  import tb_pkg::*;
  localparam int WORDS = 16384, SLOT = 200;
  localparam logic [31:0] TST = 32'h1000, SQD = 32'h2000;
  logic clk = 0, rst_n = 0;
  atm_cfg_t cfg;
  logic fifo_room, fifo_wr; logic [7:0] fifo_data;
  bus_req_t m_req; bus_rsp_t m_rsp;
  sp_stat_t stat; logic pkt_done;
  int checks = 0, failures = 0, n_done = 0, wr_while_full = 0;
  longint cyc = 0;
  byte unsigned got[$];
  longint starts[$];

  segmentation_processor dut (.*);
  tb_bus_mem #(.WORDS(WORDS), .LAT(2)) mem (.clk, .rst_n, .s_req(m_req), .s_rsp(m_rsp));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && fifo_wr) begin
      if (got.size() % 53 == 0) starts.push_back(cyc);
      got.push_back(fifo_data);
      if (!fifo_room && got.size() % 53 == 1) wr_while_full++;
    end
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

  function automatic bytes_t make_pkt(int n, int seed);
    bytes_t p;
    for (int i = 0; i < n; i++) p.push_back(8'(seed + i * 7));
    return p;
  endfunction

  task automatic load_buf(logic [31:0] a, bytes_t p);
    for (int i = 0; i < (p.size() + 3) / 4; i++) begin
      logic [31:0] w;
      w = 32'hA5A5A5A5;                    // junk past the end must not leak
      for (int b = 0; b < 4; b++) if (i * 4 + b < p.size()) w[31 - 8*b -: 8] = p[i * 4 + b];
      mem.mem[(a >> 2) + i] = w;
    end
  endtask

  initial begin
    bytes_t pa, pb, pc, exp3, exp4, got3, got4;
    logic [31:0] h;
    int ncell, last3, last4;
    longint t_hold;
    check(ref_selftest() == 0, "reference CRC self test");
    for (int i = 0; i < WORDS; i++) mem.mem[i] = 32'h0;
    pa = make_pkt(100, 1); pb = make_pkt(45, 50); pc = make_pkt(40, 99);
    load_buf(32'h8000, pa); load_buf(32'h9000, pb); load_buf(32'hA000, pc);
    // Tx buffer descriptors: A -> B on VC 3, C on VC 4
    mem.mem[32'h3000 >> 2] = 32'h8000; mem.mem[(32'h3000 >> 2) + 1] = 100; mem.mem[(32'h3000 >> 2) + 2] = 32'h3010;
    mem.mem[32'h3010 >> 2] = 32'h9000; mem.mem[(32'h3010 >> 2) + 1] = 45;  mem.mem[(32'h3010 >> 2) + 2] = 0;
    mem.mem[32'h3020 >> 2] = 32'hA000; mem.mem[(32'h3020 >> 2) + 1] = 40;  mem.mem[(32'h3020 >> 2) + 2] = 0;
    // segmentation queue descriptors
    mem.mem[(SQD + 3 * 16) >> 2] = {4'h0, 8'd2, 16'd33, 3'b000, 1'b0};
    mem.mem[((SQD + 3 * 16) >> 2) + 1] = 32'h3000;
    mem.mem[(SQD + 4 * 16) >> 2] = {4'h0, 8'd2, 16'd44, 3'b000, 1'b1};
    mem.mem[((SQD + 4 * 16) >> 2) + 1] = 32'h3020;
    // schedule: VC3, idle, VC4, VC3
    mem.mem[TST >> 2] = 32'h8000_0003; mem.mem[(TST >> 2) + 1] = 32'h0;
    mem.mem[(TST >> 2) + 2] = 32'h8000_0004; mem.mem[(TST >> 2) + 3] = 32'h8000_0003;
    cfg = '0;
    cfg.tx_en = 1; cfg.tst_base = TST; cfg.tst_len = 4; cfg.sqd_base = SQD; cfg.slot_cycles = SLOT;
    fifo_room = 1;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // hold the FIFO full for a while after the second cell
    wait (starts.size() == 2);
    #1 fifo_room = 0; t_hold = cyc;
    repeat (5 * SLOT) @(posedge clk);
    check(starts.size() == 2 || (starts.size() == 3 && starts[2] - t_hold < 60), "no cell started while the FIFO was full");
    #1 fifo_room = 1;
    repeat (12 * SLOT) @(posedge clk);
    check(n_done == 3, $sformatf("three packets done (%0d)", n_done));
    check(got.size() == 6 * 53, $sformatf("six cells (%0d bytes)", got.size()));
    // split cells per VC and check headers
    ncell = got.size() / 53;
    last3 = 0; last4 = 0;
    for (int c = 0; c < ncell; c++) begin
      h = {got[c*53], got[c*53+1], got[c*53+2], got[c*53+3]};
      check(got[c*53+4] == ref_hec(h), $sformatf("HEC of cell %0d", c));
      check(h[27:20] == 8'd2, "VPI");
      for (int i = 0; i < 48; i++)
        if (h[19:4] == 16'd33) got3.push_back(got[c*53+5+i]); else got4.push_back(got[c*53+5+i]);
      if (h[19:4] == 16'd33 && h[1]) last3++;
      if (h[19:4] == 16'd44 && h[1]) last4++;
      if (h[19:4] == 16'd44) check(h[0] == 1'b1, "CLP copied from the template");
    end
    check(last3 == 2 && last4 == 1, $sformatf("end-of-packet marks %0d %0d", last3, last4));
    exp3 = ref_aal5_pdu(pa);
    begin bytes_t t; t = ref_aal5_pdu(pb); foreach (t[i]) exp3.push_back(t[i]); end
    exp4 = ref_aal5_pdu(pc);
    check(got3 == exp3, $sformatf("VC 3 payload (%0d vs %0d bytes)", got3.size(), exp3.size()));
    check(got4 == exp4, $sformatf("VC 4 payload (%0d vs %0d bytes)", got4.size(), exp4.size()));
    check(mem.mem[(32'h3000 >> 2) + 1][31] && mem.mem[(32'h3010 >> 2) + 1][31] &&
          mem.mem[(32'h3020 >> 2) + 1][31], "descriptors marked done");
    check(mem.mem[((SQD + 3 * 16) >> 2) + 1] == 0 && mem.mem[((SQD + 4 * 16) >> 2) + 1] == 0, "queues empty");
    // one cell per slot tick; a tick that comes while a cell is in progress
    // is held, so two cells may follow closely but never three within a slot
    for (int i = 2; i < starts.size(); i++)
      check(starts[i] - starts[i-2] >= SLOT, $sformatf("cell spacing %0d", starts[i] - starts[i-2]));
    check(stat.cells == 6 && stat.pkts == 3, "counters");
    check(wr_while_full == 0, "no cell started without room");

    // AAL3/4 packet of 100 bytes (MID 0x15) on VC 5: BOM, COM, EOM cells
    begin
      bytes_t pd, seg, exp5, got5;
      pd = make_pkt(100, 33);
      load_buf(32'hB000, pd);
      mem.mem[32'h3030 >> 2] = 32'hB000;
      mem.mem[(32'h3030 >> 2) + 1] = {1'b0, 1'b1, 4'h0, 10'h15, 16'd100};
      mem.mem[(32'h3030 >> 2) + 2] = 0;
      mem.mem[(SQD + 5 * 16) >> 2] = {4'h0, 8'd2, 16'd55, 3'b000, 1'b0};
      mem.mem[((SQD + 5 * 16) >> 2) + 1] = 32'h3030;
      mem.mem[(TST >> 2) + 1] = 32'h8000_0005;
      repeat (16 * SLOT) @(posedge clk);
      check(got.size() == 9 * 53, $sformatf("three AAL3/4 cells (%0d bytes in all)", got.size()));
      for (int s = 0; s < 3; s++) begin
        seg.delete();
        for (int i = 44 * s; i < 44 * s + 44 && i < 100; i++) seg.push_back(pd[i]);
        seg = ref_sar34(s == 0 ? 2'b10 : (s == 2 ? 2'b01 : 2'b00), 4'(s), 10'h15, seg);
        foreach (seg[i]) exp5.push_back(seg[i]);
      end
      for (int c = 6; c < got.size() / 53; c++) begin
        h = {got[c*53], got[c*53+1], got[c*53+2], got[c*53+3]};
        check(h == {4'h0, 8'd2, 16'd55, 4'h0}, $sformatf("AAL3/4 cell %0d header %08x", c, h));
        for (int i = 0; i < 48; i++) got5.push_back(got[c*53+5+i]);
      end
      check(got5 == exp5, "AAL3/4 SAR-PDUs: ST, SN, MID, LI and CRC-10");
      check(mem.mem[(32'h3030 >> 2) + 1][31], "AAL3/4 descriptor marked done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
