// tb_pai -- self-checking testbench of the wireless physical attachment interface.
//
// Drives the register port as the WLAN ARM would, gives the DMA port a bus
// memory model and plays the wireless PHY. Checked: a 70-byte frame
// (longer than the transmit FIFO) sent from memory with its FCS appended,
// against the reference CRC-32, with a PHY that takes bytes at random
// times; received frames with good and bad FCS reported with the right
// length, verdict and header type, queued in order, and moved into memory by the
// receive DMA; a frame dropped when the status queue is full; and the TSF
// counter advancing one count per US_DIV cycles and loading.
module tb_pai;
  import boc_pkg::*;
  import tb_pkg::*;
  localparam int WORDS = 4096, US_DIV = 10;
  logic clk = 0, rst_n = 0;
  bus_req_t s_req, m_req; bus_rsp_t s_rsp, m_rsp;
  logic [7:0] tx_data, rx_data; logic tx_en, tx_rdy, rx_valid, rx_end;
  logic irq_rx, irq_tx, irq_dma;
  int checks = 0, failures = 0, n_rx = 0, n_tx = 0, n_dma = 0;
  byte unsigned txgot[$];

  pai #(.RXF_BYTES(512), .TXF_BYTES(64), .US_DIV(US_DIV)) dut (.*);
  tb_bus_mem #(.WORDS(WORDS), .LAT(2)) mem (.clk, .rst_n, .s_req(m_req), .s_rsp(m_rsp));
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (irq_rx) n_rx++;
    if (irq_tx) n_tx++;
    if (irq_dma) n_dma++;
    if (tx_en && tx_rdy) txgot.push_back(tx_data);
  end
  // the PHY asks for a byte now and then
  always @(posedge clk) tx_rdy <= ($urandom_range(0, 3) == 0);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic xfer(bit we, logic [7:0] off, logic [31:0] wd, output logic [31:0] rd);
    #1 s_req = '{req: 1'b1, we: we, addr: 32'h7000_0000 | off, wdata: wd};
    do @(posedge clk); while (!s_rsp.ready);
    rd = s_rsp.rdata;
    #1 s_req = BUS_REQ_IDLE;
  endtask

  function automatic bytes_t make_frame(int n, int seed);
    bytes_t p;
    for (int i = 0; i < n; i++) p.push_back(8'(seed * 3 + i * 5));
    return p;
  endfunction

  task automatic phy_send(bytes_t f, bit good_fcs);
    logic [31:0] c;
    c = ref_crc32_lsb(f);
    if (!good_fcs) c = c ^ 32'h1;
    for (int b = 0; b < 4; b++) f.push_back(c[8*b +: 8]);
    foreach (f[i]) begin
      #1 rx_valid = 1; rx_data = f[i];
      @(posedge clk); #1 rx_valid = 0;
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    #1 rx_end = 1; @(posedge clk); #1 rx_end = 0;
    repeat (2) @(posedge clk);
  endtask

  task automatic dma_to(logic [31:0] a, bytes_t f, bit good_fcs, string tag);
    logic [31:0] rd;
    int n0;
    bit ok;
    logic [31:0] c;
    n0 = n_dma;
    xfer(1, 8'h0C, a, rd);
    xfer(1, 8'h00, 32'h2, rd);
    while (n_dma == n0) @(posedge clk);
    c = ref_crc32_lsb(f) ^ (good_fcs ? 32'h0 : 32'h1);
    for (int b = 0; b < 4; b++) f.push_back(c[8*b +: 8]);
    ok = 1;
    foreach (f[i]) if (mem.mem[(a >> 2) + i / 4][31 - 8 * (i % 4) -: 8] != f[i]) ok = 0;
    check(ok, {tag, ": frame in memory"});
  endtask

  initial begin
    bytes_t ft, f1, f2, f3, f4;
    logic [31:0] rd, c, t0, t1;
    s_req = BUS_REQ_IDLE; rx_valid = 0; rx_end = 0; rx_data = 0;
    check(ref_selftest() == 0, "reference CRC self test");
    for (int i = 0; i < WORDS; i++) mem.mem[i] = 32'h0;
    ft = make_frame(70, 1);
    for (int i = 0; i < 70; i++) mem.mem[(32'h400 >> 2) + i / 4][31 - 8 * (i % 4) -: 8] = ft[i];
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // transmit
    xfer(1, 8'h04, 32'h400, rd);
    xfer(1, 8'h08, 70, rd);
    xfer(1, 8'h00, 32'h1, rd);
    while (n_tx == 0) @(posedge clk);
    @(posedge clk);
    c = ref_crc32_lsb(ft);
    check(txgot.size() == 74, $sformatf("74 bytes on air (%0d)", txgot.size()));
    for (int i = 0; i < 70 && i < txgot.size(); i++)
      check(txgot[i] == ft[i], $sformatf("tx byte %0d", i));
    for (int b = 0; b < 4; b++)
      if (70 + b < txgot.size()) check(txgot[70 + b] == c[8*b +: 8], $sformatf("FCS byte %0d", b));
    xfer(0, 8'h14, 0, rd);
    check(rd[2:0] == 3'b000, "idle, no underrun");

    // receive a good frame, then one with a bad FCS before any DMA
    f1 = make_frame(50, 7);
    f2 = make_frame(33, 9);
    phy_send(f1, 1);
    phy_send(f2, 0);
    check(n_rx == 2, "two frames reported");
    xfer(0, 8'h10, 0, rd);
    check(rd[31] && rd[30] && rd[23:16] == f1[0] && rd[15:0] == 54, $sformatf("status of frame 1: %08x", rd));
    dma_to(32'h800, f1, 1, "frame 1");
    xfer(0, 8'h10, 0, rd);
    check(rd[31] && !rd[30] && rd[23:16] == f2[0] && rd[15:0] == 37, $sformatf("status of frame 2: %08x", rd));
    dma_to(32'hA00, f2, 0, "frame 2");
    xfer(0, 8'h10, 0, rd);
    check(!rd[31], "no frame pending");

    // five frames without DMA: the fifth finds the status queue full
    f3 = make_frame(20, 3);
    for (int k = 0; k < 5; k++) phy_send(f3, 1);
    xfer(0, 8'h14, 0, rd);
    check(rd[31:16] == 1, $sformatf("one overrun (%0d)", rd[31:16]));
    for (int k = 0; k < 4; k++) dma_to(32'hC00 + 32'(k * 64), f3, 1, "queued frame");
    check(n_dma == 6, "six receive DMAs");
    f4 = make_frame(12, 4);
    phy_send(f4, 1);
    dma_to(32'hE00, f4, 1, "frame after overrun");

    // TSF
    xfer(0, 8'h18, 0, t0);
    repeat (10 * US_DIV) @(posedge clk);
    xfer(0, 8'h18, 0, t1);
    check(t1 - t0 >= 10 && t1 - t0 <= 11, $sformatf("TSF advanced %0d", t1 - t0));
    xfer(1, 8'h1C, 32'h0000_0012, rd);
    xfer(1, 8'h18, 32'hFFFF_FFF0, rd);
    repeat (20 * US_DIV) @(posedge clk);
    xfer(0, 8'h1C, 0, rd);
    check(rd == 32'h13, $sformatf("TSF carries into the high word (%08x)", rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
