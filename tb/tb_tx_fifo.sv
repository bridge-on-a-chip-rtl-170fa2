// tb_tx_fifo -- self-checking testbench of the transmit cell FIFO.
//
// Writes cells as the Segmentation Processor does (only when cell_room is
// high) while a UTOPIA transmit receiver with random tx_clav pauses takes
// them. Checks every octet, that tx_soc marks octet 0 of each cell, that
// parity is odd, that cell_room drops when all slots are used and that no
// cell starts before it is complete in the FIFO.
module tb_tx_fifo;
  localparam int DEPTH = 4;
  localparam int NCELLS = 12;
  logic clk = 0, rst_n = 0;
  logic wr_en; logic [7:0] wr_data; logic cell_room;
  logic [7:0] tx_data; logic tx_soc, tx_prty, tx_enb_n, tx_clav;
  int checks = 0, failures = 0, full_seen = 0, written = 0;
  byte unsigned expq[$];

  tx_fifo #(.DEPTH_CELLS(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer
  initial begin
    byte unsigned b;
    wr_en = 0; wr_data = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < NCELLS; c++) begin
      while (!cell_room) begin full_seen++; @(posedge clk); #1; end
      for (int i = 0; i < 53; i++) begin
        b = 8'(c * 31 + i * 3 + 1);
        expq.push_back(b);
        wr_en = 1; wr_data = b; @(posedge clk); #1;
      end
      written++;
      wr_en = 0;
    end
  end

  // UTOPIA receiver: slow at first so the FIFO fills
  initial begin
    int got, slow;
    byte unsigned e;
    got = 0; tx_clav = 0;
    wait (rst_n);
    repeat (800) @(posedge clk);
    while (got < NCELLS * 53) begin
      #1 tx_clav = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (tx_clav && !tx_enb_n) begin
        e = expq.pop_front();
        check(tx_data == e, $sformatf("octet %0d got %02x exp %02x", got, tx_data, e));
        check(tx_soc == (got % 53 == 0), $sformatf("soc at octet %0d", got));
        check(^{tx_data, tx_prty} == 1'b1, "odd parity");
        check(written * 53 > got - (got % 53) + 52 || written == NCELLS, "cell complete before sending");
        got++;
      end
    end
    check(full_seen > 0, "cell_room dropped when full");
    repeat (3) @(posedge clk);
    check(tx_enb_n, "idle when empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
