// tb_timer32 -- self-checking testbench of the 32-bit timer.
//
// Loads the timer, checks that a one-shot count fires exactly LOAD+1
// cycles after it is enabled and then stops, that periodic mode fires
// every LOAD+1 cycles, that the flag is sticky until written, and that a
// large 32-bit load value reads back in full.
module tb_timer32;
  import boc_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t s_req; bus_rsp_t s_rsp; logic irq;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int unsigned fire [$];

  timer32 dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && irq) fire.push_back(cyc);
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic xfer(bit we, logic [7:0] off, logic [31:0] wd, output logic [31:0] rd);
    #1 s_req = '{req: 1'b1, we: we, addr: 32'h5000_0000 | off, wdata: wd};
    do @(posedge clk); while (!s_rsp.ready);
    rd = s_rsp.rdata;
    #1 s_req = BUS_REQ_IDLE;
  endtask

  initial begin
    logic [31:0] rd;
    int unsigned t0;
    s_req = BUS_REQ_IDLE;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    xfer(1, 8'h00, 32'hF000_0001, rd);
    xfer(0, 8'h00, 0, rd);
    check(rd == 32'hF000_0001, "32-bit load value");
    xfer(1, 8'h00, 32'd20, rd);
    // enable one-shot: the write is taken on the first edge after the request
    #1 s_req = '{req: 1'b1, we: 1'b1, addr: 32'h5000_0008, wdata: 32'h1};
    @(posedge clk); t0 = cyc;
    do @(posedge clk); while (!s_rsp.ready);
    #1 s_req = BUS_REQ_IDLE;
    repeat (40) @(posedge clk);
    check(fire.size() == 1, $sformatf("one-shot fires once (%0d)", fire.size()));
    // 21 counting edges (20..0), the registered pulse, and the sampling edge
    if (fire.size() > 0) check(fire[0] - t0 == 20 + 3, $sformatf("one-shot delay %0d", fire[0] - t0));
    xfer(0, 8'h0C, 0, rd);
    check(rd == 1, "flag set");
    xfer(1, 8'h0C, 0, rd);
    xfer(0, 8'h0C, 0, rd);
    check(rd == 0, "flag cleared");
    fire.delete();
    xfer(1, 8'h00, 32'd9, rd);
    xfer(1, 8'h08, 32'h3, rd);                 // periodic
    repeat (60) @(posedge clk);
    check(fire.size() >= 5, $sformatf("periodic fires (%0d)", fire.size()));
    for (int i = 1; i < fire.size(); i++)
      check(fire[i] - fire[i-1] == 10, $sformatf("period %0d", fire[i] - fire[i-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
