// tb_int_ctrl -- self-checking testbench of the interrupt controller.
//
// Fires source pulses with some enabled and some masked, checks the sticky
// status, the pending register and the IRQ line one cycle later, clears
// bits by writing ones, and checks that a source firing in the same cycle
// as its clear stays set.
module tb_int_ctrl;
  import boc_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t s_req; bus_rsp_t s_rsp;
  logic [7:0] src; logic irq;
  int checks = 0, failures = 0;

  int_ctrl #(.NSRC(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic xfer(bit we, logic [7:0] off, logic [31:0] wd, output logic [31:0] rd);
    #1 s_req = '{req: 1'b1, we: we, addr: 32'h4000_0000 | off, wdata: wd};
    do @(posedge clk); while (!s_rsp.ready);
    rd = s_rsp.rdata;
    #1 s_req = BUS_REQ_IDLE;
  endtask

  task automatic pulse(logic [7:0] v);
    #1 src = v; @(posedge clk); #1 src = 0;
  endtask

  initial begin
    logic [31:0] rd;
    s_req = BUS_REQ_IDLE; src = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    xfer(1, 8'h04, 32'h0F, rd);                // enable sources 0-3
    pulse(8'h30);                              // masked sources
    @(posedge clk);
    check(!irq, "masked sources raise no IRQ");
    xfer(0, 8'h00, 0, rd);
    check(rd == 32'h30, $sformatf("status latched: %02x", rd));
    pulse(8'h02);
    check(irq, "IRQ one cycle after enabled source");
    xfer(0, 8'h08, 0, rd);
    check(rd == 32'h02, $sformatf("pending: %02x", rd));
    xfer(1, 8'h00, 32'h02, rd);                // clear
    @(posedge clk);
    check(!irq, "IRQ drops after clear");
    xfer(0, 8'h00, 0, rd);
    check(rd == 32'h30, $sformatf("other bits stay: %02x", rd));
    // source fires in the cycle its bit is cleared
    #1 s_req = '{req: 1'b1, we: 1'b1, addr: 32'h4000_0000, wdata: 32'h01};
    src = 8'h01;
    @(posedge clk); #1 src = 0;
    do @(posedge clk); while (!s_rsp.ready);
    #1 s_req = BUS_REQ_IDLE;
    xfer(0, 8'h00, 0, rd);
    check(rd[0], "bit set by a source during its clear stays set");
    check(irq, "IRQ stays for that source");
    xfer(1, 8'h04, 32'h00, rd);
    @(posedge clk);
    check(!irq, "IRQ off when all masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
