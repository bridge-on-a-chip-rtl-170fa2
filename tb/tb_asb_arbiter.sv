// tb_asb_arbiter -- self-checking testbench of the two-master bus arbiter.
//
// Two masters issue streams of writes and reads to one slow memory model,
// each in its own address range. Checks that every read returns what the
// same master wrote (so no transfer was split or mixed with the other
// master's), that under constant contention grants alternate so neither
// master gets two transfers in a row while the other waits, that a lone
// master passes with no added cycle, and that conflicts are reported.
module tb_asb_arbiter;
  import boc_pkg::*;
  localparam int NOPS = 100, LAT = 3;
  logic clk = 0, rst_n = 0;
  bus_req_t m_req [2]; bus_rsp_t m_rsp [2];
  bus_req_t s_req; bus_rsp_t s_rsp;
  logic conflict;
  int checks = 0, failures = 0, n_conf = 0, last_served = -1, streak_fail = 0;

  asb_arbiter dut (.*);
  tb_bus_mem #(.WORDS(256), .LAT(LAT)) mem (.clk, .rst_n, .s_req(s_req), .s_rsp(s_rsp));
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (conflict) n_conf++;
    for (int i = 0; i < 2; i++)
      if (m_rsp[i].ready) begin
        if (last_served == i && m_req[1 - i].req) streak_fail++;
        last_served = i;
      end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic xfer(int m, bit we, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd, output int cyc);
    cyc = 0;
    #1 m_req[m] = '{req: 1'b1, we: we, addr: a, wdata: wd};
    do begin @(posedge clk); cyc++; end while (!m_rsp[m].ready);
    rd = m_rsp[m].rdata;
    #1 m_req[m] = BUS_REQ_IDLE;
  endtask

  task automatic master(int m);
    logic [31:0] rd; int cyc;
    for (int n = 0; n < NOPS; n++) begin
      xfer(m, 1, 32'(m * 512 + (n % 64) * 4), 32'(m * 1000 + n), rd, cyc);
      xfer(m, 0, 32'(m * 512 + (n % 64) * 4), 0, rd, cyc);
      check(rd == 32'(m * 1000 + n), $sformatf("master %0d op %0d read %0d", m, n, rd));
    end
  endtask

  initial begin
    logic [31:0] rd; int cyc;
    m_req[0] = BUS_REQ_IDLE; m_req[1] = BUS_REQ_IDLE;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    xfer(1, 1, 32'h4, 32'h77, rd, cyc);
    // LAT+1 is the memory model's own response time: the arbiter adds nothing
    check(cyc == LAT + 1, $sformatf("lone master latency %0d", cyc));
    fork master(0); master(1); join
    check(n_conf > 0, "conflicts seen");
    check(streak_fail == 0, $sformatf("alternation under contention (%0d repeats)", streak_fail));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
