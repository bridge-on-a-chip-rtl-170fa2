// tb_asb_decoder -- self-checking testbench of the bus address decoder.
//
// Puts a memory model with a different latency and content behind each of
// three slave ports, each owning a different address region, and checks
// that transfers land only in the slave that owns the address, that read
// data come from that slave, and that an unmapped address is answered by
// the decoder with zero data and an error pulse.
module tb_asb_decoder;
  import boc_pkg::*;
  localparam int NS = 3;
  logic clk = 0, rst_n = 0;
  bus_req_t m_req; bus_rsp_t m_rsp;
  bus_req_t s_req [NS]; bus_rsp_t s_rsp [NS];
  logic err;
  int checks = 0, failures = 0, n_err = 0;

  asb_decoder #(.NS(NS), .REGIONS(12'h7_3_1)) dut (.*);
  tb_bus_mem #(.WORDS(64), .LAT(1)) m0 (.clk, .rst_n, .s_req(s_req[0]), .s_rsp(s_rsp[0]));
  tb_bus_mem #(.WORDS(64), .LAT(2)) m1 (.clk, .rst_n, .s_req(s_req[1]), .s_rsp(s_rsp[1]));
  tb_bus_mem #(.WORDS(64), .LAT(4)) m2 (.clk, .rst_n, .s_req(s_req[2]), .s_rsp(s_rsp[2]));
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && err) n_err++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic xfer(bit we, logic [31:0] a, logic [31:0] wd, output logic [31:0] rd);
    #1 m_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    do @(posedge clk); while (!m_rsp.ready);
    rd = m_rsp.rdata;
    #1 m_req = BUS_REQ_IDLE;
  endtask

  initial begin
    logic [31:0] rd;
    logic [3:0] reg_of [NS];
    reg_of = '{4'h1, 4'h3, 4'h7};
    m_req = BUS_REQ_IDLE;
    for (int i = 0; i < 64; i++) begin m0.mem[i] = 32'h0; m1.mem[i] = 32'h0; m2.mem[i] = 32'h0; end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < 8; i++) xfer(1, {reg_of[s], 28'(i * 4)}, 32'(s * 256 + i + 1), rd);
    for (int i = 0; i < 8; i++) begin
      check(m0.mem[i] == 32'(i + 1), "slave 0 content");
      check(m1.mem[i] == 32'(256 + i + 1), "slave 1 content");
      check(m2.mem[i] == 32'(512 + i + 1), "slave 2 content");
    end
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < 8; i++) begin
        xfer(0, {reg_of[s], 28'(i * 4)}, 0, rd);
        check(rd == 32'(s * 256 + i + 1), $sformatf("read slave %0d word %0d: %08x", s, i, rd));
      end
    xfer(1, 32'h5000_0000, 32'hFFFF_FFFF, rd);
    xfer(0, 32'h5000_0000, 0, rd);
    check(rd == 0, "unmapped read returns zero");
    @(posedge clk);
    check(n_err == 2, $sformatf("two decode errors (%0d)", n_err));
    check(m0.mem[0] == 1 && m1.mem[0] == 257 && m2.mem[0] == 513, "unmapped write touched nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
