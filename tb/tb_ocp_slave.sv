// tb_ocp_slave: self-checking test of the OCP slave FSM with a memory model.
// Checks: a write is accepted in the cycle it is presented and acknowledged
// with DVA exactly one cycle later; a read burst of size+1 beats is accepted
// and returns the written bytes on consecutive cycles starting one cycle after
// acceptance; a new request is not accepted during a burst but is accepted
// with the burst's last beat (pipelining) and answered right after it; a write
// presented while the previous write is acknowledged is accepted the same way;
// an unsupported command is answered with ERR.
module tb_ocp_slave;
  import ocp_pkg::*;
  localparam int AW = 10, DW = 8, BW = 3;

  logic          clk = 0, rst_n = 0;
  logic [2:0]    mcmd = '0;
  logic [AW-1:0] maddr = '0;
  logic [DW-1:0] mdata = '0;
  logic [BW-1:0] mburst = '0;
  logic          scmdaccept;
  logic [1:0]    sresp;
  logic [DW-1:0] sdata;
  logic [AW-1:0] mem_addr;
  logic          mem_we;
  logic [DW-1:0] mem_wdata, mem_rdata;
  int            checks = 0, failures = 0;

  logic [DW-1:0] mem [2**AW];    // memory model: registered read
  logic [DW-1:0] exp_mem [2**AW];

  ocp_slave #(.AW(AW), .DW(DW), .BLEN_W(BW)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem[mem_addr];
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic do_write(input logic [AW-1:0] a, input logic [DW-1:0] d);
    @(negedge clk);
    mcmd = CMD_WR; maddr = a; mdata = d;
    #1 expect_eq(scmdaccept, 1, "write accepted at once");
    expect_eq(sresp, RESP_NULL, "no response before accept");
    exp_mem[a] = d;
    @(negedge clk);
    mcmd = CMD_IDLE;
    #1 expect_eq(sresp, RESP_DVA, "write acknowledged one cycle later");
    @(negedge clk);
    #1 expect_eq(sresp, RESP_NULL, "single acknowledge");
  endtask

  task automatic do_read(input logic [AW-1:0] a, input logic [BW-1:0] len);
    @(negedge clk);
    mcmd = CMD_RD; maddr = a; mburst = len;
    #1 expect_eq(scmdaccept, 1, "read accepted at once");
    @(negedge clk);
    // keep a single-beat read pending: it must not be accepted during the
    // burst, only together with the last beat
    maddr = a + 10'd100;
    mburst = '0;
    for (int k = 0; k <= len; k++) begin
      #1;
      expect_eq(sresp, RESP_DVA, "read beat valid");
      expect_eq(sdata, exp_mem[AW'(a + AW'(k))], "read beat data");
      expect_eq(scmdaccept, (k == int'(len)) ? 1 : 0, "accept only with the last beat");
      @(negedge clk);
    end
    mcmd = CMD_IDLE;
    #1;
    expect_eq(sresp, RESP_DVA, "pipelined read answered right after the burst");
    expect_eq(sdata, exp_mem[AW'(a + 10'd100)], "pipelined read data");
    @(negedge clk);
    #1 expect_eq(sresp, RESP_NULL, "burst ends after size+1 beats");
  endtask

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      mem[i] = '0;
      exp_mem[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) do_write(AW'(i + 500), DW'($urandom));
    for (int i = 0; i < 20; i++) do_write(AW'($urandom), DW'($urandom));
    for (int len = 0; len < 8; len++) do_read(AW'(500 + 4 * len), BW'(len));
    do_read(AW'(1020), 3'd7);   // wraps around the slave's address space
    // back-to-back writes: the second is accepted while the first is acknowledged
    @(negedge clk);
    mcmd = CMD_WR; maddr = 10'd7; mdata = 8'h5a;
    exp_mem[7] = 8'h5a;
    @(negedge clk);
    maddr = 10'd8; mdata = 8'hc3;
    exp_mem[8] = 8'hc3;
    #1;
    expect_eq(sresp, RESP_DVA, "first write acknowledged");
    expect_eq(scmdaccept, 1, "second write accepted with the acknowledge");
    @(negedge clk);
    mcmd = CMD_IDLE;
    #1 expect_eq(sresp, RESP_DVA, "second write acknowledged");
    @(negedge clk);
    #1 expect_eq(sresp, RESP_NULL, "no further acknowledge");
    do_read(AW'(7), 3'd1);
    // unsupported command
    @(negedge clk);
    mcmd = 3'b011;
    #1 expect_eq(scmdaccept, 1, "other command accepted");
    @(negedge clk);
    mcmd = CMD_IDLE;
    #1 expect_eq(sresp, RESP_ERR, "other command answered with ERR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
