// tb_soc_write_read: the single-transfer scenario of the design's OCP
// simulation result, on the full design at default parameters: master 2
// writes 8'b00000101 to address 13'b0000000000100 (control 001) and then reads
// it back (control 010); DATA_OUT2 must show 00000101 and only master 2 may
// see data. Also checks this design's timing on an idle bus: a single write
// or read takes 5 cycles from M_ENABLE to ack (request, grant, command,
// response, done).
module tb_soc_write_read;
  import ocp_pkg::*;
  localparam int NM = 4;

  logic                 clk = 0, rst_n = 0;
  logic [NM-1:0][12:0]  m_addr = '0;
  logic [NM-1:0][7:0]   m_data_in = '0;
  logic [NM-1:0][2:0]   m_control = '0, m_size = '0;
  logic [NM-1:0]        m_lock = '0, m_enable = '0;
  logic [NM-1:0][7:0]   m_data_out;
  logic [NM-1:0]        m_data_out_valid, m_wr_take, m_ack, m_err, m_busy, mgrant;
  logic [NM-1:0]        m_accept;
  logic [3:0]           ssel;
  logic                 dec_err;
  logic                 sea_start = 0, sea_encrypt = 1, sea_done, sea_busy;
  logic [47:0]          sea_data_in = '0, sea_key_in = '0, sea_data_out;
  int                   checks = 0, failures = 0;

  soc_top dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic txn(input logic [2:0] ctl, output int cycles);
    @(negedge clk);
    m_addr[1] = 13'b0000000000100; m_data_in[1] = 8'b00000101; m_control[1] = ctl;
    m_enable[1] = 1;
    @(negedge clk);
    m_enable[1] = 0;
    cycles = 1;
    while (!m_ack[1]) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    txn(CMD_WR, cyc);
    expect_eq(m_err[1], 0, "write error flag");
    expect_eq(cyc, 5, "write cycles from enable to ack");
    txn(CMD_RD, cyc);
    expect_eq(m_err[1], 0, "read error flag");
    expect_eq(cyc, 5, "read cycles from enable to ack");
    expect_eq(m_data_out[1], 8'b00000101, "DATA_OUT2");
    for (int m = 0; m < NM; m++)
      if (m != 1) expect_eq(m_data_out[m], 0, "other DATA_OUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
