// tb_ocp_master: self-checking test of the OCP master FSM with single-request
// read bursts. The test bench plays
// arbiter and slave with random delays: the grant, SCmdAccept and each
// response beat come after random waits. Checks: read bursts of 1..8 beats
// are issued as one request carrying the burst length and
// deliver the model memory's bytes in order on data_out; write bursts issue
// one request per beat with incrementing addresses and the system's data
// sequence; every transaction ends with exactly one ack; MCmd is only driven
// while granted; an ERR response ends a transaction with err; a locked
// transaction keeps MREQ high afterwards until the lock is released; an
// unsupported control code is refused without a bus request.
module tb_ocp_master;
  import ocp_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [12:0] sys_addr = '0;
  logic [7:0]  sys_data_in;
  logic [2:0]  sys_control = '0, sys_size = '0;
  logic        sys_lock = 0, m_enable = 0;
  logic [7:0]  data_out;
  logic        data_out_valid, wr_take, ack, err, busy;
  logic        mreq, mgrant = 0;
  logic [2:0]  mcmd, mburst;
  logic [12:0] maddr;
  logic [7:0]  mdata;
  logic        scmdaccept;
  logic [1:0]  sresp;
  logic [7:0]  sdata;
  int          checks = 0, failures = 0;

  localparam bit MRR = 1'b0;   // read burst style of the master under test

  ocp_master #(.ADDR_W(13), .DATA_W(8), .BLEN_W(3), .READ_MULTI_REQ(MRR)) dut (.*);

  always #5 clk = ~clk;

  // ---------------- bus and slave model ----------------
  logic [7:0]  mem [8192];

  // address of beat k of a burst at a: wraps inside the 1024-byte slave
  function automatic logic [12:0] beat_addr(input logic [12:0] a, input int k);
    return {a[12:10], 10'(a[9:0] + 10'(k))};
  endfunction
  logic [1:0]  q_resp [64];
  logic [7:0]  q_data [64];
  int          q_rd = 0, q_wr = 0;
  logic        show = 0, acc_ok = 0, inject_err = 0;
  logic [12:0] wr_addr_log [64];
  logic [7:0]  wr_data_log [64];
  int          wr_log_n = 0;
  logic [12:0] rd_addr_log [64];
  logic [2:0]  rd_blen_log [64];
  int          rd_log_n = 0;

  // like ocp_slave: a request is accepted when nothing is outstanding or the
  // last outstanding response is on the bus in this cycle
  assign scmdaccept = mgrant && (mcmd != CMD_IDLE) && acc_ok &&
                      (q_rd == q_wr || (q_wr - q_rd == 1 && show));
  assign sresp      = (show && q_rd != q_wr) ? q_resp[q_rd % 64] : RESP_NULL;
  assign sdata      = (show && q_rd != q_wr) ? q_data[q_rd % 64] : 8'h00;

  always @(posedge clk) begin
    if (sresp != RESP_NULL) q_rd <= q_rd + 1;
    if (scmdaccept) begin
      if (inject_err) begin
        q_resp[q_wr % 64] <= RESP_ERR;
        q_wr <= q_wr + 1;
      end else if (mcmd == CMD_RD) begin
        for (int k = 0; k <= int'(mburst); k++) begin
          q_resp[(q_wr + k) % 64] <= RESP_DVA;
          q_data[(q_wr + k) % 64] <= mem[beat_addr(maddr, k)];
        end
        q_wr <= q_wr + int'(mburst) + 1;
        rd_addr_log[rd_log_n % 64] <= maddr;
        rd_blen_log[rd_log_n % 64] <= mburst;
        rd_log_n <= rd_log_n + 1;
      end else begin
        q_resp[q_wr % 64] <= RESP_DVA;
        q_wr <= q_wr + 1;
        wr_addr_log[wr_log_n] <= maddr;
        wr_data_log[wr_log_n] <= mdata;
        wr_log_n <= wr_log_n + 1;
      end
    end
    show   <= ($urandom_range(0, 2) != 0);
    acc_ok <= ($urandom_range(0, 2) != 0);
    mgrant <= mreq && (mgrant || $urandom_range(0, 3) == 0);
  end

  // ---------------- monitors ----------------
  int         n_rd_beats = 0, n_ack = 0, n_take = 0;
  int         n_pipelined = 0;   // requests accepted while a response was outstanding
  logic [7:0] rd_log [64];

  always @(posedge clk) begin
    if (data_out_valid) begin
      rd_log[n_rd_beats % 64] <= data_out;
      n_rd_beats <= n_rd_beats + 1;
    end
    if (ack) n_ack <= n_ack + 1;
    if (wr_take) n_take <= n_take + 1;
    if (scmdaccept && q_rd != q_wr) n_pipelined <= n_pipelined + 1;
    if (ack && q_rd != q_wr) begin
      failures++;
      $display("FAIL transaction ended with responses outstanding");
    end
    if (rst_n && mcmd != CMD_IDLE && !mgrant) begin
      failures++;
      $display("FAIL MCmd driven without grant");
    end
  end

  // system data source: beat k of a write burst carries wdata_base + 3k
  logic [7:0] wdata_base = 0;
  int         beat_idx = 0;
  always @(posedge clk) if (wr_take) beat_idx <= beat_idx + 1;
  assign sys_data_in = wdata_base + 8'(3 * beat_idx);

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic start(input logic [2:0] ctl, input logic [12:0] a, input logic [2:0] sz,
                       input logic lk);
    @(negedge clk);
    sys_control = ctl; sys_addr = a; sys_size = sz; sys_lock = lk; m_enable = 1;
    @(negedge clk);
    m_enable = 0;
  endtask

  task automatic wait_ack();
    automatic int acks0 = n_ack;
    while (n_ack == acks0) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 8192; i++) mem[i] = 8'(i * 13 + 5);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // read bursts of 1..8 beats
    for (int sz = 0; sz < 8; sz++) begin
      automatic int beats0 = n_rd_beats;
      automatic int acks0 = n_ack;
      automatic int rq0 = rd_log_n;
      automatic logic [12:0] a = 13'($urandom);
      start(CMD_RD, a, 3'(sz), 0);
      wait_ack();
      expect_eq(n_ack - acks0, 1, "one ack per read");
      if (MRR) begin
        // multi-request burst: one single-beat request per beat
        expect_eq(rd_log_n - rq0, sz + 1, "read requests");
        for (int k = 0; k <= sz; k++) begin
          expect_eq(rd_addr_log[(rq0 + k) % 64], beat_addr(a, k), "read request address");
          expect_eq(rd_blen_log[(rq0 + k) % 64], 0, "read request length");
        end
      end else begin
        // single-request burst: one request carrying the burst length
        expect_eq(rd_log_n - rq0, 1, "read requests");
        expect_eq(rd_addr_log[rq0 % 64], a, "read request address");
        expect_eq(rd_blen_log[rq0 % 64], sz, "read request length");
      end
      expect_eq(n_rd_beats - beats0, sz + 1, "read beats");
      for (int k = 0; k <= sz; k++)
        expect_eq(rd_log[(beats0 + k) % 64], mem[beat_addr(a, k)], "read data");
      expect_eq(err, 0, "no error");
    end
    // write bursts of 1..8 beats
    for (int sz = 0; sz < 8; sz++) begin
      automatic int log0 = wr_log_n;
      automatic int take0 = n_take;
      automatic logic [12:0] a = 13'($urandom);
      @(negedge clk);
      wdata_base = 8'($urandom);
      beat_idx = 0;
      start(CMD_WR, a, 3'(sz), 0);
      wait_ack();
      expect_eq(wr_log_n - log0, sz + 1, "write requests");
      expect_eq(n_take - take0, sz + 1, "wr_take pulses");
      for (int k = 0; k <= sz; k++) begin
        expect_eq(wr_addr_log[log0 + k], beat_addr(a, k), "write address");
        expect_eq(wr_data_log[log0 + k], 8'(wdata_base + 8'(3 * k)), "write data");
      end
    end
    // error response
    inject_err = 1;
    begin
      automatic int beats0 = n_rd_beats;
      start(CMD_RD, 13'h1fff, 3'd3, 0);
      wait_ack();
      expect_eq(err, 1, "error response reported");
      expect_eq(n_rd_beats - beats0, 0, "no data on error");
    end
    inject_err = 0;
    // lock: MREQ stays high after the transaction while sys_lock is high
    start(CMD_RD, 13'd10, 3'd1, 1);
    wait_ack();
    expect_eq(err, 0, "err cleared by a new transaction");
    repeat (5) begin
      @(negedge clk);
      expect_eq(mreq, 1, "request held under lock");
    end
    sys_lock = 0;
    @(negedge clk);
    @(negedge clk);
    expect_eq(mreq, 0, "request released with lock");
    // unlocked: request drops after the transaction
    start(CMD_RD, 13'd20, 3'd0, 0);
    wait_ack();
    expect_eq(mreq, 0, "no request after unlocked transaction");
    // unsupported control code
    begin
      automatic int acks0 = n_ack;
      start(3'b111, 13'd0, 3'd0, 0);
      expect_eq(mreq, 0, "no request for an unsupported command");
      @(negedge clk);
      expect_eq(n_ack - acks0, 1, "unsupported command acknowledged");
      expect_eq(err, 1, "unsupported command flagged");
    end
    // pipelining: only multi-request reads issue ahead of their data
    checks++;
    if (MRR ? (n_pipelined == 0) : (n_pipelined != 0)) begin
      failures++;
      $display("FAIL pipelined requests: %0d", n_pipelined);
    end
    $display("pipelined_requests=%0d", n_pipelined);
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
