// tb_soc_top: end-to-end test of the whole design at its default parameters
// (4 masters, 4 slaves with 8 kbit each, SEA(48,8) with 51 rounds).
// OCP part: the four masters run concurrently. Each writes bursts of 1..8
// bytes into all four slaves and reads them back, compared with a scoreboard;
// masters 1 and 2 read with single-request bursts, masters 3 and 4 (the
// default READ_MULTI_REQ setting) with pipelined multi-request bursts.
// Master 1 additionally runs a locked pair of transactions (no other master
// may be granted in between) and master 4 accesses a nonexistent address
// (error response). SEA part, alongside: encrypts and decrypts two known
// vectors and random blocks, checking results and the 51-cycle latency.
// Each mechanism is counted: bus contention, lock hold, read bursts of both
// styles, pipelined requests, write bursts, error responses, every slave and
// every master used, encryption and decryption; one that never happened
// counts as a failure. Only the top's ports are observed.
module tb_soc_top;
  import ocp_pkg::*;
  localparam int NM = 4, NS = 4, SN = 48, NR = 51;

  logic                      clk = 0, rst_n = 0;
  logic [NM-1:0][12:0]       m_addr;
  logic [NM-1:0][7:0]        m_data_in;
  logic [NM-1:0][2:0]        m_control, m_size;
  logic [NM-1:0]             m_lock, m_enable;
  logic [NM-1:0][7:0]        m_data_out;
  logic [NM-1:0]             m_data_out_valid, m_wr_take, m_ack, m_err, m_busy, mgrant;
  logic [NM-1:0]             m_accept;
  logic [NS-1:0]             ssel;
  logic                      dec_err;
  logic                      sea_start = 0, sea_encrypt = 1;
  logic [SN-1:0]             sea_data_in = '0, sea_key_in = '0, sea_data_out;
  logic                      sea_done, sea_busy;

  soc_top dut (.*);

  always #5 clk = ~clk;

  // per-master drive variables (unpacked so each master process owns its own)
  logic [12:0] a_v [NM];
  logic [2:0]  c_v [NM], z_v [NM];
  logic        l_v [NM], e_v [NM];
  logic [7:0]  base_v [NM];
  int          beat_v [NM];
  always_comb
    for (int m = 0; m < NM; m++) begin
      m_addr[m]    = a_v[m];
      m_control[m] = c_v[m];
      m_size[m]    = z_v[m];
      m_lock[m]    = l_v[m];
      m_enable[m]  = e_v[m];
      m_data_in[m] = base_v[m] + 8'(5 * beat_v[m]);
    end

  int checks = 0, failures = 0;
  int n_contention = 0, n_lock_hold = 0, n_rd_burst = 0, n_wr_burst = 0, n_err = 0;
  int n_sea_enc = 0, n_sea_dec = 0;
  int n_rd_sreq = 0, n_rd_mreq = 0;   // read bursts by request style
  int n_rd_req [NM];                  // accepted read requests per master
  int n_pipelined = 0;                // read requests accepted while data returns
  int slave_used [NS];
  int master_done [NM];

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // read requests accepted on each master's OCP port (m_accept during a read
  // transaction). A request is pipelined when an earlier request of the same
  // transaction has not yet delivered its data to the system: data_out_valid
  // lags the bus by one cycle, so the beats delivered up to and including this
  // cycle are compared with the requests accepted before it.
  int acc_txn [NM], val_txn [NM];
  always @(posedge clk)
    for (int m = 0; m < NM; m++) begin
      if (m_enable[m]) begin
        acc_txn[m] <= 0;
        val_txn[m] <= 0;
      end else if (m_busy[m] && c_v[m] == CMD_RD) begin
        if (m_accept[m]) begin
          n_rd_req[m] <= n_rd_req[m] + 1;
          if (acc_txn[m] > val_txn[m] + int'(m_data_out_valid[m])) n_pipelined <= n_pipelined + 1;
        end
        acc_txn[m] <= acc_txn[m] + int'(m_accept[m]);
        val_txn[m] <= val_txn[m] + int'(m_data_out_valid[m]);
      end
    end

  // read-beat capture per master
  logic [7:0] rd_buf [NM][8];
  int         rd_cnt [NM];
  always @(posedge clk)
    for (int m = 0; m < NM; m++) begin
      if (m_data_out_valid[m]) begin
        rd_buf[m][rd_cnt[m] % 8] <= m_data_out[m];
        rd_cnt[m] <= rd_cnt[m] + 1;
      end
      if (m_wr_take[m]) beat_v[m] <= beat_v[m] + 1;
    end

  // contention: a master waits for the bus while another owns it
  always @(posedge clk)
    if (rst_n && mgrant != 0 && (m_busy & ~mgrant) != 0) n_contention++;
  always @(posedge clk)
    for (int s = 0; s < NS; s++) if (ssel[s]) slave_used[s]++;

  task automatic txn(input int m, input logic [2:0] ctl, input logic [12:0] a,
                     input logic [2:0] sz, input logic lk, input logic [7:0] base);
    @(negedge clk);
    a_v[m] = a; c_v[m] = ctl; z_v[m] = sz; l_v[m] = lk; base_v[m] = base;
    beat_v[m] = 0; rd_cnt[m] = 0;
    e_v[m] = 1;
    @(negedge clk);
    e_v[m] = 0;
    while (!m_ack[m]) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic master_run(input int m);
    for (int t = 0; t < 8; t++) begin
      automatic int          s    = (m + t) % NS;
      automatic logic [12:0] a    = 13'(s * 1024 + m * 200 + t * 16);
      automatic logic [2:0]  sz   = 3'((m + 3 * t) % 8);
      automatic logic [7:0]  base = 8'($urandom);
      txn(m, CMD_WR, a, sz, 0, base);
      expect_eq(m_err[m], 0, "write ok");
      if (sz != 0) n_wr_burst++;
      begin
        automatic int rq0 = n_rd_req[m];
        txn(m, CMD_RD, a, sz, 0, 8'h00);
        expect_eq(n_rd_req[m] - rq0, (m < 2) ? 1 : int'(sz) + 1, "read requests per burst");
      end
      expect_eq(m_err[m], 0, "read ok");
      expect_eq(rd_cnt[m], int'(sz) + 1, "read beat count");
      for (int k = 0; k <= int'(sz); k++)
        expect_eq(rd_buf[m][k], 8'(base + 8'(5 * k)), "read back");
      if (sz != 0) n_rd_burst++;
      if (sz != 0 && m < 2) n_rd_sreq++;
      if (sz != 0 && m >= 2) n_rd_mreq++;
    end
    master_done[m] = 1;
  endtask

  // lock check: while master 0's locked sequence runs, nobody else is granted
  bit lock_window = 0;
  always @(posedge clk)
    if (lock_window) begin
      if (!mgrant[0]) begin
        failures++;
        $display("FAIL bus left master 1 during its locked sequence");
      end else if ((m_busy & 4'b1110) != 0) n_lock_hold++;
    end

  task automatic locked_pair();
    txn(0, CMD_WR, 13'd900, 3'd3, 1, 8'h40);
    lock_window = 1;
    repeat (6) @(negedge clk);            // idle but holding the bus
    txn(0, CMD_RD, 13'd900, 3'd3, 1, 8'h00);
    for (int k = 0; k < 4; k++) expect_eq(rd_buf[0][k], 8'(8'h40 + 8'(5 * k)), "locked read back");
    l_v[0] = 0;
    lock_window = 0;
  endtask

  task automatic error_access();
    txn(3, CMD_RD, 13'h1234, 3'd2, 0, 8'h00);
    expect_eq(m_err[3], 1, "nonexistent address reported");
    expect_eq(rd_cnt[3], 0, "no data from a nonexistent address");
    n_err++;
  endtask

  // ---------------- SEA ----------------
  task automatic sea_op(input logic enc, input logic [SN-1:0] d, input logic [SN-1:0] k,
                        output logic [SN-1:0] res);
    int cycles;
    @(negedge clk);
    sea_encrypt = enc; sea_data_in = d; sea_key_in = k; sea_start = 1;
    @(negedge clk);
    sea_start = 0;
    cycles = 1;
    while (!sea_done) begin
      @(negedge clk);
      cycles++;
    end
    res = sea_data_out;
    expect_eq(cycles, NR, "SEA latency");
    if (enc) n_sea_enc++; else n_sea_dec++;
  endtask

  task automatic sea_run();
    logic [SN-1:0] c, p, d, k;
    sea_op(1, 48'h123456789abc, 48'hfedcba987654, c);
    expect_eq(c, 48'h6ca4f4f9f5bd, "SEA encrypt vector");
    sea_op(0, 48'h2112f94992bc, 48'hd23f128b2f33, p);
    expect_eq(p, 48'h0c5ca6a3a450, "SEA decrypt vector");
    for (int i = 0; i < 4; i++) begin
      d = {$urandom, $urandom};
      k = {$urandom, $urandom};
      sea_op(1, d, k, c);
      sea_op(0, c, k, p);
      expect_eq(p, d, "SEA round trip");
    end
  endtask

  initial begin
    for (int m = 0; m < NM; m++) begin
      a_v[m] = '0; c_v[m] = '0; z_v[m] = '0; l_v[m] = 0; e_v[m] = 0;
      base_v[m] = '0; beat_v[m] = 0; rd_cnt[m] = 0; master_done[m] = 0;
    end
    for (int s = 0; s < NS; s++) slave_used[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        locked_pair();
        master_run(0);
      end
      master_run(1);
      master_run(2);
      begin
        error_access();
        master_run(3);
      end
      sea_run();
    join
    // every mechanism must have happened
    checks++;
    if (n_contention == 0 || n_lock_hold == 0 || n_rd_burst == 0 || n_wr_burst == 0 ||
        n_rd_sreq == 0 || n_rd_mreq == 0 || n_pipelined == 0 ||
        n_err == 0 || n_sea_enc == 0 || n_sea_dec == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (slave_used[s] == 0) begin failures++; $display("FAIL slave %0d never used", s + 1); end
    end
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (!master_done[m]) begin failures++; $display("FAIL master %0d unfinished", m + 1); end
    end
    $display("contention=%0d lock_hold=%0d rd_bursts=%0d (single_req=%0d multi_req=%0d) pipelined=%0d wr_bursts=%0d errors=%0d sea_enc=%0d sea_dec=%0d",
             n_contention, n_lock_hold, n_rd_burst, n_rd_sreq, n_rd_mreq, n_pipelined, n_wr_burst, n_err,
             n_sea_enc, n_sea_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
