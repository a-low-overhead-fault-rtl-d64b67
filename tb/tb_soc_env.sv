// tb_soc_env: layered verification environment for the OCP system of soc_top
// at its default parameters. The environment is built from the usual parts:
//  - test case: decides the test; it creates random write and read bursts for
//    every master (each master in its own part of every slave, plus a few
//    accesses to nonexistent addresses) and hands them to the drivers;
//  - input driver (one per master): turns each transaction into the system
//    signals of its master (ADDRESS, CONTROL, size, M_ENABLE, DATA_IN beat by
//    beat on wr_take) and waits for the acknowledge;
//  - input monitor (one per master): watches those signals only and rebuilds
//    the request that was really applied, including the write data taken;
//  - output monitor (one per master): collects DATA_OUT beats, the
//    acknowledge and the error flag into a response;
//  - response checker: pairs every request with its response, keeps a
//    reference copy of the slave memories, and decides pass or fail.
// Transactions travel between the parts through mailboxes. The four masters
// run at the same time, so the bus arbitrates between them all along. At the
// end the checker must have seen every request answered, with writes, reads
// and error responses among them.
module tb_soc_env;
  import ocp_pkg::*;
  localparam int NM = 4, NS = 4, SN = 48;
  localparam int TXN_PER_MASTER = 40;

  logic                      clk = 0, rst_n = 0;
  logic [NM-1:0][12:0]       m_addr = '0;
  logic [NM-1:0][7:0]        m_data_in = '0;
  logic [NM-1:0][2:0]        m_control = '0, m_size = '0;
  logic [NM-1:0]             m_lock = '0, m_enable = '0;
  logic [NM-1:0][7:0]        m_data_out;
  logic [NM-1:0]             m_data_out_valid, m_wr_take, m_ack, m_err, m_busy, mgrant;
  logic [NM-1:0]             m_accept;
  logic [NS-1:0]             ssel;
  logic                      dec_err;
  logic                      sea_start = 0, sea_encrypt = 0;
  logic [SN-1:0]             sea_data_in = '0, sea_key_in = '0, sea_data_out;
  logic                      sea_done, sea_busy;
  int                        checks = 0, failures = 0;

  soc_top dut (.*);

  always #5 clk = ~clk;

  // address of beat k of a burst at a: wraps inside the 1024-byte slave
  function automatic logic [12:0] beat_addr(input logic [12:0] a, input int k);
    return {a[12:10], 10'(a[9:0] + 10'(k))};
  endfunction

  // ---------------- transaction ----------------
  class ocp_txn;
    int          master;
    logic [2:0]  control;
    logic [12:0] addr;
    logic [2:0]  size;
    logic [7:0]  data [8];   // write data, or read data in a response
    int          beats;      // data beats seen (response) or taken (request)
    logic        err;
  endclass

  // ---------------- test case ----------------
  class test_case;
    mailbox #(ocp_txn) to_drv [NM];
    function new(mailbox #(ocp_txn) d [NM]);
      to_drv = d;
    endfunction
    // every master writes a burst and later reads it back; one transaction
    // in ten goes to a nonexistent address
    task run();
      for (int m = 0; m < NM; m++)
        for (int i = 0; i < TXN_PER_MASTER / 2; i++) begin
          automatic ocp_txn w = new(), r = new();
          automatic int s = $urandom_range(0, NS - 1);
          w.master  = m;
          w.control = CMD_WR;
          w.size    = 3'($urandom);
          w.addr    = ($urandom_range(0, 9) == 0) ? 13'h1000 | 13'($urandom)
                                                  : 13'(s * 1024 + m * 256 + $urandom_range(0, 247));
          for (int k = 0; k < 8; k++) w.data[k] = 8'($urandom);
          r.master  = m;
          r.control = CMD_RD;
          r.addr    = w.addr;
          r.size    = w.size;
          to_drv[m].put(w);
          to_drv[m].put(r);
        end
    endtask
  endclass

  // ---------------- input driver ----------------
  class input_driver;
    int                m;
    mailbox #(ocp_txn) from_test;
    function new(int master, mailbox #(ocp_txn) mb);
      m = master;
      from_test = mb;
    endfunction
    task run();
      ocp_txn t;
      for (int n = 0; n < TXN_PER_MASTER; n++) begin
        automatic int beat = 0;
        from_test.get(t);
        repeat ($urandom_range(0, 3)) @(negedge clk);
        @(negedge clk);
        m_addr[m]    = t.addr;
        m_control[m] = t.control;
        m_size[m]    = t.size;
        m_data_in[m] = t.data[0];
        m_enable[m]  = 1'b1;
        @(negedge clk);
        m_enable[m]  = 1'b0;
        while (!m_ack[m]) begin
          @(posedge clk);
          if (m_wr_take[m]) beat++;
          @(negedge clk);
          m_data_in[m] = t.data[beat % 8];
        end
      end
    endtask
  endclass

  // ---------------- input monitor ----------------
  class input_monitor;
    int                m;
    mailbox #(ocp_txn) to_chk;
    function new(int master, mailbox #(ocp_txn) mb);
      m = master;
      to_chk = mb;
    endfunction
    task run();
      ocp_txn t;
      forever begin
        @(posedge clk);
        if (m_enable[m] && !m_busy[m]) begin
          t = new();
          t.master  = m;
          t.control = m_control[m];
          t.addr    = m_addr[m];
          t.size    = m_size[m];
          t.beats   = 0;
          do begin
            @(posedge clk);
            if (m_wr_take[m]) begin
              t.data[t.beats % 8] = m_data_in[m];
              t.beats++;
            end
          end while (!m_ack[m]);
          to_chk.put(t);
        end
      end
    endtask
  endclass

  // ---------------- output monitor ----------------
  class output_monitor;
    int                m;
    mailbox #(ocp_txn) to_chk;
    function new(int master, mailbox #(ocp_txn) mb);
      m = master;
      to_chk = mb;
    endfunction
    task run();
      ocp_txn t = new();
      forever begin
        @(posedge clk);
        if (m_data_out_valid[m]) begin
          t.data[t.beats % 8] = m_data_out[m];
          t.beats++;
        end
        if (m_ack[m]) begin
          t.master = m;
          t.err    = m_err[m];
          to_chk.put(t);
          t = new();
        end
      end
    endtask
  endclass

  // ---------------- response checker ----------------
  class response_checker;
    mailbox #(ocp_txn) req [NM], rsp [NM];
    logic [7:0]        ref_mem [int];   // reference contents by address
    int                n_done = 0, n_wr = 0, n_rd = 0, n_err = 0;
    function new(mailbox #(ocp_txn) q [NM], mailbox #(ocp_txn) p [NM]);
      req = q;
      rsp = p;
    endfunction
    function void check(input logic ok, input string what, input int m);
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 20) $display("FAIL master %0d: %s", m + 1, what);
      end
    endfunction
    task run_master(int m);
      ocp_txn q, p;
      forever begin
        req[m].get(q);
        rsp[m].get(p);
        n_done++;
        if (q.addr[12]) begin
          // nonexistent address: error, no data
          n_err++;
          check(p.err == 1'b1, "error flag on a nonexistent address", m);
          check(p.beats == 0, "no read data on an error", m);
        end else if (q.control == CMD_WR) begin
          n_wr++;
          check(p.err == 1'b0, "write without error", m);
          check(q.beats == int'(q.size) + 1, "write beats taken", m);
          for (int k = 0; k <= int'(q.size); k++) ref_mem[int'(beat_addr(q.addr, k))] = q.data[k];
        end else begin
          n_rd++;
          check(p.err == 1'b0, "read without error", m);
          check(p.beats == int'(q.size) + 1, "read beats returned", m);
          for (int k = 0; k <= int'(q.size); k++) begin
            automatic int a = int'(beat_addr(q.addr, k));
            if (ref_mem.exists(a)) check(p.data[k] == ref_mem[a], "read data", m);
          end
        end
      end
    endtask
  endclass

  // ---------------- environment ----------------
  mailbox #(ocp_txn) test_to_drv [NM], mon_req [NM], mon_rsp [NM];
  test_case        tc;
  input_driver     drv [NM];
  input_monitor    imon [NM];
  output_monitor   omon [NM];
  response_checker chk;
  int              n_contention = 0;

  always @(posedge clk)
    if (rst_n && mgrant != 0 && (m_busy & ~mgrant) != 0) n_contention++;

  initial begin
    for (int m = 0; m < NM; m++) begin
      test_to_drv[m] = new();
      mon_req[m]     = new();
      mon_rsp[m]     = new();
    end
    tc  = new(test_to_drv);
    chk = new(mon_req, mon_rsp);
    for (int m = 0; m < NM; m++) begin
      drv[m]  = new(m, test_to_drv[m]);
      imon[m] = new(m, mon_req[m]);
      omon[m] = new(m, mon_rsp[m]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    tc.run();
    for (int m = 0; m < NM; m++) begin
      automatic int mm = m;
      fork
        imon[mm].run();
        omon[mm].run();
        chk.run_master(mm);
      join_none
    end
    fork
      drv[0].run();
      drv[1].run();
      drv[2].run();
      drv[3].run();
    join
    repeat (5) @(posedge clk);
    // every request answered, and each kind of transaction seen
    checks++;
    if (chk.n_done != NM * TXN_PER_MASTER || chk.n_wr == 0 || chk.n_rd == 0 ||
        chk.n_err == 0 || n_contention == 0) begin
      failures++;
      $display("FAIL transactions checked %0d of %0d, or a kind never occurred",
               chk.n_done, NM * TXN_PER_MASTER);
    end
    $display("checked=%0d writes=%0d reads=%0d errors=%0d contention=%0d",
             chk.n_done, chk.n_wr, chk.n_rd, chk.n_err, n_contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
