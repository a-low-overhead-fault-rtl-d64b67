// tb_ocp_xbar_partial: the crossbar test with a partial crossbar (some
// master-to-slave paths left out; an access along a missing path must be
// answered like a nonexistent address), 4 masters, 4 slaves. Random
// requests, commands, addresses and data on the master side and random
// accept/response/data on the slave side; a model with one
// fixed-priority, grant-holding arbiter per slave predicts, and the test
// checks every cycle:
//  - which master each slave is granted to, and m_grant of every master;
//  - each slave receives the command, offset, data and burst length of its
//    granted master, and no command when that master addresses another slave;
//  - each master receives accept, response and data only from the slave that
//    granted it;
//  - nonexistent addresses are granted by the error responder, accepted at
//    once and answered with ERR one cycle later.
// It counts cycles with commands to two or more slaves at once (parallel
// transfers), error responses and routed commands, and fails if one never
// occurred.
module tb_ocp_xbar_partial;
  import ocp_pkg::*;
  localparam int NM = 4, NS = 4;
  // partial crossbar: master 1 has no path to slave 4, master 3 none to
  // slaves 1 and 2, master 4 none to slave 1
  localparam logic [NM-1:0][NS-1:0] PATHS = {4'b1110, 4'b1100, 4'b1111, 4'b0111};

  logic                    clk = 0, rst_n = 0;
  logic [NM-1:0]           m_req = '0;
  logic [NM-1:0][2:0]      m_cmd = '0;
  logic [NM-1:0][12:0]     m_addr = '0;
  logic [NM-1:0][7:0]      m_data = '0;
  logic [NM-1:0][2:0]      m_burst = '0;
  logic [NM-1:0]           m_grant, m_scmdaccept;
  logic [NM-1:0][1:0]      m_sresp;
  logic [NM-1:0][7:0]      m_sdata;
  logic [NS-1:0][2:0]      s_cmd;
  logic [NS-1:0][9:0]      s_addr;
  logic [NS-1:0][7:0]      s_data;
  logic [NS-1:0][2:0]      s_burst;
  logic [NS-1:0]           s_scmdaccept = '0;
  logic [NS-1:0][1:0]      s_sresp = '0;
  logic [NS-1:0][7:0]      s_sdata = '0;
  logic [NS-1:0]           ssel;
  logic                    dec_err;
  int                      checks = 0, failures = 0;
  int                      n_parallel = 0, n_err = 0, n_routed = 0;
  int                      n_nopath = 0;   // error responses caused by a missing path

  ocp_xbar #(.NUM_M(NM), .NUM_S(NS), .PATHS(PATHS)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // slave reached by master m at address a, -1 for none (error response)
  function automatic int slave_of(int m, logic [12:0] a);
    automatic int s = (a < 13'd4096) ? int'(a >> 10) : -1;
    return (s >= 0 && PATHS[m][s]) ? s : -1;
  endfunction

  int   owner [NS];
  logic errg [NM], errr [NM];

  initial begin
    for (int s = 0; s < NS; s++) owner[s] = -1;
    for (int m = 0; m < NM; m++) begin errg[m] = 0; errr[m] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      int   nxt [NS];
      logic nerrg [NM], nerrr [NM];
      int   busy_slaves;
      @(negedge clk);
      for (int m = 0; m < NM; m++) begin
        if ($urandom_range(0, 5) == 0) m_req[m] = ~m_req[m];
        if ($urandom_range(0, 7) == 0)
          m_addr[m] = ($urandom_range(0, 9) == 0) ? 13'h1000 | 13'($urandom)
                                                  : 13'($urandom_range(0, 4095));
        m_cmd[m]   = ($urandom_range(0, 2) == 0) ? CMD_IDLE : 3'($urandom_range(1, 2));
        m_data[m]  = 8'($urandom);
        m_burst[m] = 3'($urandom);
      end
      for (int s = 0; s < NS; s++) begin
        s_scmdaccept[s] = 1'($urandom);
        s_sresp[s]      = 2'($urandom);
        s_sdata[s]      = 8'($urandom);
      end
      #1;
      busy_slaves = 0;
      for (int s = 0; s < NS; s++) begin
        automatic int o = owner[s];
        automatic logic on = (o >= 0) && (slave_of(o, m_addr[o]) == s);
        expect_eq(ssel[s], o >= 0, "slave held");
        expect_eq(s_cmd[s], on ? int'(m_cmd[o]) : 0, "slave command");
        if (o >= 0) begin
          expect_eq(s_addr[s], m_addr[o][9:0], "slave offset");
          expect_eq(s_data[s], m_data[o], "slave write data");
          expect_eq(s_burst[s], m_burst[o], "slave burst");
        end
        if (on && m_cmd[o] != CMD_IDLE) begin
          busy_slaves++;
          n_routed++;
        end
      end
      if (busy_slaves >= 2) n_parallel++;
      for (int m = 0; m < NM; m++) begin
        automatic int   s   = slave_of(m, m_addr[m]);
        automatic logic own = (s >= 0) && (owner[s] == m);
        automatic logic eg  = errg[m] && (s < 0);
        expect_eq(m_grant[m], own || eg, "master grant");
        expect_eq(m_scmdaccept[m],
                  (own ? int'(s_scmdaccept[s]) : 0) | ((eg && m_cmd[m] != CMD_IDLE) ? 1 : 0),
                  "accept");
        expect_eq(m_sresp[m], errr[m] ? RESP_ERR : (own ? int'(s_sresp[s]) : 0), "response");
        expect_eq(m_sdata[m], own ? int'(s_sdata[s]) : 0, "read data");
        if (errr[m]) n_err++;
        if (errr[m] && m_addr[m] < 13'd4096) n_nopath++;
        nerrg[m] = m_req[m] && (s < 0);
        nerrr[m] = eg && (m_cmd[m] != CMD_IDLE);
      end
      // per-slave arbiters for the next edge
      for (int s = 0; s < NS; s++) begin
        automatic int o = owner[s];
        if (o >= 0 && m_req[o] && slave_of(o, m_addr[o]) == s) nxt[s] = o;
        else begin
          nxt[s] = -1;
          for (int m = NM - 1; m >= 0; m--)
            if (m_req[m] && slave_of(m, m_addr[m]) == s) nxt[s] = m;
        end
      end
      @(posedge clk);
      for (int s = 0; s < NS; s++) owner[s] = nxt[s];
      for (int m = 0; m < NM; m++) begin errg[m] = nerrg[m]; errr[m] = nerrr[m]; end
    end
    checks++;
    if (n_parallel == 0 || n_err == 0 || n_routed == 0 || n_nopath == 0) begin
      failures++;
      $display("FAIL a situation never occurred");
    end
    $display("parallel=%0d error-responses=%0d (missing path %0d) routed=%0d",
             n_parallel, n_err, n_nopath, n_routed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
