// tb_ocp_bus: self-checking test of the shared OCP bus fabric (4 masters,
// 4 slaves). Every cycle, random requests, commands, addresses and data are put
// on the master side and random accept/response/data on the slave side; a
// model of the fabric predicts, and the test checks:
//  - the grant (fixed priority, held while the owner requests);
//  - MCmd reaches only the slave selected by the granted master's address,
//    together with that master's offset, data and burst length;
//  - SCmdAccept, SResp and SData of the selected slave reach only the granted
//    master;
//  - a request to a nonexistent address is accepted by the bus and answered
//    with ERR one cycle later.
// It counts how often each of these situations occurred and fails if one never
// did.
module tb_ocp_bus;
  import ocp_pkg::*;
  localparam int NM = 4, NS = 4;

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
  int                      n_routed = 0, n_err = 0, n_hold = 0, n_resp = 0;

  ocp_bus #(.NUM_M(NM), .NUM_S(NS)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [NM-1:0] g_model = '0;
  logic          err_model = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      int g, s;
      logic [NM-1:0] g_next;
      logic          err_acc;
      @(negedge clk);
      // keep requests sticky most of the time so that transfers happen
      for (int m = 0; m < NM; m++) begin
        if ($urandom_range(0, 7) == 0) m_req[m] = ~m_req[m];
        m_cmd[m]   = ($urandom_range(0, 2) == 0) ? CMD_IDLE : 3'($urandom_range(1, 2));
        m_addr[m]  = ($urandom_range(0, 9) == 0) ? 13'h1000 | 13'($urandom) : 13'($urandom_range(0, 4095));
        m_data[m]  = 8'($urandom);
        m_burst[m] = 3'($urandom);
      end
      for (int i = 0; i < NS; i++) begin
        s_scmdaccept[i] = 1'($urandom);
        s_sresp[i]      = 2'($urandom);
        s_sdata[i]      = 8'($urandom);
      end
      #1;
      // grant
      for (int m = 0; m < NM; m++) expect_eq(m_grant[m], g_model[m], "grant");
      g = -1;
      for (int m = 0; m < NM; m++) if (g_model[m]) g = m;
      s = (g >= 0 && m_addr[g] < 13'd4096) ? int'(m_addr[g] >> 10) : -1;
      // request routing
      for (int i = 0; i < NS; i++) begin
        expect_eq(s_cmd[i], (g >= 0 && i == s) ? int'(m_cmd[g]) : 0, "slave command");
        if (g >= 0 && i == s) begin
          expect_eq(s_addr[i], m_addr[g][9:0], "slave address");
          expect_eq(s_data[i], m_data[g], "slave write data");
          expect_eq(s_burst[i], m_burst[g], "slave burst");
          if (m_cmd[g] != CMD_IDLE) n_routed++;
        end
      end
      // response routing
      err_acc = (g >= 0) && (s < 0) && (m_cmd[g] != CMD_IDLE);
      expect_eq(dec_err, (g >= 0) && (s < 0), "decoder error");
      for (int m = 0; m < NM; m++) begin
        if (m == g) begin
          expect_eq(m_scmdaccept[m], err_acc ? 1 : (s >= 0 ? int'(s_scmdaccept[s]) : 0), "accept");
          expect_eq(m_sresp[m], err_model ? RESP_ERR : (s >= 0 ? int'(s_sresp[s]) : 0), "response");
          expect_eq(m_sdata[m], s >= 0 ? int'(s_sdata[s]) : 0, "read data");
          if (err_model) n_err++;
          if (s >= 0 && s_sresp[s] != 0) n_resp++;
        end else begin
          expect_eq(m_scmdaccept[m], 0, "no accept to others");
          expect_eq(m_sresp[m], 0, "no response to others");
          expect_eq(m_sdata[m], 0, "no data to others");
        end
      end
      // model update for the next edge
      if ((g_model & m_req) != 0) begin
        g_next = g_model;
        if (g >= 0 && g > 0 && (m_req & ((NM'(1) << g) - 1)) != 0) n_hold++;
      end else begin
        g_next = '0;
        for (int m = NM - 1; m >= 0; m--) if (m_req[m]) g_next = NM'(1) << m;
      end
      @(posedge clk);
      g_model   = g_next;
      err_model = err_acc;
    end
    checks++;
    if (n_routed == 0 || n_err == 0 || n_hold == 0 || n_resp == 0) begin
      failures++;
      $display("FAIL a situation never occurred: routed=%0d err=%0d held=%0d resp=%0d",
               n_routed, n_err, n_hold, n_resp);
    end
    $display("routed=%0d error-responses=%0d held-against-priority=%0d responses=%0d",
             n_routed, n_err, n_hold, n_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
