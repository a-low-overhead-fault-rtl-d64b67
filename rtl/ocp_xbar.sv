// ocp_xbar: crossbar variant of the OCP bus fabric, with the same ports as
// ocp_bus. Every slave has its own arbiter, so masters that address different
// slaves are served at the same time; only masters that want the same slave
// compete for it.
//  - Each master has its own decoder. Its request goes to the arbiter of the
//    slave its address selects (fixed priority, grant held while requested,
//    so a transaction or a locked sequence keeps that slave).
//  - Per slave, ADDRESS_MUX, BURST_MUX and WR_DATA_MUX are selected by that
//    slave's grant; the command reaches the slave only while the granted
//    master still addresses it.
//  - Per master, RESP_MUX and RD_DATA_MUX pick the slave that granted it.
//  - A master whose address selects no slave is granted by a per-master error
//    responder one cycle after it requests; its command is accepted at once
//    and answered with ERR one cycle later.
// PATHS[m][s] says whether master m is wired to slave s. The default is a full
// crossbar; clearing bits gives a partial crossbar, and a master that
// addresses a slave it has no path to is answered like a nonexistent address.
// m_grant[m] is high while any slave (or the error responder) grants master m.
// ssel shows which slaves are currently granted to a master; dec_err is high
// while a granted master addresses no slave.
// The crossbar with one arbiter per slave follows the design description;
// the error responder and the gating details are this design's choices.
// One transaction per master is in flight at a time.
module ocp_xbar
  import ocp_pkg::*;
#(
  parameter int NUM_M = OCP_NUM_M,
  parameter int NUM_S = OCP_NUM_S,
  parameter logic [NUM_M-1:0][NUM_S-1:0] PATHS = '1   // [m][s]: master m reaches slave s
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // master side
  input  logic [NUM_M-1:0]                    m_req,
  input  logic [NUM_M-1:0][OCP_CMD_W-1:0]     m_cmd,
  input  logic [NUM_M-1:0][OCP_ADDR_W-1:0]    m_addr,
  input  logic [NUM_M-1:0][OCP_DATA_W-1:0]    m_data,
  input  logic [NUM_M-1:0][OCP_BLEN_W-1:0]    m_burst,
  output logic [NUM_M-1:0]                    m_grant,
  output logic [NUM_M-1:0]                    m_scmdaccept,
  output logic [NUM_M-1:0][1:0]               m_sresp,
  output logic [NUM_M-1:0][OCP_DATA_W-1:0]    m_sdata,
  // slave side
  output logic [NUM_S-1:0][OCP_CMD_W-1:0]     s_cmd,
  output logic [NUM_S-1:0][OCP_SLAVE_AW-1:0]  s_addr,
  output logic [NUM_S-1:0][OCP_DATA_W-1:0]    s_data,
  output logic [NUM_S-1:0][OCP_BLEN_W-1:0]    s_burst,
  input  logic [NUM_S-1:0]                    s_scmdaccept,
  input  logic [NUM_S-1:0][1:0]               s_sresp,
  input  logic [NUM_S-1:0][OCP_DATA_W-1:0]    s_sdata,
  // observation
  output logic [NUM_S-1:0]                    ssel,
  output logic                                dec_err
);
  // ---- one decoder per master ----
  logic [NUM_M-1:0][NUM_S-1:0] msel;     // slave addressed by each master
  logic [NUM_M-1:0]            merr;     // master addresses no reachable slave

  for (genvar m = 0; m < NUM_M; m++) begin : g_dec
    logic [NUM_S-1:0] dsel;
    logic             derr;
    ocp_decoder #(.ADDR_W(OCP_ADDR_W), .NUM_S(NUM_S), .SLAVE_AW(OCP_SLAVE_AW)) u_decoder (
      .maddr(m_addr[m]), .ssel(dsel), .err(derr)
    );
    assign msel[m] = dsel & PATHS[m];
    assign merr[m] = derr | ((dsel & ~PATHS[m]) != '0);
  end

  // ---- one arbiter and three request multiplexers per slave ----
  logic [NUM_S-1:0][NUM_M-1:0] sgrant;   // sgrant[s][m]: slave s granted to master m

  for (genvar s = 0; s < NUM_S; s++) begin : g_slave
    logic [NUM_M-1:0]                              req_s;
    logic [NUM_M-1:0][OCP_CMD_W+OCP_SLAVE_AW-1:0]  cmd_addr_s;
    logic [OCP_CMD_W-1:0]                          cmd_s;
    logic [OCP_SLAVE_AW-1:0]                       addr_s;

    always_comb
      for (int m = 0; m < NUM_M; m++) begin
        req_s[m]      = m_req[m] & msel[m][s];
        cmd_addr_s[m] = {msel[m][s] ? m_cmd[m] : OCP_CMD_W'(CMD_IDLE),
                         m_addr[m][OCP_SLAVE_AW-1:0]};
      end

    ocp_arbiter #(.N(NUM_M)) u_arbiter (
      .clk, .rst_n, .req(req_s), .grant(sgrant[s])
    );

    ocp_mux #(.N(NUM_M), .W(OCP_CMD_W + OCP_SLAVE_AW)) u_address_mux (
      .sel(sgrant[s]), .din(cmd_addr_s), .dout({cmd_s, addr_s})
    );
    ocp_mux #(.N(NUM_M), .W(OCP_BLEN_W)) u_burst_mux (
      .sel(sgrant[s]), .din(m_burst), .dout(s_burst[s])
    );
    ocp_mux #(.N(NUM_M), .W(OCP_DATA_W)) u_wr_data_mux (
      .sel(sgrant[s]), .din(m_data), .dout(s_data[s])
    );

    assign s_cmd[s]  = cmd_s;
    assign s_addr[s] = addr_s;
    assign ssel[s]   = (sgrant[s] != '0);
  end

  // ---- per master: response multiplexers and error responder ----
  logic [NUM_S-1:0][2:0] s_resp_acc;
  always_comb
    for (int s = 0; s < NUM_S; s++) s_resp_acc[s] = {s_sresp[s], s_scmdaccept[s]};

  logic [NUM_M-1:0] err_grant_q, err_resp_q, err_active;

  for (genvar m = 0; m < NUM_M; m++) begin : g_master
    logic [NUM_S-1:0] rsel;          // slaves that granted this master
    logic [2:0]       resp_acc;
    logic [OCP_DATA_W-1:0] rdata;
    logic             err_accept;

    always_comb
      for (int s = 0; s < NUM_S; s++) rsel[s] = sgrant[s][m] & msel[m][s];

    ocp_mux #(.N(NUM_S), .W(3)) u_resp_mux (
      .sel(rsel), .din(s_resp_acc), .dout(resp_acc)
    );
    ocp_mux #(.N(NUM_S), .W(OCP_DATA_W)) u_rd_data_mux (
      .sel(rsel), .din(s_sdata), .dout(rdata)
    );

    assign err_active[m] = err_grant_q[m] & merr[m];
    assign err_accept    = err_active[m] & (m_cmd[m] != CMD_IDLE);

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        err_grant_q[m] <= 1'b0;
        err_resp_q[m]  <= 1'b0;
      end else begin
        err_grant_q[m] <= m_req[m] & merr[m];
        err_resp_q[m]  <= err_accept;
      end
    end

    always_comb begin
      m_grant[m]      = (rsel != '0) | err_active[m];
      m_scmdaccept[m] = resp_acc[0] | err_accept;
      m_sresp[m]      = err_resp_q[m] ? RESP_ERR : resp_acc[2:1];
      m_sdata[m]      = rdata;
    end
  end

  assign dec_err = (err_active != '0);
endmodule
