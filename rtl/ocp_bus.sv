// ocp_bus: the shared on-chip bus that connects NUM_M OCP masters to NUM_S
// OCP slaves, as in the design's block diagram: one ARBITER, one DECODER and
// the five multiplexers ADDRESS_MUX, BURST_MUX, WR_DATA_MUX (master -> slave,
// selected by the grant) and RD_DATA_MUX, RESP_MUX (slave -> master, selected
// by the decoder's SSEL).
//  - MCmd travels with the address through ADDRESS_MUX and reaches only the
//    selected slave; the others see MCmd = IDLE.
//  - SCmdAccept travels with SResp through RESP_MUX and is returned only to the
//    granted master; so are SResp and SData.
//  - A request to a nonexistent address (decoder err) is accepted by the bus
//    itself and answered one cycle later with SResp = ERR.
// One master's transaction is on the bus at a time. Its pipelined requests
// pass through unchanged (they stay inside one slave, so SSEL does not move
// while responses are pending); out-of-order responses are not supported.
// Everything except the arbiter's grant
// register and the error responder flop is combinational.
module ocp_bus
  import ocp_pkg::*;
#(
  parameter int NUM_M = OCP_NUM_M,
  parameter int NUM_S = OCP_NUM_S
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // master side
  input  logic [NUM_M-1:0]                    m_req,
  input  logic [NUM_M-1:0][OCP_CMD_W-1:0]         m_cmd,
  input  logic [NUM_M-1:0][OCP_ADDR_W-1:0]        m_addr,
  input  logic [NUM_M-1:0][OCP_DATA_W-1:0]        m_data,
  input  logic [NUM_M-1:0][OCP_BLEN_W-1:0]        m_burst,
  output logic [NUM_M-1:0]                    m_grant,
  output logic [NUM_M-1:0]                    m_scmdaccept,
  output logic [NUM_M-1:0][1:0]               m_sresp,
  output logic [NUM_M-1:0][OCP_DATA_W-1:0]        m_sdata,
  // slave side
  output logic [NUM_S-1:0][OCP_CMD_W-1:0]         s_cmd,
  output logic [NUM_S-1:0][OCP_SLAVE_AW-1:0]      s_addr,
  output logic [NUM_S-1:0][OCP_DATA_W-1:0]        s_data,
  output logic [NUM_S-1:0][OCP_BLEN_W-1:0]        s_burst,
  input  logic [NUM_S-1:0]                    s_scmdaccept,
  input  logic [NUM_S-1:0][1:0]               s_sresp,
  input  logic [NUM_S-1:0][OCP_DATA_W-1:0]        s_sdata,
  // observation
  output logic [NUM_S-1:0]                    ssel,
  output logic                                dec_err
);
  // ---- arbiter ----
  ocp_arbiter #(.N(NUM_M)) u_arbiter (
    .clk, .rst_n, .req(m_req), .grant(m_grant)
  );

  // ---- master -> slave multiplexers (select = grant) ----
  logic [NUM_M-1:0][OCP_CMD_W+OCP_ADDR_W-1:0] m_cmd_addr;
  logic [OCP_CMD_W-1:0]  bus_cmd;
  logic [OCP_ADDR_W-1:0] bus_addr;
  logic [OCP_DATA_W-1:0] bus_wdata;
  logic [OCP_BLEN_W-1:0] bus_burst;

  always_comb
    for (int m = 0; m < NUM_M; m++) m_cmd_addr[m] = {m_cmd[m], m_addr[m]};

  ocp_mux #(.N(NUM_M), .W(OCP_CMD_W + OCP_ADDR_W)) u_address_mux (
    .sel(m_grant), .din(m_cmd_addr), .dout({bus_cmd, bus_addr})
  );
  ocp_mux #(.N(NUM_M), .W(OCP_BLEN_W)) u_burst_mux (
    .sel(m_grant), .din(m_burst), .dout(bus_burst)
  );
  ocp_mux #(.N(NUM_M), .W(OCP_DATA_W)) u_wr_data_mux (
    .sel(m_grant), .din(m_data), .dout(bus_wdata)
  );

  // ---- decoder ----
  logic dec_err_raw;
  ocp_decoder #(.ADDR_W(OCP_ADDR_W), .NUM_S(NUM_S), .SLAVE_AW(OCP_SLAVE_AW)) u_decoder (
    .maddr(bus_addr), .ssel(ssel), .err(dec_err_raw)
  );
  assign dec_err = dec_err_raw && (m_grant != '0);

  always_comb
    for (int s = 0; s < NUM_S; s++) begin
      s_cmd[s]   = ssel[s] ? bus_cmd : OCP_CMD_W'(CMD_IDLE);
      s_addr[s]  = bus_addr[OCP_SLAVE_AW-1:0];
      s_data[s]  = bus_wdata;
      s_burst[s] = bus_burst;
    end

  // ---- slave -> master multiplexers (select = decoder) ----
  logic [NUM_S-1:0][2:0] s_resp_acc;
  logic [2:0]            sel_resp_acc;
  logic [OCP_DATA_W-1:0]     sel_rdata;

  always_comb
    for (int s = 0; s < NUM_S; s++) s_resp_acc[s] = {s_sresp[s], s_scmdaccept[s]};

  ocp_mux #(.N(NUM_S), .W(3)) u_resp_mux (
    .sel(ssel), .din(s_resp_acc), .dout(sel_resp_acc)
  );
  ocp_mux #(.N(NUM_S), .W(OCP_DATA_W)) u_rd_data_mux (
    .sel(ssel), .din(s_sdata), .dout(sel_rdata)
  );

  // ---- error responder for nonexistent addresses ----
  logic err_accept, err_resp_q;
  assign err_accept = dec_err && (bus_cmd != CMD_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) err_resp_q <= 1'b0;
    else        err_resp_q <= err_accept;
  end

  logic       bus_accept;
  logic [1:0] bus_resp;
  always_comb begin
    bus_accept = sel_resp_acc[0] | err_accept;
    bus_resp   = err_resp_q ? RESP_ERR : sel_resp_acc[2:1];
  end

  always_comb
    for (int m = 0; m < NUM_M; m++) begin
      m_scmdaccept[m] = m_grant[m] & bus_accept;
      m_sresp[m]      = m_grant[m] ? bus_resp : RESP_NULL;
      m_sdata[m]      = m_grant[m] ? sel_rdata : '0;
    end
endmodule
