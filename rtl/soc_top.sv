// soc_top: top level of the design. Two independent subsystems stand side by
// side, each with its own ports:
//  1. The OCP on-chip bus system: NUM_M master FSMs (MASTER_1..4) driven from
//     the system ports, the shared bus (arbiter, decoder, ADDRESS / BURST /
//     WR_DATA / RD_DATA / RESP multiplexers, error responder) and NUM_S slave
//     FSMs (SLAVE_1..4), each with its own 8 kbit memory. Address map:
//     m_addr[11:10] picks the slave, m_addr[9:0] the byte in it, and
//     m_addr[12] = 1 is nonexistent (error response).
//  2. The SEA(n,b) loop-architecture block cipher, NR rounds, one per clock.
// Per-master system interface: put m_control (001 write, 010 read),
// m_addr, m_size (beats - 1) and m_lock, and raise m_enable for one cycle while
// m_busy is low. Write data is taken from m_data_in beat by beat (m_wr_take
// marks each taken beat), read beats appear on m_data_out with
// m_data_out_valid, and m_ack pulses at the end (m_err if it failed).
// By default MASTER_1 and MASTER_2 read with single-request bursts and
// MASTER_3 and MASTER_4 with pipelined multi-request bursts (READ_MULTI_REQ),
// so IP cores with either burst style share the bus.
// How the two subsystems would be connected is not part of the design.
// CROSSBAR selects the bus fabric: 0 (default) the shared bus of the block
// diagram, one transaction at a time; 1 the crossbar with one arbiter per
// slave, where masters using different slaves proceed in parallel. Both have
// the same ports. With the crossbar, mgrant shows every master that holds a
// slave and ssel every slave that is held; XBAR_PATHS can leave paths out
// (partial crossbar).
module soc_top
  import ocp_pkg::*;
#(
  parameter int NUM_M  = OCP_NUM_M,
  parameter int NUM_S  = OCP_NUM_S,
  parameter int SEA_N  = 48,
  parameter int SEA_B  = 8,
  parameter int SEA_NR = 51,
  parameter bit CROSSBAR = 1'b0,  // 0: shared bus (ocp_bus), 1: crossbar (ocp_xbar)
  // crossbar only: XBAR_PATHS[m][s] = 1 wires MASTER_(m+1) to SLAVE_(s+1);
  // all ones is a full crossbar, fewer ones a partial crossbar
  parameter logic [NUM_M-1:0][NUM_S-1:0] XBAR_PATHS = '1,
  // read burst style per master: bit m = 1 makes MASTER_(m+1) issue one request
  // per beat (multi-request burst), 0 one request per burst (single-request)
  parameter logic [NUM_M-1:0] READ_MULTI_REQ = 4'b1100
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // OCP system: per-master system interface
  input  logic [NUM_M-1:0][OCP_ADDR_W-1:0]    m_addr,
  input  logic [NUM_M-1:0][OCP_DATA_W-1:0]    m_data_in,
  input  logic [NUM_M-1:0][OCP_CMD_W-1:0]     m_control,
  input  logic [NUM_M-1:0][OCP_BLEN_W-1:0]    m_size,
  input  logic [NUM_M-1:0]                    m_lock,
  input  logic [NUM_M-1:0]                    m_enable,
  output logic [NUM_M-1:0][OCP_DATA_W-1:0]    m_data_out,
  output logic [NUM_M-1:0]                    m_data_out_valid,
  output logic [NUM_M-1:0]                    m_wr_take,
  output logic [NUM_M-1:0]                    m_ack,
  output logic [NUM_M-1:0]                    m_err,
  output logic [NUM_M-1:0]                    m_busy,
  output logic [NUM_M-1:0]                    mgrant,
  output logic [NUM_M-1:0]                    m_accept,     // SCmdAccept seen by each master
  output logic [NUM_S-1:0]                    ssel,
  output logic                                dec_err,      // nonexistent address on the bus
  // SEA cipher
  input  logic                                sea_start,
  input  logic                                sea_encrypt,
  input  logic [SEA_N-1:0]                    sea_data_in,
  input  logic [SEA_N-1:0]                    sea_key_in,
  output logic [SEA_N-1:0]                    sea_data_out,
  output logic                                sea_done,
  output logic                                sea_busy
);
  // ---------------- OCP bus system ----------------
  logic [NUM_M-1:0]                   b_req;
  logic [NUM_M-1:0][OCP_CMD_W-1:0]    b_cmd;
  logic [NUM_M-1:0][OCP_ADDR_W-1:0]   b_addr;
  logic [NUM_M-1:0][OCP_DATA_W-1:0]   b_data;
  logic [NUM_M-1:0][OCP_BLEN_W-1:0]   b_burst;
  logic [NUM_M-1:0]                   b_accept;
  logic [NUM_M-1:0][1:0]              b_resp;
  logic [NUM_M-1:0][OCP_DATA_W-1:0]   b_sdata;

  logic [NUM_S-1:0][OCP_CMD_W-1:0]    s_cmd;
  logic [NUM_S-1:0][OCP_SLAVE_AW-1:0] s_addr;
  logic [NUM_S-1:0][OCP_DATA_W-1:0]   s_data;
  logic [NUM_S-1:0][OCP_BLEN_W-1:0]   s_burst;
  logic [NUM_S-1:0]                   s_accept;
  logic [NUM_S-1:0][1:0]              s_resp;
  logic [NUM_S-1:0][OCP_DATA_W-1:0]   s_sdata;

  assign m_accept = b_accept;

  for (genvar m = 0; m < NUM_M; m++) begin : g_master
    ocp_master #(
      .ADDR_W(OCP_ADDR_W), .DATA_W(OCP_DATA_W), .BLEN_W(OCP_BLEN_W),
      .READ_MULTI_REQ(READ_MULTI_REQ[m]), .SLAVE_AW(OCP_SLAVE_AW)
    ) u_master (
      .clk, .rst_n,
      .sys_addr(m_addr[m]), .sys_data_in(m_data_in[m]), .sys_control(m_control[m]),
      .sys_size(m_size[m]), .sys_lock(m_lock[m]), .m_enable(m_enable[m]),
      .data_out(m_data_out[m]), .data_out_valid(m_data_out_valid[m]),
      .wr_take(m_wr_take[m]), .ack(m_ack[m]), .err(m_err[m]), .busy(m_busy[m]),
      .mreq(b_req[m]), .mgrant(mgrant[m]), .mcmd(b_cmd[m]), .maddr(b_addr[m]),
      .mdata(b_data[m]), .mburst(b_burst[m]),
      .scmdaccept(b_accept[m]), .sresp(b_resp[m]), .sdata(b_sdata[m])
    );
  end

  if (CROSSBAR) begin : g_xbar
    ocp_xbar #(.NUM_M(NUM_M), .NUM_S(NUM_S), .PATHS(XBAR_PATHS)) u_bus (
      .clk, .rst_n,
      .m_req(b_req), .m_cmd(b_cmd), .m_addr(b_addr), .m_data(b_data), .m_burst(b_burst),
      .m_grant(mgrant), .m_scmdaccept(b_accept), .m_sresp(b_resp), .m_sdata(b_sdata),
      .s_cmd, .s_addr, .s_data, .s_burst,
      .s_scmdaccept(s_accept), .s_sresp(s_resp), .s_sdata(s_sdata),
      .ssel, .dec_err
    );
  end else begin : g_shared
    ocp_bus #(.NUM_M(NUM_M), .NUM_S(NUM_S)) u_bus (
      .clk, .rst_n,
      .m_req(b_req), .m_cmd(b_cmd), .m_addr(b_addr), .m_data(b_data), .m_burst(b_burst),
      .m_grant(mgrant), .m_scmdaccept(b_accept), .m_sresp(b_resp), .m_sdata(b_sdata),
      .s_cmd, .s_addr, .s_data, .s_burst,
      .s_scmdaccept(s_accept), .s_sresp(s_resp), .s_sdata(s_sdata),
      .ssel, .dec_err
    );
  end

  for (genvar s = 0; s < NUM_S; s++) begin : g_slave
    logic [OCP_SLAVE_AW-1:0] mem_addr;
    logic                    mem_we;
    logic [OCP_DATA_W-1:0]   mem_wdata, mem_rdata;

    ocp_slave #(.AW(OCP_SLAVE_AW), .DW(OCP_DATA_W), .BLEN_W(OCP_BLEN_W)) u_slave (
      .clk, .rst_n,
      .mcmd(s_cmd[s]), .maddr(s_addr[s]), .mdata(s_data[s]), .mburst(s_burst[s]),
      .scmdaccept(s_accept[s]), .sresp(s_resp[s]), .sdata(s_sdata[s]),
      .mem_addr, .mem_we, .mem_wdata, .mem_rdata
    );

    ocp_memory #(.AW(OCP_SLAVE_AW), .DW(OCP_DATA_W)) u_memory (
      .clk, .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata)
    );
  end

  // ---------------- SEA cipher ----------------
  sea_core #(.N(SEA_N), .B(SEA_B), .NR(SEA_NR)) u_sea (
    .clk, .rst_n, .start(sea_start), .encrypt(sea_encrypt),
    .data_in(sea_data_in), .key_in(sea_key_in),
    .data_out(sea_data_out), .done(sea_done), .busy(sea_busy)
  );
endmodule
