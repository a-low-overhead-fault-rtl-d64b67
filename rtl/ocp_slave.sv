// ocp_slave: slave-side finite state machine (FSM-S, SLAVE_x) of the OCP bus.
// It answers OCP requests from its memory:
//  - write (MCmd = 001): accepted in the cycle it is seen while free, the
//    memory is written at that edge, and one cycle later the slave answers
//    SResp = DVA to acknowledge the reception of the data;
//  - read (MCmd = 010): accepted the same way with the address issued once
//    (single-request burst); starting one cycle after acceptance the slave
//    returns MBurstLength+1 beats on consecutive cycles, SResp = DVA with SData,
//    reading incrementing addresses from its registered-read memory;
//  - any other non-idle command is accepted and answered with SResp = ERR.
// The slave is free when idle and also in the cycle its last response of a
// transaction is on the bus, so a master can pipeline requests (issue the next
// one before the data of the previous one has come back).
// SCmdAccept is combinational from MCmd and the state. The bus drives MCmd
// idle unless this slave is selected. Accept/acknowledge behaviour follows the
// design description; the exact cycle timing is this design's choice.
module ocp_slave
  import ocp_pkg::*;
#(
  parameter int AW     = 10,
  parameter int DW     = 8,
  parameter int BLEN_W = 3
) (
  input  logic              clk,
  input  logic              rst_n,      // synchronous, active low
  // OCP request from the bus
  input  logic [OCP_CMD_W-1:0]  mcmd,
  input  logic [AW-1:0]     maddr,
  input  logic [DW-1:0]     mdata,
  input  logic [BLEN_W-1:0] mburst,     // beats - 1
  // OCP response to the bus
  output logic              scmdaccept,
  output logic [1:0]        sresp,
  output logic [DW-1:0]     sdata,
  // memory port
  output logic [AW-1:0]     mem_addr,
  output logic              mem_we,
  output logic [DW-1:0]     mem_wdata,
  input  logic [DW-1:0]     mem_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_WRESP, S_RD, S_ERR} state_e;

  state_e            state;
  logic [AW-1:0]     addr_q;   // address of the next read beat
  logic [BLEN_W-1:0] left_q;   // read beats left after the current one
  logic              free;     // a new request can be accepted this cycle

  assign free = (state != S_RD) || (left_q == '0);

  always_comb begin
    scmdaccept = 1'b0;
    sresp      = RESP_NULL;
    sdata      = '0;
    mem_addr   = maddr;
    mem_we     = 1'b0;
    mem_wdata  = mdata;
    if (free) begin
      scmdaccept = (mcmd != CMD_IDLE);
      mem_we     = (mcmd == CMD_WR);
    end
    unique case (state)
      S_IDLE: ;
      S_WRESP: sresp = RESP_DVA;
      S_RD: begin
        sresp    = RESP_DVA;
        sdata    = mem_rdata;
        if (!free) mem_addr = addr_q;   // next beat of the burst
      end
      S_ERR: sresp = RESP_ERR;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      addr_q <= '0;
      left_q <= '0;
    end else begin
      if (free) begin
        if (mcmd == CMD_WR) state <= S_WRESP;
        else if (mcmd == CMD_RD) begin
          state  <= S_RD;
          addr_q <= maddr + AW'(1);
          left_q <= mburst;
        end else if (mcmd != CMD_IDLE) state <= S_ERR;
        else state <= S_IDLE;
      end else begin                    // read burst beats still to come
        addr_q <= addr_q + AW'(1);
        left_q <= left_q - BLEN_W'(1);
      end
    end
  end
endmodule
