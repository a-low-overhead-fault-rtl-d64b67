// ocp_master: master-side finite state machine (FSM-M, MASTER_x) of the OCP
// bus. It turns a request from the system (ADDRESS, DATA_IN, CONTROL, a burst
// size and M_ENABLE) into OCP transactions on the bus:
//   IDLE -> REQ (MREQ high, wait for MGRANT) -> CMD (drive MCmd until
//   SCmdAccept) -> RESP (collect responses) -> DONE (ack pulse) -> IDLE.
// Reads are single-request bursts by default: the address is issued once with
// MBurstLength = size and size+1 DVA beats come back. With READ_MULTI_REQ = 1
// a read burst is a multi-request burst instead: one single-beat read request
// (MBurstLength = 0) per beat at address base+k, pipelined: the next request
// is issued as soon as the previous one is accepted, without waiting for its
// data, and the transaction ends when every issued request has been answered
// (an error response stops further requests).
// Either way each beat appears on data_out with data_out_valid. Writes are
// always multi-request bursts: every beat is its own single-beat request
// carrying address base+k and the current DATA_IN, and waits for the slave's
// DVA acknowledge; wr_take pulses when a beat has been accepted so the system
// can present the next data. Beat addresses base+k wrap inside the slave
// (the low SLAVE_AW bits), so every beat of a burst goes to the same slave and
// the decoder keeps routing its responses back while later requests overlap
// them. An ERR response ends the transaction with err set (for pipelined
// reads, once the requests already issued have been answered). Lock: if
// sys_lock is high when a transaction completes, MREQ stays high so the
// arbiter keeps the bus for this master until sys_lock falls.
// Signal names follow the design's block diagram; the burst styles follow the
// description; the state machine and its timing are this design's own.
module ocp_master
  import ocp_pkg::*;
#(
  parameter int ADDR_W = 13,
  parameter int DATA_W = 8,
  parameter int BLEN_W = 3,
  parameter bit READ_MULTI_REQ = 1'b0,  // 1: read bursts issue one request per beat
  parameter int SLAVE_AW = 10           // offset bits inside one slave
) (
  input  logic              clk,
  input  logic              rst_n,        // synchronous, active low
  // system side
  input  logic [ADDR_W-1:0] sys_addr,
  input  logic [DATA_W-1:0] sys_data_in,
  input  logic [OCP_CMD_W-1:0]  sys_control,  // 001 write, 010 read
  input  logic [BLEN_W-1:0] sys_size,     // beats - 1
  input  logic              sys_lock,
  input  logic              m_enable,
  output logic [DATA_W-1:0] data_out,
  output logic              data_out_valid,
  output logic              wr_take,
  output logic              ack,
  output logic              err,
  output logic              busy,
  // bus side
  output logic              mreq,
  input  logic              mgrant,
  output logic [OCP_CMD_W-1:0]  mcmd,
  output logic [ADDR_W-1:0] maddr,
  output logic [DATA_W-1:0] mdata,
  output logic [BLEN_W-1:0] mburst,
  input  logic              scmdaccept,
  input  logic [1:0]        sresp,
  input  logic [DATA_W-1:0] sdata
);
  typedef enum logic [2:0] {M_IDLE, M_REQ, M_CMD, M_RESP, M_DONE} state_e;

  state_e            state;
  mcmd_e             cmd_q;
  logic [ADDR_W-1:0] addr_q;
  logic [BLEN_W-1:0] size_q;
  logic [BLEN_W-1:0] beat_q;   // beats completed in this transaction
  logic              err_q;
  logic              lock_q;   // bus held across transactions

  // pipelined multi-request read bookkeeping
  logic [BLEN_W-1:0] req_q;      // index of the next read request to issue
  logic              req_end_q;  // no more read requests to issue
  logic [BLEN_W:0]   out_q;      // read requests issued but not yet answered

  logic resp_ok, resp_bad, last_beat, per_beat, pl_rd, issue, answer, req_end_d;
  logic [BLEN_W:0]   out_d;
  logic [BLEN_W-1:0] idx;
  assign per_beat  = (cmd_q == CMD_WR) || READ_MULTI_REQ;   // one request per beat
  assign pl_rd     = (cmd_q == CMD_RD) && READ_MULTI_REQ;   // pipelined reads
  assign resp_ok   = (sresp == RESP_DVA);
  assign resp_bad  = (sresp == RESP_ERR) || (sresp == RESP_FAIL);
  assign last_beat = (beat_q == size_q);
  assign idx       = pl_rd ? req_q : beat_q;
  assign issue     = (mcmd != CMD_IDLE) && scmdaccept;
  assign answer    = (state == M_RESP) && (resp_ok || resp_bad);
  assign out_d     = out_q + (BLEN_W+1)'(issue) - (BLEN_W+1)'(answer);
  assign req_end_d = req_end_q || (issue && req_q == size_q) ||
                     ((state == M_RESP) && resp_bad);

  always_comb begin
    mcmd   = CMD_IDLE;
    maddr  = addr_q;
    if (per_beat) maddr[SLAVE_AW-1:0] = addr_q[SLAVE_AW-1:0] + SLAVE_AW'(idx);
    mdata  = sys_data_in;
    mburst = per_beat ? '0 : size_q;
    if (state == M_CMD || (pl_rd && state == M_RESP && !req_end_q)) mcmd = cmd_q;
    unique case (state)
      M_REQ, M_CMD, M_RESP: mreq = 1'b1;
      M_DONE:               mreq = sys_lock;
      default:              mreq = lock_q && sys_lock;
    endcase
  end

  assign wr_take = (state == M_CMD) && scmdaccept && (cmd_q == CMD_WR);
  assign ack     = (state == M_DONE);
  assign err     = err_q;
  assign busy    = (state != M_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state          <= M_IDLE;
      cmd_q          <= CMD_IDLE;
      addr_q         <= '0;
      size_q         <= '0;
      beat_q         <= '0;
      req_q          <= '0;
      req_end_q      <= 1'b0;
      out_q          <= '0;
      err_q          <= 1'b0;
      lock_q         <= 1'b0;
      data_out       <= '0;
      data_out_valid <= 1'b0;
    end else begin
      data_out_valid <= 1'b0;
      if (!sys_lock) lock_q <= 1'b0;
      if (pl_rd && (state == M_CMD || state == M_RESP)) begin
        out_q     <= out_d;
        req_end_q <= req_end_d;
        if (issue) req_q <= req_q + BLEN_W'(1);
      end
      unique case (state)
        M_IDLE: begin
          if (m_enable) begin
            addr_q <= sys_addr;
            size_q <= sys_size;
            beat_q <= '0;
            req_q  <= '0;
            req_end_q <= 1'b0;
            out_q  <= '0;
            err_q  <= 1'b0;
            if (sys_control == CMD_WR || sys_control == CMD_RD) begin
              cmd_q <= mcmd_e'(sys_control);
              state <= M_REQ;
            end else begin
              err_q <= 1'b1;             // unsupported command
              state <= M_DONE;
            end
          end
        end
        M_REQ:  if (mgrant) state <= M_CMD;
        M_CMD:  if (scmdaccept) state <= M_RESP;
        M_RESP: if (pl_rd) begin
          if (resp_ok) begin
            data_out       <= sdata;
            data_out_valid <= 1'b1;
          end
          if (resp_bad) err_q <= 1'b1;
          if (out_d == '0 && req_end_d) state <= M_DONE;
        end else begin
          if (resp_bad) begin
            err_q <= 1'b1;
            state <= M_DONE;
          end else if (resp_ok) begin
            if (cmd_q == CMD_RD) begin
              data_out       <= sdata;
              data_out_valid <= 1'b1;
            end
            if (last_beat) state <= M_DONE;
            else begin
              beat_q <= beat_q + BLEN_W'(1);
              if (per_beat) state <= M_CMD;
            end
          end
        end
        M_DONE: begin
          lock_q <= sys_lock;
          state  <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // MReq stays high from request to the end of the transaction.
  a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {M_CMD, M_RESP}) |-> mreq);
endmodule
