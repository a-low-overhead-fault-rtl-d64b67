// ocp_pkg: widths and encodings shared by the OCP on-chip bus blocks.
// The address (13 bits), data (8 bits) and command (3 bits) widths and the
// four-master / four-slave arrangement follow the design description.
// The command and response codes are the OCP MCmd / SResp encodings; the
// 3-bit burst-length field (beats minus one), the 1024 x 8 bit memory per
// slave and the address map are this design's own choices.
package ocp_pkg;
  localparam int OCP_ADDR_W   = 13;  // MAddr width
  localparam int OCP_DATA_W   = 8;   // MData / SData width
  localparam int OCP_CMD_W    = 3;   // MCmd width
  localparam int OCP_BLEN_W   = 3;   // burst length field: beats - 1
  localparam int OCP_NUM_M    = 4;   // masters
  localparam int OCP_NUM_S    = 4;   // slaves
  localparam int OCP_SLAVE_AW = 10;  // 1024 x 8 bit = 8 kbit per slave

  typedef enum logic [OCP_CMD_W-1:0] {
    CMD_IDLE = 3'b000,
    CMD_WR   = 3'b001,
    CMD_RD   = 3'b010
  } mcmd_e;

  typedef enum logic [1:0] {
    RESP_NULL = 2'b00,
    RESP_DVA  = 2'b01,
    RESP_FAIL = 2'b10,
    RESP_ERR  = 2'b11
  } sresp_e;
endpackage
