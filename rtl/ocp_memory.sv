// ocp_memory: the 8 kbit memory behind each OCP slave (1024 words x 8 bits by
// default). Single port: a write happens at the clock edge when we is high;
// rdata is registered and shows the word at addr one cycle later (on a write
// it shows the old contents). Contents are not reset. The 8 kbit size follows
// the design description; the port style and read latency are this design's
// choice.
module ocp_memory #(
  parameter int AW = 10,
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
