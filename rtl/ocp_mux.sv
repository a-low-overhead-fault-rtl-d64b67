// ocp_mux: one-hot selected multiplexer of the shared OCP bus.
// The bus uses it five times: ADDRESS_MUX, BURST_MUX and WR_DATA_MUX pass the
// granted master's request to the slaves (select = arbiter grant), RD_DATA_MUX
// and RESP_MUX return the addressed slave's response (select = decoder slave
// select). Built as an AND-OR tree: the output is the OR of every input whose
// select bit is set, so with no select bit set the output is zero. Purely
// combinational. The mux names come from the design's block diagram; the
// AND-OR form and the zero output are this design's choice.
module ocp_mux #(
  parameter int N = 4,  // number of inputs
  parameter int W = 8   // width of each input
) (
  input  logic [N-1:0]        sel,
  input  logic [N-1:0][W-1:0] din,
  output logic [W-1:0]        dout
);
  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++)
      if (sel[i]) dout |= din[i];
  end
endmodule
