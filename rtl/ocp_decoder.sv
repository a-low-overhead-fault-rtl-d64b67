// ocp_decoder: address decoder of the shared OCP bus (DECODER, SSEL1..4).
// The 13-bit bus address is split into a slave index and an offset inside the
// slave's 8 kbit (1024 x 8) memory. Addresses beyond the last slave are
// nonexistent: no select is raised and err is set, so the bus can answer with
// an error response, as the design description asks of the decoder.
// Address map (this design's choice): slave = maddr[SLAVE_AW +: log2(NUM_S)],
// offset = maddr[SLAVE_AW-1:0]; with the defaults maddr[12] = 1 is nonexistent.
// Purely combinational.
module ocp_decoder #(
  parameter int ADDR_W   = 13,
  parameter int NUM_S    = 4,
  parameter int SLAVE_AW = 10
) (
  input  logic [ADDR_W-1:0] maddr,
  output logic [NUM_S-1:0]  ssel,
  output logic              err
);

  logic [ADDR_W-1:0] slave_idx;

  always_comb begin
    slave_idx = maddr >> SLAVE_AW;
    ssel      = '0;
    err       = 1'b1;
    for (int s = 0; s < NUM_S; s++)
      if (slave_idx == ADDR_W'(s)) begin
        ssel[s] = 1'b1;
        err     = 1'b0;
      end
  end
endmodule
