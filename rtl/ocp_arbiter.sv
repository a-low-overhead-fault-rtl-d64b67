// ocp_arbiter: bus arbiter of the shared OCP bus (ARBITER, MREQ1..4 ->
// MGRANTX1..4).
// Fixed priority, request 0 (MASTER_1) highest. The grant is a registered
// one-hot vector. A master keeps the grant for as long as it holds its
// request high, so neither a transaction in progress nor a locked sequence of
// transactions is interrupted by a higher-priority request (the lock mechanism
// of the design description). When the granted master drops its request, the
// next grant goes to the highest-priority requester one cycle later.
// Timing: request seen at a clock edge -> grant high after that edge.
// The priority order and the one-cycle latency are this design's choices.
module ocp_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,   // synchronous, active low
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);
  logic [N-1:0] grant_d;

  always_comb begin
    if ((grant & req) != '0) begin
      grant_d = grant;                 // current owner keeps the bus
    end else begin
      grant_d = '0;
      for (int i = N - 1; i >= 0; i--)
        if (req[i]) grant_d = N'(1) << i;  // lowest index wins
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) grant <= '0;
    else        grant <= grant_d;
  end

  // At most one master owns the bus.
  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
