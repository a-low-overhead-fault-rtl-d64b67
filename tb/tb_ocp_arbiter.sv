// tb_ocp_arbiter: self-checking test of the fixed-priority bus arbiter with
// grant hold. A directed part checks that request 0 wins over the others, that
// a lower-priority owner keeps the bus while a higher-priority request waits
// (the lock behaviour) and that the bus passes on when it lets go, with one
// cycle of latency. A random part compares 2000 cycles against a model.
module tb_ocp_arbiter;
  localparam int N = 4;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, grant;
  logic [N-1:0] model;
  int           checks = 0, failures = 0;

  ocp_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] next_grant(logic [N-1:0] g, logic [N-1:0] r);
    if ((g & r) != 0) return g;
    for (int i = 0; i < N; i++) if (r[i]) return N'(1) << i;
    return '0;
  endfunction

  task automatic step(input logic [N-1:0] r, input logic [N-1:0] exp, input string what);
    @(negedge clk);
    req = r;
    @(negedge clk);
    checks++;
    if (grant !== exp) begin
      failures++;
      $display("FAIL %s: req=%b grant=%b expected %b", what, r, grant, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    step(4'b1111, 4'b0001, "priority");
    step(4'b1110, 4'b0010, "next priority");
    step(4'b1000, 4'b1000, "single request");
    step(4'b1111, 4'b1000, "owner keeps bus");
    step(4'b1101, 4'b1000, "owner keeps bus 2");
    step(4'b0111, 4'b0001, "release");
    step(4'b0000, 4'b0000, "idle");
    // random against the model
    @(negedge clk);
    model = grant;
    for (int i = 0; i < 2000; i++) begin
      req = N'($urandom);
      model = next_grant(model, req);
      @(negedge clk);
      checks++;
      if (grant !== model) begin
        failures++;
        $display("FAIL random: req=%b grant=%b expected %b", req, grant, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
