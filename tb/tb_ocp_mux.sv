// tb_ocp_mux: self-checking test of the one-hot bus multiplexer (4 x 8 bit).
// Every one-hot select and the empty select are applied with random inputs;
// the output must equal the selected input, or zero with no select.
module tb_ocp_mux;
  localparam int N = 4, W = 8;

  logic [N-1:0]        sel;
  logic [N-1:0][W-1:0] din;
  logic [W-1:0]        dout;
  int                  checks = 0, failures = 0;

  ocp_mux #(.N(N), .W(W)) dut (.*);

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int s = -1; s < N; s++) begin
        logic [W-1:0] exp;
        for (int i = 0; i < N; i++) din[i] = W'($urandom);
        sel = (s < 0) ? '0 : N'(1) << s;
        exp = (s < 0) ? '0 : din[s];
        #1;
        checks++;
        if (dout !== exp) begin
          failures++;
          $display("FAIL sel=%b din=%h dout=%h expected %h", sel, din, dout, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
