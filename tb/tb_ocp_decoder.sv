// tb_ocp_decoder: self-checking test of the bus address decoder. Every one of
// the 8192 addresses is applied: addresses 0..4095 must select exactly slave
// addr/1024, addresses 4096..8191 must select none and raise err.
module tb_ocp_decoder;
  logic [12:0] maddr;
  logic [3:0]  ssel;
  logic        err;
  int          checks = 0, failures = 0;

  ocp_decoder #(.ADDR_W(13), .NUM_S(4), .SLAVE_AW(10)) dut (.*);

  initial begin
    for (int a = 0; a < 8192; a++) begin
      logic [3:0] exp_sel;
      logic       exp_err;
      maddr   = 13'(a);
      exp_err = (a >= 4096);
      exp_sel = exp_err ? 4'b0000 : 4'(1 << (a / 1024));
      #1;
      checks++;
      if (ssel !== exp_sel || err !== exp_err) begin
        failures++;
        if (failures < 10)
          $display("FAIL addr=%0d ssel=%b err=%b expected %b %b", a, ssel, err, exp_sel, exp_err);
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
