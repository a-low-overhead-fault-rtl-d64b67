// tb_ocp_memory: self-checking test of the 1024 x 8 bit slave memory.
// Writes every word, reads all back with the one-cycle read latency, then runs
// 3000 random read/write cycles against a model array (read during write
// returns the old word).
module tb_ocp_memory;
  localparam int AW = 10, DW = 8;

  logic          clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [2**AW];
  int            checks = 0, failures = 0;

  ocp_memory #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic [DW-1:0] exp;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      addr = AW'(a); we = 1; wdata = DW'(a * 7 + 3);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < 2**AW; a++) begin
      addr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", a, rdata, model[a]);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      addr = AW'($urandom); we = 1'($urandom); wdata = DW'($urandom);
      exp = model[addr];
      if (we) model[addr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL random %0d: %h expected %h", addr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
