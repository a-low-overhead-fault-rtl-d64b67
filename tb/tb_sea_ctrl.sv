// tb_sea_ctrl: self-checking test of the SEA control part with NR = 51.
// Runs two operations and checks, round by round, the select signals against
// the schedule (NotState0 low only in round 1, Switch only in round 25, Half
// Exec from round 26, Const_i = i then 51 - i), that done comes exactly NR
// cycles after start, and that a start while busy is ignored.
module tb_sea_ctrl;
  localparam int NR = 51, B = 8, HALF = 25;

  logic         clk = 0, rst_n = 0, start = 0;
  logic         run, not_state0, half_exec, switch_o, busy, done;
  logic [B-1:0] const_i;
  int           checks = 0, failures = 0;

  sea_ctrl #(.NR(NR), .B(B)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what, input int rnd);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL round %0d %s: got %0d expected %0d", rnd, what, got, exp);
    end
  endtask

  task automatic one_op(input bit poke_start);
    int cycles;
    @(negedge clk);
    start = 1;
    for (int i = 1; i <= NR; i++) begin
      #1;
      expect_eq(run, 1, "run", i);
      expect_eq(not_state0, (i != 1), "not_state0", i);
      expect_eq(switch_o, (i == HALF), "switch", i);
      expect_eq(half_exec, (i > HALF), "half_exec", i);
      expect_eq(const_i, (i <= HALF) ? i : NR - i, "const", i);
      expect_eq(done, 0, "done early", i);
      @(negedge clk);
      start = (poke_start && i == 10);   // stray start while busy
    end
    start = 0;
    #1;
    expect_eq(done, 1, "done after NR cycles", NR);
    expect_eq(busy, 0, "busy after done", NR);
    @(negedge clk);
    #1;
    expect_eq(done, 0, "done is a pulse", NR);
    expect_eq(run, 0, "idle", NR);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one_op(0);
    repeat (2) @(posedge clk);
    one_op(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
