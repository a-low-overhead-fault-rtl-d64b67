// tb_sea_18bit: the SEA core in the small 18-bit configuration shown in the
// design's simulation result (18-bit plaintext, key and ciphertext, encryption
// of plaintext 11 with key 28 followed by decryption of the result), here as
// SEA(18,3) with 21 rounds. The round count and word size of that result are
// not known, so the ciphertexts are checked against an independent software
// model of this configuration, and decryption must return the plaintext.
// Round constants above 7 wrap modulo 2^3 in the 3-bit word.
module tb_sea_18bit;
  localparam int N = 18, B = 3, NR = 21;

  logic         clk = 0, rst_n = 0, start = 0, encrypt = 1;
  logic [N-1:0] data_in = '0, key_in = '0, data_out;
  logic         done, busy;
  int           checks = 0, failures = 0;

  sea_core #(.N(N), .B(B), .NR(NR)) dut (.*);

  always #5 clk = ~clk;

  task automatic op(input logic enc, input logic [N-1:0] d, input logic [N-1:0] k,
                    output logic [N-1:0] res);
    int cycles;
    @(negedge clk);
    encrypt = enc; data_in = d; key_in = k; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    res = data_out;
    checks++;
    if (cycles != NR) begin
      failures++;
      $display("FAIL latency %0d", cycles);
    end
  endtask

  task automatic expect_eq(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  logic [N-1:0] vp [3] = '{18'd11, 18'h3ffff, 18'h2aaaa};
  logic [N-1:0] vk [3] = '{18'd28, 18'h15555, 18'h00001};
  logic [N-1:0] vc [3] = '{18'h0036f, 18'h07a52, 18'h04582};

  initial begin
    logic [N-1:0] c, p;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      op(1, vp[i], vk[i], c);
      expect_eq(c, vc[i], "encryption");
      op(0, c, vk[i], p);
      expect_eq(p, vp[i], "decryption");
      $display("plaintext %b key %b -> ciphertext %b -> %b", vp[i], vk[i], c, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
