// tb_sea_core: self-checking test of the SEA(48,8) loop-architecture core,
// NR = 51. Encrypts eight plaintext/key pairs whose ciphertexts come from an
// independent software model, decrypts each ciphertext back, runs 20 random
// encrypt/decrypt round trips, and checks that every operation takes exactly
// NR cycles from start to done.
module tb_sea_core;
  localparam int N = 48, B = 8, NR = 51;

  logic         clk = 0, rst_n = 0, start = 0, encrypt = 1;
  logic [N-1:0] data_in = '0, key_in = '0, data_out;
  logic         done, busy;
  int           checks = 0, failures = 0;

  sea_core #(.N(N), .B(B), .NR(NR)) dut (.*);

  always #5 clk = ~clk;

  logic [N-1:0] vec_p [8] = '{48'h000000000000, 48'h123456789abc, 48'hffffffffffff,
                              48'hf2a752e6b438, 48'h0c5ca6a3a450, 48'h1818892f902b,
                              48'he8e20ed90475, 48'h1600099950d8};
  logic [N-1:0] vec_k [8] = '{48'h000000000000, 48'hfedcba987654, 48'h0123456789ab,
                              48'h6513269e0d37, 48'hd23f128b2f33, 48'h95315d9dc9f8,
                              48'h36f681e74ef5, 48'h6b0d6f03675a};
  logic [N-1:0] vec_c [8] = '{48'h1d16b08e6202, 48'h6ca4f4f9f5bd, 48'h9519a287f551,
                              48'ha133fb24f1d6, 48'h2112f94992bc, 48'hcbda95955d6c,
                              48'hafd4a4902cc6, 48'h3d1dd575b636};

  task automatic op(input logic enc, input logic [N-1:0] d, input logic [N-1:0] k,
                    output logic [N-1:0] res);
    int cycles;
    @(negedge clk);
    encrypt = enc; data_in = d; key_in = k; start = 1;
    @(negedge clk);
    start = 0; data_in = '0; key_in = '0; encrypt = ~enc;   // inputs must not matter now
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    res = data_out;
    checks++;
    if (cycles != NR) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, NR);
    end
  endtask

  task automatic expect_eq(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [N-1:0] c, p, d, k;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      op(1, vec_p[i], vec_k[i], c);
      expect_eq(c, vec_c[i], "encrypt vector");
      op(0, vec_c[i], vec_k[i], p);
      expect_eq(p, vec_p[i], "decrypt vector");
    end
    for (int i = 0; i < 20; i++) begin
      d = {$urandom, $urandom};
      k = {$urandom, $urandom};
      op(1, d, k, c);
      op(0, c, k, p);
      expect_eq(p, d, "round trip");
      checks++;
      if (c == d) begin
        failures++;
        $display("FAIL ciphertext equals plaintext");
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
