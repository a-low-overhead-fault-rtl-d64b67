// tb_sea_round: self-checking test of one SEA(48,8) Feistel round.
// Checks four vectors computed with an independent software model of the
// cipher, then 500 random rounds (both directions) against a reference written
// here bit by bit, and that a decryption round undoes an encryption round
// (with the halves exchanged, as the Feistel structure requires).
module tb_sea_round;
  localparam int N = 48, B = 8, H = N / 2;

  logic [H-1:0] l_in, r_in, key, l_out, r_out;
  logic         encrypt;
  int           checks = 0, failures = 0;

  sea_round #(.N(N), .B(B)) dut (.*);

  // S = [0,5,6,7,4,3,1,2], entry v at bits 3v+2..3v
  localparam logic [23:0] SBOX = {3'd2, 3'd1, 3'd3, 3'd4, 3'd7, 3'd6, 3'd5, 3'd0};

  function automatic logic [H-1:0] ref_f(logic [H-1:0] x, logic [H-1:0] y);
    logic [H-1:0] a, s, o;
    int v;
    for (int w = 0; w < 3; w++) a[w*8 +: 8] = x[w*8 +: 8] + y[w*8 +: 8];
    for (int j = 0; j < 8; j++) begin
      v = {29'd0, a[16+j], a[8+j], a[j]};
      s[j]    = SBOX[3*v];
      s[8+j]  = SBOX[3*v+1];
      s[16+j] = SBOX[3*v+2];
    end
    for (int j = 0; j < 8; j++) begin
      o[j]      = s[(j + 1) % 8];          // word 0 rotated right
      o[8+j]    = s[8+j];
      o[16+j]   = s[16 + (j + 7) % 8];     // word 2 rotated left
    end
    return o;
  endfunction

  function automatic logic [H-1:0] wrot(logic [H-1:0] x);      // y(i+1) = x(i)
    return {x[15:0], x[23:16]};
  endfunction
  function automatic logic [H-1:0] wrot_inv(logic [H-1:0] x);
    return {x[7:0], x[23:8]};
  endfunction

  task automatic check(input logic [H-1:0] el, input logic [H-1:0] er, input string what);
    checks++;
    if (l_out !== el || r_out !== er) begin
      failures++;
      $display("FAIL %s: l=%h r=%h k=%h enc=%0d -> %h %h, expected %h %h",
               what, l_in, r_in, key, encrypt, l_out, r_out, el, er);
    end
  endtask

  task automatic apply(input logic [H-1:0] l, input logic [H-1:0] r, input logic [H-1:0] k,
                       input logic e);
    l_in = l; r_in = r; key = k; encrypt = e;
    #1;
  endtask

  initial begin
    // vectors from an independent software model
    apply(24'h123456, 24'h789abc, 24'hdef012, 1); check(24'h789abc, 24'h059874, "vec0");
    apply(24'h123456, 24'h789abc, 24'hdef012, 0); check(24'h789abc, 24'h3023fa, "vec1");
    apply(24'hffffff, 24'h000001, 24'h800000, 1); check(24'h000001, 24'hfcff7f, "vec2");
    apply(24'hffffff, 24'h000001, 24'h800000, 0); check(24'h000001, 24'h7ffcff, "vec3");
    for (int i = 0; i < 500; i++) begin
      logic [H-1:0] l, r, k, el, er;
      l = H'($urandom); r = H'($urandom); k = H'($urandom);
      apply(l, r, k, 1);
      check(r, wrot(l) ^ ref_f(r, k), "enc");
      el = l_out; er = r_out;
      // decrypt: input (R', L') = (er, el) ... feed (el, er) is the Feistel state
      apply(er, el, k, 0);     // swapped halves
      check(el, wrot_inv(er ^ ref_f(el, k)), "dec");
      checks++;
      if (r_out !== l) begin
        failures++;
        $display("FAIL inverse: %h -> %h", l, r_out);
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
