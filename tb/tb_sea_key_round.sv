// tb_sea_key_round: self-checking test of one SEA(48,8) key-schedule step.
// Checks four vectors from an independent software model, 500 random steps
// against a reference written here, and the property the loop architecture
// relies on: a normal step applied to the exchanged halves of a step's result,
// with the same constant, gives back the exchanged halves of its input.
module tb_sea_key_round;
  localparam int N = 48, B = 8, H = N / 2;

  logic [H-1:0] kl_in, kr_in, kl_out, kr_out;
  logic [B-1:0] const_i;
  logic         switch_i;
  int           checks = 0, failures = 0;

  sea_key_round #(.N(N), .B(B)) dut (.*);

  localparam logic [23:0] SBOX = {3'd2, 3'd1, 3'd3, 3'd4, 3'd7, 3'd6, 3'd5, 3'd0};

  function automatic logic [H-1:0] ref_g(logic [H-1:0] x, logic [7:0] c);
    logic [H-1:0] a, s, o;
    int v;
    a = x;
    a[7:0] = x[7:0] + c;
    for (int j = 0; j < 8; j++) begin
      v = {29'd0, a[16+j], a[8+j], a[j]};
      s[j]    = SBOX[3*v];
      s[8+j]  = SBOX[3*v+1];
      s[16+j] = SBOX[3*v+2];
    end
    for (int j = 0; j < 8; j++) begin
      o[j]    = s[(j + 1) % 8];
      o[8+j]  = s[8+j];
      o[16+j] = s[16 + (j + 7) % 8];
    end
    return {o[15:0], o[23:16]};   // word rotation
  endfunction

  task automatic apply(input logic [H-1:0] l, input logic [H-1:0] r, input logic [7:0] c,
                       input logic sw);
    kl_in = l; kr_in = r; const_i = c; switch_i = sw;
    #1;
  endtask

  task automatic check(input logic [H-1:0] el, input logic [H-1:0] er, input string what);
    checks++;
    if (kl_out !== el || kr_out !== er) begin
      failures++;
      $display("FAIL %s: %h %h c=%0d sw=%0d -> %h %h, expected %h %h",
               what, kl_in, kr_in, const_i, switch_i, kl_out, kr_out, el, er);
    end
  endtask

  initial begin
    apply(24'h123456, 24'h789abc, 8'd7, 0);  check(24'h789abc, 24'hd0d911, "vec0");
    apply(24'h123456, 24'h789abc, 8'd7, 1);  check(24'hd0d911, 24'h789abc, "vec1");
    apply(24'ha5a5a5, 24'h5a5a5a, 8'd25, 0); check(24'h5a5a5a, 24'hf731e7, "vec2");
    apply(24'ha5a5a5, 24'h5a5a5a, 8'd25, 1); check(24'hf731e7, 24'h5a5a5a, "vec3");
    for (int i = 0; i < 500; i++) begin
      logic [H-1:0] l, r, nl, nr;
      logic [7:0]   c;
      logic         sw;
      l = H'($urandom); r = H'($urandom); c = 8'($urandom_range(0, 25)); sw = 1'($urandom);
      apply(l, r, c, sw);
      if (sw) check(l ^ ref_g(r, c), r, "switch");
      else    check(r, l ^ ref_g(r, c), "normal");
      if (!sw) begin
        nl = kl_out; nr = kr_out;
        apply(nr, nl, c, 0);      // retrace
        check(r, l, "retrace");
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
