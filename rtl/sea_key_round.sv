// sea_key_round: one step of the SEA(n,b) key schedule, the right half of the
// loop architecture.
//   G   = R(r(S(KR [+] C(i))))   C(i): least significant word = Const_i, rest 0
//   new = KL xor G
//   Switch = 0: KL' = KR,  KR' = new   (normal Feistel step, crossed wires)
//   Switch = 1: KL' = new, KR' = KR    (the exchange at half execution)
// Purely combinational; the key registers live in sea_core. Structure as in
// the design's loop-architecture figure; the C(i) layout is that of the
// original SEA specification.
module sea_key_round #(
  parameter int N = 48,
  parameter int B = 8
) (
  input  logic [N/2-1:0] kl_in,
  input  logic [N/2-1:0] kr_in,
  input  logic [B-1:0]   const_i,
  input  logic           switch_i,
  output logic [N/2-1:0] kl_out,
  output logic [N/2-1:0] kr_out
);
  localparam int H = N / 2;

  logic [H-1:0] c_vec, f, g, k_new;

  assign c_vec = H'(const_i);

  sea_fn #(.N(N), .B(B)) u_fn (.x(kr_in), .y(c_vec), .f(f));

  assign g      = {f[H-B-1:0], f[H-1:H-B]};   // R
  assign k_new  = kl_in ^ g;
  assign kl_out = switch_i ? k_new : kr_in;
  assign kr_out = switch_i ? kr_in : k_new;
endmodule
