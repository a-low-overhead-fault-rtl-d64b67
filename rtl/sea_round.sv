// sea_round: one Feistel round of SEA(n,b), the left half of the loop
// architecture.
//   F        = r(S(R [+] K))                      (see sea_fn)
//   encrypt: R' = R(L) xor F                       (Encrypt mux takes R(L))
//   decrypt: R' = R^-1(L xor F)                    (lower mux takes R^-1)
//   L'       = R                                   (the crossing wires)
// R is the word rotation y(i+1) = x(i), y(0) = x(nb-1); R^-1 is its inverse.
// Both rotations are wiring. Purely combinational; the loop registers live in
// sea_core. The structure is the one of the design's loop-architecture figure.
// Here one encrypt signal drives both the upper (Encrypt) and the lower
// (printed "Decrypt") mux.
module sea_round #(
  parameter int N = 48,
  parameter int B = 8
) (
  input  logic [N/2-1:0] l_in,
  input  logic [N/2-1:0] r_in,
  input  logic [N/2-1:0] key,
  input  logic           encrypt,
  output logic [N/2-1:0] l_out,
  output logic [N/2-1:0] r_out
);
  localparam int H = N / 2;

  logic [H-1:0] f, l_rot, l_sel, x, x_rot_inv;

  sea_fn #(.N(N), .B(B)) u_fn (.x(r_in), .y(key), .f(f));

  assign l_rot     = {l_in[H-B-1:0], l_in[H-1:H-B]};   // R
  assign l_sel     = encrypt ? l_rot : l_in;            // Encrypt mux: 1 -> R(L)
  assign x         = l_sel ^ f;
  assign x_rot_inv = {x[B-1:0], x[H-1:B]};              // R^-1
  assign r_out     = encrypt ? x : x_rot_inv;           // lower mux: 0 -> R^-1
  assign l_out     = r_in;
endmodule
