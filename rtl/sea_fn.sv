// sea_fn: the nonlinear core shared by the SEA round function and key
// schedule: f = r(S(x [+] y)) on an n/2-bit branch of nb = n/(2b) words.
//   [+] word-wise addition mod 2^b, nb b-bit adders with no carry between them;
//   S   the 3-bit S-box applied bit-sliced to each group of three words;
//   r   bit rotation: word 3i rotated right by one bit, word 3i+1 unchanged,
//       word 3i+2 rotated left by one bit.
// Word 0 is the least significant b bits. Purely combinational. The
// operations follow the design description; the bit order inside the S-box
// groups and the reading of the rotation directions are this design's.
module sea_fn
  import sea_pkg::*;
#(
  parameter int N = 48,  // block and key size n
  parameter int B = 8    // word size b (n must be a multiple of 6b)
) (
  input  logic [N/2-1:0] x,
  input  logic [N/2-1:0] y,
  output logic [N/2-1:0] f
);
  localparam int NB = N / (2 * B);

  // SEA requires n to be a multiple of 6b (three words per S-box group and
  // branch); the rotations also need b >= 2.
  if (N % (6 * B) != 0 || B < 2) begin : g_bad_size
    $error("sea_fn: N must be a multiple of 6*B and B at least 2");
  end

  logic [NB-1:0][B-1:0] xw, yw, sum, sb, rot;
  logic [2:0]           v;

  assign xw = x;
  assign yw = y;

  always_comb begin
    for (int i = 0; i < NB; i++) sum[i] = xw[i] + yw[i];
    sb = sum;
    v  = '0;
    for (int t = 0; t < NB / 3; t++)
      for (int j = 0; j < B; j++) begin
        v = sea_sbox3({sum[3*t+2][j], sum[3*t+1][j], sum[3*t][j]});
        sb[3*t][j]   = v[0];
        sb[3*t+1][j] = v[1];
        sb[3*t+2][j] = v[2];
      end
    rot = sb;
    for (int t = 0; t < NB / 3; t++) begin
      rot[3*t]   = {sb[3*t][0], sb[3*t][B-1:1]};         // >>> 1
      rot[3*t+2] = {sb[3*t+2][B-2:0], sb[3*t+2][B-1]};   // <<< 1
    end
  end

  assign f = rot;
endmodule
