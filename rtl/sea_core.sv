// sea_core: SEA(n,b) block cipher, loop architecture: one round function and
// one key-schedule step, evaluated once per clock for NR rounds.
// Data path (left branch L, right branch R) and key path (KL, KR) each have an
// input multiplexer (NotState0: round 1 takes data_in / key_in directly), the
// combinational round (sea_round, sea_key_round) and a pair of registers fed
// back to the multiplexers. The Half Exec multiplexer gives the round function
// KR for the first floor(NR/2) rounds and KL afterwards; the key halves are
// exchanged in round floor(NR/2) (Switch) and the round constants run back down,
// so the round keys form a palindrome and decryption uses the same key
// schedule and the same key as encryption. After the last round the result is
// read out with its halves exchanged: data_out = {R, L}.
// Interface: pulse start with data_in, key_in and encrypt valid (upper half =
// left branch); busy is high while rounds run; done pulses NR cycles after
// start, with data_out valid from then until the next start.
// The architecture follows the design's loop-architecture figure; NR = 51, the
// half ordering and the handshake are this design's choices.
module sea_core #(
  parameter int N  = 48,  // block and key size n
  parameter int B  = 8,   // word size b
  parameter int NR = 51   // rounds, odd
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous, active low
  input  logic         start,
  input  logic         encrypt,    // 1 encrypt, 0 decrypt
  input  logic [N-1:0] data_in,
  input  logic [N-1:0] key_in,
  output logic [N-1:0] data_out,
  output logic         done,
  output logic         busy
);
  localparam int H = N / 2;

  logic         run, not_state0, half_exec, switch_i;
  logic [B-1:0] const_i;
  logic         enc_q;
  logic [H-1:0] l_q, r_q, kl_q, kr_q;
  logic [H-1:0] l_src, r_src, kl_src, kr_src, round_key;
  logic [H-1:0] l_nx, r_nx, kl_nx, kr_nx;
  logic         enc;

  sea_ctrl #(.NR(NR), .B(B)) u_ctrl (
    .clk, .rst_n, .start, .run, .not_state0, .half_exec,
    .switch_o(switch_i), .const_i, .busy, .done
  );

  // NotState0 input multiplexers
  assign l_src  = not_state0 ? l_q  : data_in[N-1:H];
  assign r_src  = not_state0 ? r_q  : data_in[H-1:0];
  assign kl_src = not_state0 ? kl_q : key_in[N-1:H];
  assign kr_src = not_state0 ? kr_q : key_in[H-1:0];
  assign enc    = not_state0 ? enc_q : encrypt;

  // Half Exec multiplexer: 0 -> KR, 1 -> KL
  assign round_key = half_exec ? kl_src : kr_src;

  sea_round #(.N(N), .B(B)) u_round (
    .l_in(l_src), .r_in(r_src), .key(round_key), .encrypt(enc),
    .l_out(l_nx), .r_out(r_nx)
  );

  sea_key_round #(.N(N), .B(B)) u_key (
    .kl_in(kl_src), .kr_in(kr_src), .const_i, .switch_i,
    .kl_out(kl_nx), .kr_out(kr_nx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l_q   <= '0;
      r_q   <= '0;
      kl_q  <= '0;
      kr_q  <= '0;
      enc_q <= 1'b1;
    end else if (run) begin
      l_q   <= l_nx;
      r_q   <= r_nx;
      kl_q  <= kl_nx;
      kr_q  <= kr_nx;
      enc_q <= enc;
    end
  end

  assign data_out = {r_q, l_q};
endmodule
