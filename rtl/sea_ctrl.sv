// sea_ctrl: control part of the SEA loop architecture. It counts the rounds
// i = 1..NR, one per clock, and drives the data path's select signals:
//   not_state0 0 in round 1 (the input muxes take data_in / key_in), else 1;
//   half_exec  1 for i > floor(NR/2): the round function takes the left key half;
//   switch_o   1 in round floor(NR/2): the key halves are exchanged;
//   const_i    i for i <= floor(NR/2), NR - i afterwards (0 .. NR/2).
// Round 1 runs in the cycle start is high (outputs are combinational from
// start and the round counter); run is the register enable of the data path.
// done pulses in the cycle after round NR, when the result is in the
// registers, so one operation takes NR cycles from start to result. start is
// ignored while busy. The signal names come from the design; their round
// timing and the odd NR that makes decryption reuse the same schedule are
// this design's choice.
module sea_ctrl #(
  parameter int NR = 51,  // number of rounds, odd
  parameter int B  = 8    // width of Const_i
) (
  input  logic         clk,
  input  logic         rst_n,     // synchronous, active low
  input  logic         start,
  output logic         run,
  output logic         not_state0,
  output logic         half_exec,
  output logic         switch_o,
  output logic [B-1:0] const_i,
  output logic         busy,
  output logic         done
);
  localparam int HALF = NR / 2;
  localparam int RW   = $clog2(NR + 1);

  logic [RW-1:0] rnd_q;   // round executed in the current cycle while busy
  logic [RW-1:0] cur;

  assign run        = busy || start;
  assign cur        = busy ? rnd_q : RW'(1);
  assign not_state0 = busy;
  assign half_exec  = (cur > RW'(HALF));
  assign switch_o   = run && (cur == RW'(HALF));
  assign const_i    = (cur <= RW'(HALF)) ? B'(cur) : B'(RW'(NR) - cur);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      rnd_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (run) begin
        if (cur == RW'(NR)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          busy  <= 1'b1;
          rnd_q <= cur + RW'(1);
        end
      end
    end
  end
endmodule
