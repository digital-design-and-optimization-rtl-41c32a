// lfsr_prng: pseudo-random bit generator built from a 102-stage linear
// feedback shift register with feedback polynomial 1 + x^35 + x^36 + x^101 + x^102
// (the register length and polynomial are those of the reference design).
//
// Fibonacci form: each shift produces the new bit s[101]^s[100]^s[35]^s[34]
// and moves it into s[0]. STEP shifts are unrolled per enabled clock cycle
// and the STEP new bits are presented on `bits` (bits[0] is the oldest), so
// one instance delivers a whole r-bit message block, or a 16-bit random
// integer for the noise generator, per cycle. The number of bits per cycle and
// the seed are this design's choices.
//
// Interface: en advances the register; bits is combinational from the state
// and shows the bits the next enabled edge will commit.
// Timing: one STEP-bit word per enabled cycle, no latency.
module lfsr_prng #(
  parameter int unsigned STEP = 7,
  parameter logic [101:0] SEED = 102'h2_5A5A_1234_5678_9ABC_DEF0_1357
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  output logic [STEP-1:0] bits
);
  logic [101:0] state, nxt;

  always_comb begin
    logic [101:0] s;
    s = state;
    for (int i = 0; i < int'(STEP); i++) begin
      bits[i] = s[101] ^ s[100] ^ s[35] ^ s[34];
      s = {s[100:0], bits[i]};
    end
    nxt = s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= (SEED == '0) ? 102'd1 : SEED;
    else if (en) state <= nxt;
  end
endmodule
