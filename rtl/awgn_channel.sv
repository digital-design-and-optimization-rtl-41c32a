// awgn_channel: hardware model of a BPSK/AWGN channel that outputs the
// quantised channel LLRs seen by the receiver.
//
// Code bit 0 is sent as +1 and bit 1 as -1; the noise variance is
// sigma^2 = 1/(2 * rc * Eb/N0), with rc the code rate r/(r + M(2^r - r)) and
// Eb/N0 = EBN0_DB in dB. The LLR 2x/sigma^2 is clipped to (-0.5, 0.5) and
// quantised linearly to N_CH bits with a step of 1/64: 2^N_CH - 1 levels
// -31/64 .. 31/64 for N_CH = 6. For each of the W_T bits per cycle an
// independent 102-stage LFSR supplies an F_BITS-bit uniform integer f, and a
// lookup table maps f to the level: the table holds the cumulative
// probability of each level boundary for a transmitted +1, scaled to 2^F_BITS,
// and the level is the number of boundaries at or below f. For a transmitted
// -1 the level is negated (the noise is symmetric). The table is computed at
// elaboration from the Gaussian distribution (erf by the Abramowitz-Stegun
// 7.1.26 approximation), so it follows EBN0_DB and the code parameters. The
// method (LFSR integers mapped through a precomputed table) is that of the
// reference design; the table width F_BITS and the LFSR seeds are this
// design's choices.
//
// Interface: in_valid/in_bits[W_T] -> out_valid/out_llr[W_T] (signed N_CH).
// Timing: one word per cycle, latency 1 cycle.
module awgn_channel #(
  parameter int unsigned R       = 7,
  parameter int unsigned M       = 5,
  parameter int unsigned W_T     = 18,
  parameter int unsigned N_CH    = 6,
  parameter int unsigned F_BITS  = 16,
  parameter real         EBN0_DB = -0.45
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [W_T-1:0]         in_bits,
  output logic                   out_valid,
  output logic signed [N_CH-1:0] out_llr [W_T]
);
  localparam int LEV  = (1 << N_CH) - 1;      // number of levels
  localparam int HALF = (1 << (N_CH - 1)) - 1; // largest level index (31)
  localparam int NTH  = LEV - 1;               // level boundaries

  typedef logic [F_BITS:0] thr_t [NTH];

  function automatic real phi(input real x);
    real t, y, z;
    z = (x < 0.0) ? -x : x;
    z = z / 1.4142135623730951;
    t = 1.0 / (1.0 + 0.3275911 * z);
    y = 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t
                - 0.284496736) * t + 0.254829592) * t * $exp(-z * z);
    return (x < 0.0) ? 0.5 * (1.0 - y) : 0.5 * (1.0 + y);
  endfunction

  function automatic thr_t make_thr();
    thr_t th;
    real rc, ebn0, sig2, sig, llr_b, n_b;
    rc   = real'(R) / real'(R + M * ((1 << R) - R));
    ebn0 = 10.0 ** (EBN0_DB / 10.0);
    sig2 = 1.0 / (2.0 * rc * ebn0);
    sig  = $sqrt(sig2);
    for (int v = 0; v < NTH; v++) begin
      // boundary between level v-HALF and v-HALF+1, in LLR units
      llr_b = (real'(v - HALF) + 0.5) / 64.0;
      // LLR = 2(1+n)/sigma^2 < llr_b  <=>  n < llr_b*sigma^2/2 - 1
      n_b   = llr_b * sig2 / 2.0 - 1.0;
      th[v] = (F_BITS + 1)'($rtoi(phi(n_b / sig) * real'(1 << F_BITS) + 0.5));
    end
    return th;
  endfunction

  localparam thr_t THR = make_thr();

  for (genvar l = 0; l < W_T; l++) begin : g_lane
    logic [F_BITS-1:0] f;
    lfsr_prng #(.STEP(F_BITS),
                .SEED(102'h3_1415_9265_3589_7932_3846_2643 ^ (102'(l + 1) * 102'h9E37_79B9_7F4A_7C15)))
      u_rng (.clk, .rst_n, .en(in_valid), .bits(f));

    always_ff @(posedge clk) begin
      if (in_valid) begin
        int lvl;
        lvl = 0;
        for (int v = 0; v < NTH; v++) if ({1'b0, f} >= THR[v]) lvl++;
        lvl = lvl - HALF;
        out_llr[l] <= N_CH'(in_bits[l] ? -lvl : lvl);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
