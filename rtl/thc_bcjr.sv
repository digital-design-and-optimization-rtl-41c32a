// thc_bcjr: 2-state BCJR processor of a turbo Hadamard component decoder, in
// the log domain (max* arithmetic).
//
// Trellis: the state S_k is the recursive convolutional encoder state
// q_(k-1). Code word +/-h^j of block k lies on the branch S_k -> S_(k+1) with
//   q   = 1 for -h^j, 0 for +h^j            (S_(k+1) = q)
//   q'  = parity(j) ^ (q & R odd)           (single parity check of d_k)
//   S_k = q' ^ q
// Every branch holds 2^(R-1) code words. As in the reference design the
// branch metric is not their log-sum but the largest log-likelihood on the
// branch, B(S,S') = max over the branch of (+/-)m[j], m being the FHT output
// taken into the log domain.
//
// Forward phase: K metric rows arrive (one per in_valid, block 0 first). For
// each the unit stores the row, its four branch metrics and alpha_k, and
// updates alpha_(k+1)(S') = max*_S(alpha_k(S) + B(S,S')), alpha_0 = (0, -inf).
// Backward phase (starts by itself after the K-th row): for k = K-1 .. 0 it
// emits one row per cycle of DFHT inputs
//   a_j = m[j]  + alpha_k(S(+h^j)) + beta_(k+1)(0)
//   b_j = -m[j] + alpha_k(S(-h^j)) + beta_(k+1)(1)
// and updates beta_k(S) = max*_S'(B(S,S') + beta_(k+1)(S')), beta_K = (0, 0)
// (the final state is not terminated). alpha and beta are normalised so that
// the larger of the two is 0 and keep NB bits of magnitude (NB = N_BCJR, the
// smaller saturates at -(2^NB - 1)). Each output row is normalised the same
// way, by its largest a or b, and keeps ND bits of magnitude (ND = N_DFHT).
// Log-domain LSB: 2^-LOG_FRAC nat.
//
// Interface: in_valid/in_m (forward input), out_valid/out_a/out_b/out_k
// (backward output, registered), busy, done (one-cycle pulse after row 0).
// Timing: K cycles forward, then K cycles backward, one row per cycle; the
// first backward row is valid from the clock edge after the one that took
// the last forward row.
module thc_bcjr
  import thc_pkg::*;
#(
  parameter int unsigned R  = 7,
  parameter int unsigned K  = 585,
  parameter int unsigned WM = 16,   // width of the incoming code-word metrics
  parameter int unsigned NB = 7,    // alpha/beta magnitude bits (N_BCJR)
  parameter int unsigned ND = 10,   // output magnitude bits (N_DFHT)
  parameter int unsigned LOG_FRAC = 5,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [WM-1:0] in_m  [1<<R],
  output logic                 out_valid,
  output logic signed [ND:0]   out_a [1<<R],
  output logic signed [ND:0]   out_b [1<<R],
  output logic [KW-1:0]        out_k,
  output logic                 busy,
  output logic                 done
);
  localparam int N = 1 << R;
  localparam int NEG  = -((1 <<< NB) - 1);
  localparam int DNEG = -((1 <<< ND) - 1);
  localparam bit RODD = (R % 2) == 1;
  localparam jac_t JT = jac_table(LOG_FRAC);

  typedef logic signed [NB:0]   st_t [2];
  typedef logic signed [WM:0]   bm_t [4];   // index {S, S'}

  function automatic int mstar(input int a, input int b);
    int d;
    d = (a > b) ? a - b : b - a;
    return ((a > b) ? a : b) + ((d < JAC_N) ? JT[d] : 0);
  endfunction

  function automatic int floor_at(input int v, input int lo);
    return (v < lo) ? lo : v;
  endfunction

  typedef enum logic [1:0] {S_FWD, S_BWD} phase_e;
  phase_e phase;

  logic signed [WM-1:0] m_ram [K][N];
  bm_t                 b_ram [K];
  st_t                 a_ram [K];

  st_t     alpha, beta, alpha_nxt, beta_nxt;
  bm_t     bm_in;
  logic [KW-1:0] kf, kb;

  // state S_k of code word (q, j)
  function automatic logic s_of(input int j, input logic q);
    return (^(R'(j))) ^ (q & RODD) ^ q;
  endfunction

  // branch metrics of the incoming row
  always_comb begin
    int best [4];
    for (int b = 0; b < 4; b++) best[b] = -(1 <<< WM);
    for (int j = 0; j < N; j++) begin
      for (int q = 0; q < 2; q++) begin
        int v, idx;
        v   = q ? -int'(in_m[j]) : int'(in_m[j]);
        idx = {s_of(j, q[0]), q[0]};
        if (v > best[idx]) best[idx] = v;
      end
    end
    for (int b = 0; b < 4; b++) bm_in[b] = (WM+1)'(best[b]);
  end

  // alpha update with the incoming branch metrics
  always_comb begin
    int t [2];
    int mx;
    for (int sp = 0; sp < 2; sp++)
      t[sp] = mstar(int'(alpha[0]) + int'(bm_in[{1'b0, sp[0]}]),
                       int'(alpha[1]) + int'(bm_in[{1'b1, sp[0]}]));
    mx = (t[0] > t[1]) ? t[0] : t[1];
    for (int sp = 0; sp < 2; sp++) alpha_nxt[sp] = (NB+1)'(floor_at(t[sp] - mx, NEG));
  end

  // beta update with the stored branch metrics of block kb
  always_comb begin
    int t [2];
    int mx;
    bm_t bk;
    bk = b_ram[kb];
    for (int s = 0; s < 2; s++)
      t[s] = mstar(int'(bk[{s[0], 1'b0}]) + int'(beta[0]),
                      int'(bk[{s[0], 1'b1}]) + int'(beta[1]));
    mx = (t[0] > t[1]) ? t[0] : t[1];
    for (int s = 0; s < 2; s++) beta_nxt[s] = (NB+1)'(floor_at(t[s] - mx, NEG));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= S_FWD;
      kf        <= '0;
      kb        <= '0;
      alpha[0]  <= '0;
      alpha[1]  <= (NB+1)'(NEG);
      beta[0]   <= '0;
      beta[1]   <= '0;
      out_valid <= 1'b0;
      out_k     <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (phase)
        S_FWD: if (in_valid) begin
          alpha <= alpha_nxt;
          if (kf == KW'(K - 1)) begin
            kf    <= '0;
            kb    <= KW'(K - 1);
            phase <= S_BWD;
            beta[0] <= '0;
            beta[1] <= '0;
          end else begin
            kf <= kf + 1'b1;
          end
        end
        S_BWD: begin
          out_valid <= 1'b1;
          out_k     <= kb;
          beta      <= beta_nxt;
          if (kb == '0) begin
            phase    <= S_FWD;
            done     <= 1'b1;
            alpha[0] <= '0;
            alpha[1] <= (NB+1)'(NEG);
          end else begin
            kb <= kb - 1'b1;
          end
        end
        default: phase <= S_FWD;
      endcase
    end
  end

  // storage of the forward pass
  always_ff @(posedge clk) begin
    if (phase == S_FWD && in_valid) begin
      m_ram[kf] <= in_m;
      b_ram[kf] <= bm_in;
      a_ram[kf] <= alpha;
    end
  end

  // backward outputs, normalised by the largest value of the row
  always_ff @(posedge clk) begin
    if (phase == S_BWD) begin
      st_t ak;
      int  ra [N];
      int  rb [N];
      int  mx;
      ak = a_ram[kb];
      mx = -(1 <<< 30);
      for (int j = 0; j < N; j++) begin
        ra[j] = int'(m_ram[kb][j]) + int'(ak[s_of(j, 1'b0)]) + int'(beta[0]);
        rb[j] = -int'(m_ram[kb][j]) + int'(ak[s_of(j, 1'b1)]) + int'(beta[1]);
        if (ra[j] > mx) mx = ra[j];
        if (rb[j] > mx) mx = rb[j];
      end
      for (int j = 0; j < N; j++) begin
        out_a[j] <= (ND+1)'(floor_at(ra[j] - mx, DNEG));
        out_b[j] <= (ND+1)'(floor_at(rb[j] - mx, DNEG));
      end
    end
  end

  assign busy = (phase == S_BWD) || (kf != '0);
endmodule
