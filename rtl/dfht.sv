// dfht: pipelined dual fast Hadamard transform (APP-FHT) of order R in the
// log domain.
//
// Each of the 2^R lanes carries a pair (a, b) of log-probabilities. At the
// input, lane j holds a = log weight of code word +h^j and b = log weight of
// -h^j. Stage t pairs lanes p and p' = p + 2^t (bit t of p clear) and forms
//   lane p : (a_p (+) a_p', b_p (+) b_p')
//   lane p': (a_p (+) b_p', b_p (+) a_p')
// where (+) is the max* operator (Jacobian logarithm with a correction
// table for 2^-LOG_FRAC nat per LSB). After R stages lane i holds a_i = log sum of the weights of all code
// words with bit i = 0 (+1) and b_i = the same for bit i = 1 (-1), so the a
// posteriori LLR of code bit i is a_i - b_i: a subtraction instead of a
// division. Values saturate to W bits at every stage. This follows the
// reference design's log-quantised APP-FHT; the butterfly wiring above and
// the saturation are this design's reading of it.
//
// Interface: in_valid/in_a/in_b/in_tag -> out_valid/out_a/out_b/out_tag.
// Timing: fully pipelined, one transform per cycle, latency R cycles.
module dfht
  import thc_pkg::*;
#(
  parameter int unsigned R     = 7,
  parameter int unsigned W        = 11,
  parameter int unsigned LOG_FRAC = 5,
  parameter int unsigned TAG_W    = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_a  [1<<R],
  input  logic signed [W-1:0]  in_b  [1<<R],
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 out_valid,
  output logic signed [W-1:0]  out_a [1<<R],
  output logic signed [W-1:0]  out_b [1<<R],
  output logic [TAG_W-1:0]     out_tag
);
  localparam int N = 1 << R;
  localparam jac_t JT = jac_table(LOG_FRAC);

  function automatic int mstar(input int a, input int b);
    int d;
    d = (a > b) ? a - b : b - a;
    return ((a > b) ? a : b) + ((d < JAC_N) ? JT[d] : 0);
  endfunction

  logic signed [W-1:0] sa  [R+1][N];
  logic signed [W-1:0] sb  [R+1][N];
  logic                vld [R+1];
  logic [TAG_W-1:0]    tag [R+1];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      sa[0][i] = in_a[i];
      sb[0][i] = in_b[i];
    end
    vld[0] = in_valid;
    tag[0] = in_tag;
  end

  for (genvar t = 0; t < R; t++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[t+1] <= 1'b0;
      else        vld[t+1] <= vld[t];
    end
    always_ff @(posedge clk) begin
      tag[t+1] <= tag[t];
      for (int p = 0; p < N; p++) begin
        if (((p >> t) & 1) == 0) begin
          sa[t+1][p]            <= W'(sat(mstar(int'(sa[t][p]), int'(sa[t][p + (1 << t)])), W));
          sb[t+1][p]            <= W'(sat(mstar(int'(sb[t][p]), int'(sb[t][p + (1 << t)])), W));
          sa[t+1][p + (1 << t)] <= W'(sat(mstar(int'(sa[t][p]), int'(sb[t][p + (1 << t)])), W));
          sb[t+1][p + (1 << t)] <= W'(sat(mstar(int'(sb[t][p]), int'(sa[t][p + (1 << t)])), W));
        end
      end
    end
  end

  assign out_valid = vld[R];
  assign out_tag   = tag[R];
  always_comb begin
    for (int i = 0; i < N; i++) begin
      out_a[i] = sa[R][i];
      out_b[i] = sb[R][i];
    end
  end
endmodule
