// fht: pipelined fast Hadamard transform of order R, y = H x with H the
// 2^R x 2^R Sylvester Hadamard matrix.
//
// R butterfly stages, one per clock, each registered. Stage t pairs the
// elements p and p + 2^t (bit t of p clear) and produces (x_p + x_p', x_p - x_p').
// One bit is added to the word width at every stage so nothing overflows: a
// W_IN-bit input gives a (W_IN + R)-bit output, as in the reference design.
// A tag (for example the block index k) travels alongside the data.
//
// Interface: in_valid/in_x/in_tag -> out_valid/out_y/out_tag.
// Timing: fully pipelined, one transform per cycle, latency R cycles.
module fht #(
  parameter int unsigned R     = 7,
  parameter int unsigned W_IN  = 10,
  parameter int unsigned TAG_W = 10
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic signed [W_IN-1:0]         in_x   [1<<R],
  input  logic [TAG_W-1:0]               in_tag,
  output logic                           out_valid,
  output logic signed [W_IN+R-1:0]       out_y  [1<<R],
  output logic [TAG_W-1:0]               out_tag
);
  localparam int N = 1 << R;
  localparam int WO = W_IN + R;

  // stage registers, all kept at the output width (sign-extended)
  logic signed [WO-1:0] st  [R+1][N];
  logic                 vld [R+1];
  logic [TAG_W-1:0]     tag [R+1];

  always_comb begin
    for (int i = 0; i < N; i++) st[0][i] = WO'(in_x[i]);
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
          st[t+1][p]            <= st[t][p] + st[t][p + (1 << t)];
          st[t+1][p + (1 << t)] <= st[t][p] - st[t][p + (1 << t)];
        end
      end
    end
  end

  assign out_valid = vld[R];
  assign out_tag   = tag[R];
  always_comb for (int i = 0; i < N; i++) out_y[i] = st[R][i];
endmodule
