// thc_subdecoder: component (convolutional Hadamard) decoder of the turbo
// Hadamard decoder: FHT -> BCJR -> DFHT, plus the extrinsic memory.
//
// Forward phase, one block k per in_valid (k = 0 .. K-1 in the component's own
// order): the a priori LLR of information bit b is the APP LLR handed over by
// the previous sub-decoder minus the extrinsic LLR this sub-decoder produced
// for the same code word in the previous iteration (taken as 0 on the first
// pass, in_first). The R a priori LLRs go to code positions 2^b, the channel
// LLRs of q_k and the Hadamard parity bits to the other positions, and the
// 2^R-point FHT gives the correlations y[j]; y/2 is the log-likelihood of +h^j
// (-y/2 of -h^j), scaled with rounding into the log domain of 2^-LOG_FRAC nat
// per LSB.
// The BCJR unit takes the rows, and in the backward phase (k = K-1 .. 0)
// hands a/b pairs to the DFHT, whose output a_i - b_i is the APP LLR of code
// bit i. For the R information bits it is output (out_app, scaled back to
// 1/64 LLR units and saturated to N_FHT bits) and the extrinsic part, APP
// minus a priori, is written to the extrinsic memory (one area of K rows for
// each of the M code words that visit this sub-decoder).
//
// Interface: in_slot (code word slot, sampled with the first row of a
// phase), in_first, in_valid, in_lprev[R], in_par[2^R-R] (channel LLRs, parity
// position order of thc_pkg::par_pos) -> out_valid, out_k, out_app[R]; done
// pulses with the last output row.
// Timing: latency 2R + K + 2 cycles from the first input row to the first
// output row (block K-1), outputs in decreasing k, one per cycle; one code
// word occupies the sub-decoder for about 2K + 2R cycles, as in the reference
// design.
module thc_subdecoder
  import thc_pkg::*;
#(
  parameter int unsigned R      = 7,
  parameter int unsigned K      = 585,
  parameter int unsigned M      = 5,
  parameter int unsigned N_CH   = 6,
  parameter int unsigned N_FHT  = 10,
  parameter int unsigned N_BCJR = 7,
  parameter int unsigned N_DFHT = 10,
  parameter int unsigned LOG_FRAC = 5,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NP = (1 << R) - R
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_first,
  input  logic [SW-1:0]           in_slot,
  input  logic signed [N_FHT-1:0] in_lprev [R],
  input  logic signed [N_CH-1:0]  in_par   [NP],
  output logic                    out_valid,
  output logic [KW-1:0]           out_k,
  output logic signed [N_FHT-1:0] out_app  [R],
  output logic                    done
);
  localparam int N = 1 << R;
  localparam int WY = N_FHT + R;
  localparam int MSH = 7 - LOG_FRAC;   // y/2 nats = y/128 nats -> 2^-LOG_FRAC units
  localparam int LSH = 6 - LOG_FRAC;   // 2^-LOG_FRAC nat -> 1/64 LLR units

  logic signed [N_FHT-1:0] ext_ram [M*K][R];
  logic signed [N_FHT-1:0] apr_ram [K][R];

  logic [KW-1:0]           kf;
  logic [SW-1:0]           slot;
  logic signed [N_FHT-1:0] apr    [R];
  logic signed [N_FHT-1:0] fht_x  [N];
  logic                    fht_v;
  logic signed [WY-1:0]    fht_y  [N];
  logic [KW-1:0]           fht_k;
  logic signed [WY-1:0]    m_row [N];
  logic                    bc_v, bc_busy, bc_done;
  logic signed [N_DFHT:0]  bc_a  [N];
  logic signed [N_DFHT:0]  bc_b  [N];
  logic [KW-1:0]           bc_k;
  logic                    df_v;
  logic signed [N_DFHT:0]  df_a  [N];
  logic signed [N_DFHT:0]  df_b  [N];
  logic [KW-1:0]           df_k;
  logic [SW-1:0]           cur_slot;

  // slot is sampled with row 0 and held for the backward phase
  assign cur_slot = (kf == '0) ? in_slot : slot;

  always_comb begin
    for (int b = 0; b < int'(R); b++) begin
      int e;
      e = in_first ? 0 : int'(ext_ram[int'(cur_slot) * K + int'(kf)][b]);
      apr[b] = N_FHT'(sat(int'(in_lprev[b]) - e, N_FHT));
    end
    for (int b = 0; b < int'(R); b++) fht_x[1 << b] = apr[b];
    for (int i = 0; i < int'(NP); i++) fht_x[par_pos(i, R)] = N_FHT'(in_par[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kf   <= '0;
      slot <= '0;
    end else if (in_valid) begin
      if (kf == '0) slot <= in_slot;
      kf <= (kf == KW'(K - 1)) ? '0 : kf + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) apr_ram[kf] <= apr;
  end

  fht #(.R(R), .W_IN(N_FHT), .TAG_W(KW)) u_fht (
    .clk, .rst_n, .in_valid(in_valid), .in_x(fht_x), .in_tag(kf),
    .out_valid(fht_v), .out_y(fht_y), .out_tag(fht_k));

  always_comb begin
    // rounded scaling of the correlation into the log domain
    for (int j = 0; j < N; j++)
      m_row[j] = WY'((int'(fht_y[j]) + (1 <<< (MSH - 1))) >>> MSH);
  end

  thc_bcjr #(.R(R), .K(K), .WM(WY), .NB(N_BCJR), .ND(N_DFHT), .LOG_FRAC(LOG_FRAC)) u_bcjr (
    .clk, .rst_n, .in_valid(fht_v), .in_m(m_row),
    .out_valid(bc_v), .out_a(bc_a), .out_b(bc_b), .out_k(bc_k),
    .busy(bc_busy), .done(bc_done));

  dfht #(.R(R), .W(N_DFHT + 1), .LOG_FRAC(LOG_FRAC), .TAG_W(KW)) u_dfht (
    .clk, .rst_n, .in_valid(bc_v), .in_a(bc_a), .in_b(bc_b), .in_tag(bc_k),
    .out_valid(df_v), .out_a(df_a), .out_b(df_b), .out_tag(df_k));

  // APP LLRs of the information bits and extrinsic write-back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_k     <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= df_v;
      out_k     <= df_k;
      done      <= df_v && (df_k == '0);
    end
  end

  always_ff @(posedge clk) begin
    if (df_v) begin
      for (int b = 0; b < int'(R); b++) begin
        int l;
        l = sat((int'(df_a[1 << b]) - int'(df_b[1 << b])) <<< LSH, N_FHT);
        out_app[b] <= N_FHT'(l);
        ext_ram[int'(slot) * K + int'(df_k)][b] <= N_FHT'(sat(l - int'(apr_ram[df_k][b]), N_FHT));
      end
    end
  end
endmodule
