// thc_decoder: iterative turbo Hadamard decoder built from M pipelined
// sub-decoders connected in a ring through FIWS interleavers.
//
// M code words are decoded together. Sub-decoder m always decodes component
// code m; the code words rotate: in stage t sub-decoder m works on code word
// (m - t) mod M, so all M sub-decoders are busy on different code words and a
// code word meets every component once in M stages (one iteration). A stage
// is a forward phase, K cycles in which every sub-decoder reads its input
// blocks, and a backward phase, in which the sub-decoders write their APP
// LLRs into the interleaver RAM of the next sub-decoder. In stage 0 the input
// is the channel LLR of the information bits, read from the receive buffer
// through the component's interleaving pattern; afterwards it comes from the
// interleaver RAM. Parity LLRs of component m are read from the receive
// buffer bank of the code word the sub-decoder works on. After I*M stages the
// interleaver RAM in front of sub-decoder m holds the final APP LLRs of code
// word m in natural order, and an output phase of K cycles reads them out as
// hard decisions (bit 1 where the LLR is negative), all M code words side by
// side.
//
// Interface: start (a full set of M code words is in the receive buffer);
// receive buffer read ports (rb_*); out_valid/out_k/out_bits[M] (R decided
// bits of block k of each code word, natural order); busy; stage (current
// stage, for observation).
// Timing: one stage takes K + 2R + K + 4 cycles; decoding M code words takes
// I*M stages plus K output cycles, about 2*I*M*K cycles as in the reference
// design's throughput estimate T = l*f/(2*I*K). The output phase is this
// design's own addition.
module thc_decoder
  import thc_pkg::*;
#(
  parameter int unsigned R      = 7,
  parameter int unsigned K      = 585,
  parameter int unsigned M      = 5,
  parameter int unsigned I      = 10,
  parameter int unsigned N_CH   = 6,
  parameter int unsigned N_FHT  = 10,
  parameter int unsigned N_BCJR = 7,
  parameter int unsigned N_DFHT = 10,
  parameter int unsigned LOG_FRAC = 5,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NP = (1 << R) - R,
  localparam int unsigned TW = $clog2(I * M + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   busy,
  // receive buffer read ports: bank c holds code word c
  output logic [KW-1:0]          rb_info_addr [M][R],
  input  logic signed [N_CH-1:0] rb_info_data [M][R],
  output logic [KW-1:0]          rb_par_addr,
  input  logic signed [N_CH-1:0] rb_par_data  [M][M][NP],
  // decisions
  output logic                   out_valid,
  output logic [KW-1:0]          out_k,
  output logic [R-1:0]           out_bits [M],
  output logic [TW-1:0]          stage
);
  typedef enum logic [1:0] {D_IDLE, D_FWD, D_BWD, D_OUT} dstate_e;
  dstate_e st;

  logic [KW-1:0]   k;
  logic [SW-1:0]   slot [M];

  logic                    sd_v;
  logic                    sd_first;
  logic signed [N_FHT-1:0] sd_lprev [M][R];
  logic signed [N_CH-1:0]  sd_par   [M][NP];
  logic                    sd_ov    [M];
  logic [KW-1:0]           sd_ok    [M];
  logic signed [N_FHT-1:0] sd_app   [M][R];
  logic                    sd_done  [M];
  logic signed [N_FHT-1:0] il_data  [M][R];
  logic [KW-1:0]           ch_addr  [M][R];

  assign sd_v     = (st == D_FWD);
  assign sd_first = (stage < TW'(M));
  assign rb_par_addr = k;
  assign busy = (st != D_IDLE);

  for (genvar m = 0; m < M; m++) begin : g_sd
    // channel information LLRs of code word m in component m's order (stage 0)
    fiws_addr #(.COMP(m), .R(R), .K(K)) u_cha (.k(k), .addr(ch_addr[m]));
    assign rb_info_addr[m] = ch_addr[m];

    always_comb begin
      for (int b = 0; b < int'(R); b++)
        sd_lprev[m][b] = (stage == '0) ? N_FHT'(rb_info_data[m][b]) : il_data[m][b];
      sd_par[m] = rb_par_data[slot[m]][m];
    end

    thc_subdecoder #(.R(R), .K(K), .M(M), .N_CH(N_CH), .N_FHT(N_FHT),
                     .N_BCJR(N_BCJR), .N_DFHT(N_DFHT), .LOG_FRAC(LOG_FRAC)) u_sd (
      .clk, .rst_n, .in_valid(sd_v), .in_first(sd_first), .in_slot(slot[m]),
      .in_lprev(sd_lprev[m]), .in_par(sd_par[m]),
      .out_valid(sd_ov[m]), .out_k(sd_ok[m]), .out_app(sd_app[m]), .done(sd_done[m]));

    // interleaver in front of sub-decoder m, written by sub-decoder m-1
    localparam int unsigned PREV = (m + M - 1) % M;
    fiws_interleaver #(.R(R), .K(K), .W(N_FHT), .WR_COMP(PREV), .RD_COMP(m)) u_il (
      .clk, .wr_en(sd_ov[PREV]), .wr_k(sd_ok[PREV]), .wr_data(sd_app[PREV]),
      .rd_k(k), .rd_natural(st == D_OUT), .rd_data(il_data[m]));

    always_ff @(posedge clk) begin
      for (int b = 0; b < int'(R); b++) out_bits[m][b] <= il_data[m][b][N_FHT-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= D_IDLE;
      k         <= '0;
      stage     <= '0;
      out_valid <= 1'b0;
      out_k     <= '0;
      for (int m = 0; m < int'(M); m++) slot[m] <= SW'(m);
    end else begin
      unique case (st)
        D_IDLE: if (start) begin
          st    <= D_FWD;
          k     <= '0;
          stage <= '0;
          for (int m = 0; m < int'(M); m++) slot[m] <= SW'(m);
        end
        D_FWD: begin
          if (k == KW'(K - 1)) begin
            k  <= '0;
            st <= D_BWD;
          end else k <= k + 1'b1;
        end
        D_BWD: if (sd_done[0]) begin
          for (int m = 0; m < int'(M); m++)
            slot[m] <= (slot[m] == '0) ? SW'(M - 1) : slot[m] - 1'b1;
          if (stage == TW'(I * M - 1)) begin
            st <= D_OUT;
          end else begin
            stage <= stage + 1'b1;
            st    <= D_FWD;
          end
        end
        D_OUT: begin
          if (k == KW'(K - 1)) begin
            k  <= '0;
            st <= D_IDLE;
          end else k <= k + 1'b1;
        end
        default: st <= D_IDLE;
      endcase
      out_valid <= (st == D_OUT);
      out_k     <= k;
    end
  end
endmodule
