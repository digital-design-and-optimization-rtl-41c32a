// thc_system: turbo Hadamard encoder / channel / decoder system on one chip.
//
// A turbo Hadamard code (order-R Hadamard codes behind a single parity check
// and a 2-state recursive convolutional code, M interleaved components)
// reaches a bit error rate of 1e-5 within about 1.1 dB of the ultimate
// Shannon limit (-1.59 dB). This top wires the complete test system:
//   thc_encoder  : LFSR message source + M component encoders
//   tx_buffer    : two sets of info/parity RAMs, M code words each
//   thc_transmitter : W_T code bits per cycle
//   awgn_channel : LFSR + table noise model giving N_CH-bit LLRs
//   rx_buffer    : two sets of channel-LLR RAMs
//   thc_decoder  : M sub-decoders (FHT, BCJR, DFHT) in a ring with FIWS
//                  interleavers, I iterations, hard decisions
// Sets of M code words stream through: the encoder fills one transmit set
// while the other is sent; the decoder decodes one receive set while the
// next is received. Decisions leave on out_* in natural order, M code words
// side by side, block by block; msg_* shows the message bits as generated
// (code word order within a set, block order), for comparison.
//
// Parameters default to the reference configuration with M = 5 (code length
// 358020, rate 0.0114): R = 7, K = 585, I = 10, N_CH = 6, N_FHT = 10,
// N_BCJR = 7, N_DFHT = 10. W_T = 18 bits per cycle is this design's choice
// (it divides the 612-bit row and keeps the transmitter slower than the
// decoder, 34 cycles per row against about 2*I = 20).
//
// Interface: run lets the encoder start new sets; overflow flags a receive
// set arriving before the decoder released it.
module thc_system
  import thc_pkg::*;
#(
  parameter int unsigned R       = 7,
  parameter int unsigned K       = 585,
  parameter int unsigned M       = 5,
  parameter int unsigned I       = 10,
  parameter int unsigned W_T     = 18,
  parameter int unsigned N_CH    = 6,
  parameter int unsigned N_FHT   = 10,
  parameter int unsigned N_BCJR  = 7,
  parameter int unsigned N_DFHT  = 10,
  parameter int unsigned LOG_FRAC = 5,
  parameter real         EBN0_DB = -0.45,
  parameter logic [101:0] SEED   = 102'h2_5A5A_1234_5678_9ABC_DEF0_1357,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned AW = $clog2(M * K),
  localparam int unsigned NP = (1 << R) - R,
  localparam int unsigned TW = $clog2(I * M + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   run,
  // message bits as generated
  output logic                   msg_valid,
  output logic [R-1:0]           msg_bits,
  // channel observation
  output logic                   tx_valid,
  output logic [W_T-1:0]         tx_bits,
  output logic                   ch_valid,
  output logic signed [N_CH-1:0] ch_llr [W_T],
  // decisions
  output logic                   out_valid,
  output logic [KW-1:0]          out_k,
  output logic [R-1:0]           out_bits [M],
  output logic                   dec_busy,
  output logic [TW-1:0]          dec_stage,
  output logic                   overflow,
  output logic [15:0]            sets_received
);
  logic            enc_start, enc_busy, enc_done;
  logic            wr_info_en, wr_par_en;
  logic [AW-1:0]   wr_addr, rd_addr;
  logic [R-1:0]    wr_info, rd_info;
  logic [M*NP-1:0] wr_par, rd_par;
  logic            enc_ok, enc_set, tx_ok, tx_set;
  logic            tx_start, tx_busy, tx_done;
  logic            dec_start;
  logic [KW-1:0]   info_addr [M][R];
  logic signed [N_CH-1:0] info_data [M][R];
  logic [KW-1:0]   par_addr;
  logic signed [N_CH-1:0] par_data [M][M][NP];

  assign enc_start = run && enc_ok && !enc_busy && !enc_done;
  assign tx_start  = tx_ok && !tx_busy && !tx_done;

  thc_encoder #(.R(R), .K(K), .M(M), .SEED(SEED)) u_enc (
    .clk, .rst_n, .start(enc_start), .busy(enc_busy), .done(enc_done),
    .wr_info_en, .wr_par_en, .wr_addr, .wr_info, .wr_par,
    .msg_valid, .msg_bits);

  tx_buffer #(.R(R), .K(K), .M(M)) u_txb (
    .clk, .rst_n, .enc_ok, .enc_set, .enc_done,
    .wr_info_en, .wr_par_en, .wr_addr, .wr_info, .wr_par,
    .tx_ok, .tx_set, .tx_done, .rd_addr, .rd_info, .rd_par);

  thc_transmitter #(.R(R), .K(K), .M(M), .W_T(W_T)) u_tx (
    .clk, .rst_n, .start(tx_start), .busy(tx_busy), .done(tx_done),
    .rd_addr, .rd_info, .rd_par, .tx_valid, .tx_bits);

  awgn_channel #(.R(R), .M(M), .W_T(W_T), .N_CH(N_CH), .EBN0_DB(EBN0_DB)) u_ch (
    .clk, .rst_n, .in_valid(tx_valid), .in_bits(tx_bits),
    .out_valid(ch_valid), .out_llr(ch_llr));

  rx_buffer #(.R(R), .K(K), .M(M), .W_T(W_T), .N_CH(N_CH)) u_rxb (
    .clk, .rst_n, .in_valid(ch_valid), .in_llr(ch_llr),
    .dec_start, .dec_busy, .info_addr, .info_data, .par_addr, .par_data,
    .overflow, .sets_done(sets_received));

  thc_decoder #(.R(R), .K(K), .M(M), .I(I), .N_CH(N_CH), .N_FHT(N_FHT),
                .N_BCJR(N_BCJR), .N_DFHT(N_DFHT), .LOG_FRAC(LOG_FRAC)) u_dec (
    .clk, .rst_n, .start(dec_start), .busy(dec_busy),
    .rb_info_addr(info_addr), .rb_info_data(info_data),
    .rb_par_addr(par_addr), .rb_par_data(par_data),
    .out_valid, .out_k, .out_bits, .stage(dec_stage));
endmodule
