// thc_encoder: turbo Hadamard encoder for a set of M code words.
//
// For each code word: a generate phase of K cycles draws R message bits per
// cycle from the 102-stage LFSR (lfsr_prng), writes them as a row of the
// information RAM of the transmit buffer and keeps them in R window memories
// (one per information-bit column, depth K). An encode phase of K cycles then
// runs the M convolutional Hadamard component encoders side by side:
// component m reads its block k through FIWS pattern m (component 0 in
// natural order, the others interleaved within each window), and the M parity
// slices of row k are written to the parity RAM of the transmit buffer. Row
// address = code word * K + k, so the M code words of a set lie one after the
// other. The sequence of phases and the parallel component encoders are this
// design's reading of the reference encoder, whose block diagram is only
// summarised in words.
//
// Interface: start with set_ok (the transmit-buffer set may be written);
// write port wr_*; done pulses when all M code words are written;
// msg_valid/msg_bits show each message block as it is generated.
// Timing: 2K cycles per code word, 2MK per set (well below the MK*row/W_T
// cycles the transmitter needs for a set).
module thc_encoder
  import thc_pkg::*;
#(
  parameter int unsigned R = 7,
  parameter int unsigned K = 585,
  parameter int unsigned M = 5,
  parameter logic [101:0] SEED = 102'h2_5A5A_1234_5678_9ABC_DEF0_1357,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned AW = $clog2(M * K),
  localparam int unsigned NP = (1 << R) - R
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              wr_info_en,
  output logic              wr_par_en,
  output logic [AW-1:0]     wr_addr,
  output logic [R-1:0]      wr_info,
  output logic [M*NP-1:0]   wr_par,
  output logic              msg_valid,
  output logic [R-1:0]      msg_bits
);
  typedef enum logic [1:0] {E_IDLE, E_GEN, E_ENC} estate_e;
  estate_e st;

  logic [KW-1:0]          k;
  logic [$clog2(M+1)-1:0] cw;
  logic [AW-1:0]          base;
  logic                   win [R][K];
  logic [R-1:0]           prng_bits;
  logic                   gen;

  assign gen = (st == E_GEN);

  lfsr_prng #(.STEP(R), .SEED(SEED)) u_prng (
    .clk, .rst_n, .en(gen), .bits(prng_bits));

  always_ff @(posedge clk) begin
    if (gen) for (int b = 0; b < int'(R); b++) win[b][k] <= prng_bits[b];
  end

  for (genvar m = 0; m < M; m++) begin : g_comp
    logic [KW-1:0]  addr [R];
    logic [R-1:0]   d;
    logic [NP-1:0]  par;
    logic           q;
    fiws_addr #(.COMP(m), .R(R), .K(K)) u_pat (.k(k), .addr(addr));
    always_comb for (int b = 0; b < int'(R); b++) d[b] = win[b][addr[b]];
    conv_hadamard_enc #(.R(R)) u_enc (
      .clk, .rst_n, .init(st != E_ENC), .valid(st == E_ENC), .d(d), .par(par), .q(q));
    assign wr_par[m*NP +: NP] = par;
  end

  assign wr_info_en = gen;
  assign wr_par_en  = (st == E_ENC);
  assign wr_info    = prng_bits;
  assign wr_addr    = base + AW'(k);
  assign msg_valid  = gen;
  assign msg_bits   = prng_bits;
  assign busy       = (st != E_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= E_IDLE;
      k    <= '0;
      cw   <= '0;
      base <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        E_IDLE: if (start) begin
          st <= E_GEN; k <= '0; cw <= '0; base <= '0;
        end
        E_GEN: begin
          if (k == KW'(K - 1)) begin k <= '0; st <= E_ENC; end
          else k <= k + 1'b1;
        end
        E_ENC: begin
          if (k == KW'(K - 1)) begin
            k <= '0;
            if (cw == ($clog2(M+1))'(M - 1)) begin
              st <= E_IDLE; done <= 1'b1;
            end else begin
              cw <= cw + 1'b1; base <= base + AW'(K); st <= E_GEN;
            end
          end else k <= k + 1'b1;
        end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
