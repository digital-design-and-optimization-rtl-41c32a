// rx_buffer: receiver of the turbo Hadamard system: collects the channel
// LLRs into rows and keeps them in two ping-pong buffer sets.
//
// Words of W_T N_CH-bit LLRs arrive in the transmitter's order; ROW/W_T words
// make one row (R information LLRs, then M parity slices of 2^R - R LLRs).
// Row n of a set belongs to code word n / K, block n mod K. Each set is split
// into M banks, one per code word, so that all M sub-decoders can read at
// the same time; in a bank the information LLRs are kept in R window RAMs
// (one per bit column, addressed separately so a sub-decoder can read its
// interleaved block in one cycle) and the parity LLRs of all M components in
// one RAM row. While the decoder works on one set the other is filled; when
// a set is complete, dec_start pulses (once the decoder is idle) and the
// decoder reads that set until dec_busy falls. overflow is raised if a row
// arrives for a set that the decoder has not yet released. The storage
// arrangement follows the reference design; the bank split, the handshake
// and the overflow flag are this design's choices.
//
// Interface: in_valid/in_llr[W_T]; decoder side dec_start, dec_busy and the
// read ports info_addr/info_data, par_addr/par_data; overflow; sets_done
// counts completed sets.
// Timing: writes at the clock edge, asynchronous reads.
module rx_buffer #(
  parameter int unsigned R    = 7,
  parameter int unsigned K    = 585,
  parameter int unsigned M    = 5,
  parameter int unsigned W_T  = 18,
  parameter int unsigned N_CH = 6,
  localparam int unsigned KW  = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned NP  = (1 << R) - R,
  localparam int unsigned ROW = R + M * NP
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [N_CH-1:0] in_llr [W_T],
  output logic                   dec_start,
  input  logic                   dec_busy,
  input  logic [KW-1:0]          info_addr [M][R],
  output logic signed [N_CH-1:0] info_data [M][R],
  input  logic [KW-1:0]          par_addr,
  output logic signed [N_CH-1:0] par_data  [M][M][NP],
  output logic                   overflow,
  output logic [15:0]            sets_done
);
  localparam int unsigned NW = ROW / W_T;
  localparam int unsigned CW = (NW > 1) ? $clog2(NW) : 1;
  localparam int unsigned BW = (M > 1) ? $clog2(M) : 1;

  logic signed [N_CH-1:0] info_ram [2][M][R][K];
  logic signed [N_CH-1:0] par_ram  [2][M][K][M][NP];

  logic signed [N_CH-1:0] row [ROW];
  logic [CW-1:0] wcnt;
  logic [KW-1:0] blk;
  logic [BW-1:0] bank;
  logic          wset, dset;
  logic [1:0]    full;
  logic          pending, dec_active;
  logic          row_done;

  assign row_done = in_valid && (wcnt == CW'(NW - 1));

  // assemble a row; the last word completes it in the same cycle
  always_ff @(posedge clk) begin
    if (in_valid)
      for (int i = 0; i < int'(W_T); i++) row[int'(wcnt) * W_T + i] <= in_llr[i];
  end

  always_ff @(posedge clk) begin
    if (row_done) begin
      for (int b = 0; b < int'(R); b++)
        info_ram[wset][bank][b][blk] <= (NW == 1 || b >= int'(wcnt) * W_T) ?
                                        in_llr[b - int'(wcnt) * W_T] : row[b];
      for (int m = 0; m < int'(M); m++)
        for (int i = 0; i < int'(NP); i++) begin
          int p;
          p = R + m * NP + i;
          par_ram[wset][bank][blk][m][i] <= (p >= int'(wcnt) * W_T) ?
                                            in_llr[p - int'(wcnt) * W_T] : row[p];
        end
    end
  end

  always_comb begin
    for (int c = 0; c < int'(M); c++) begin
      for (int b = 0; b < int'(R); b++) info_data[c][b] = info_ram[dset][c][b][info_addr[c][b]];
      par_data[c] = par_ram[dset][c][par_addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; blk <= '0; bank <= '0; wset <= 1'b0; dset <= 1'b0;
      full <= '0; pending <= 1'b0; dec_active <= 1'b0; dec_start <= 1'b0;
      overflow <= 1'b0; sets_done <= '0;
    end else begin
      dec_start <= 1'b0;
      if (in_valid) begin
        if (full[wset]) overflow <= 1'b1;
        wcnt <= (wcnt == CW'(NW - 1)) ? '0 : wcnt + 1'b1;
      end
      if (row_done) begin
        if (blk == KW'(K - 1)) begin
          blk <= '0;
          if (bank == BW'(M - 1)) begin
            bank       <= '0;
            full[wset] <= 1'b1;
            wset       <= !wset;
            sets_done  <= sets_done + 1'b1;
          end else bank <= bank + 1'b1;
        end else blk <= blk + 1'b1;
      end
      // hand a full set to the idle decoder
      if (!dec_active && !pending && full[dset] && !dec_busy) begin
        dec_start <= 1'b1;
        pending   <= 1'b1;
      end
      if (pending && dec_busy) begin
        pending    <= 1'b0;
        dec_active <= 1'b1;
      end
      if (dec_active && !dec_busy) begin
        dec_active <= 1'b0;
        full[dset] <= 1'b0;
        dset       <= !dset;
      end
    end
  end
endmodule
