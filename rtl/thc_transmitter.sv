// thc_transmitter: sends the rows of a full transmit-buffer set to the
// channel, W_T bits per clock cycle.
//
// A row holds the R information bits of a block followed by the M parity
// slices of 2^R - R bits (bit R + m*(2^R-R) + i is bit i of component m), so
// R + M*(2^R - R) bits, which W_T must divide. Rows go out in address order
// (code word 0 block 0 first), each split into ROW/W_T words, lowest bits
// first. The next row is loaded in the cycle the last word of a row leaves, so
// transmission is continuous: a set of M code words takes M*K*ROW/W_T cycles,
// and the system throughput is f*W_T bits/s as in the reference design. The
// word order within a row and W_T itself are this design's choices.
//
// Interface: start (set is full) -> rd_addr into the buffer, tx_valid/tx_bits
// to the channel, done pulse after the last word.
// Timing: first word one cycle after start, then one word per cycle.
module thc_transmitter #(
  parameter int unsigned R   = 7,
  parameter int unsigned K   = 585,
  parameter int unsigned M   = 5,
  parameter int unsigned W_T = 18,
  localparam int unsigned AW  = $clog2(M * K),
  localparam int unsigned NP  = (1 << R) - R,
  localparam int unsigned ROW = R + M * NP
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic [AW-1:0]   rd_addr,
  input  logic [R-1:0]    rd_info,
  input  logic [M*NP-1:0] rd_par,
  output logic            tx_valid,
  output logic [W_T-1:0]  tx_bits
);
  localparam int unsigned NW = ROW / W_T;
  localparam int unsigned CW = (NW > 1) ? $clog2(NW) : 1;

  logic [ROW-1:0] sh;
  logic [CW-1:0]  wcnt;
  logic           active;

  initial assert (ROW % W_T == 0) else $error("W_T must divide the row length");

  assign busy     = active;
  assign tx_valid = active;
  assign tx_bits  = sh[W_T-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      rd_addr <= '0;
      wcnt    <= '0;
      done    <= 1'b0;
      sh      <= '0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          active  <= 1'b1;
          sh      <= {rd_par, rd_info};
          wcnt    <= '0;
          rd_addr <= rd_addr + 1'b1;
        end else begin
          rd_addr <= '0;
        end
      end else if (wcnt == CW'(NW - 1)) begin
        wcnt <= '0;
        if (rd_addr == '0) begin
          active <= 1'b0;
          done   <= 1'b1;
        end else begin
          sh      <= {rd_par, rd_info};
          rd_addr <= (rd_addr == AW'(M * K - 1)) ? '0 : rd_addr + 1'b1;
        end
      end else begin
        wcnt <= wcnt + 1'b1;
        sh   <= sh >> W_T;
      end
    end
  end
endmodule
