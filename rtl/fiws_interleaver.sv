// fiws_interleaver: FIWS interleaver memory between two sub-decoders.
//
// R window RAMs, each K deep and W bits wide, hold the R information-bit LLRs
// of a K-block code word in natural order. The writing sub-decoder (component
// WR_COMP) presents its block k; LLR b goes to window b at the natural row
// pattern_WR(k)[b] (de-interleaving). The reading sub-decoder (component
// RD_COMP) fetches its block k from rows pattern_RD(k)[b] (interleaving).
// rd_natural reads in natural order instead (used to read out decisions).
// The reference design writes in natural order and interleaves on reading
// with the pattern ROMs; de-interleaving on the write side is this design's
// choice so that the memory always holds natural order. Reads and writes
// happen in different phases of the decoder (see thc_decoder), so one RAM
// per window suffices; the interleaver adds the K cycles of a decoder phase.
//
// Interface: wr_en/wr_k/wr_data[R]; rd_k/rd_natural -> rd_data[R].
// Timing: write at the clock edge, read combinational (asynchronous).
module fiws_interleaver #(
  parameter int unsigned R       = 7,
  parameter int unsigned K       = 585,
  parameter int unsigned W       = 10,
  parameter int unsigned WR_COMP = 0,
  parameter int unsigned RD_COMP = 1,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [KW-1:0]        wr_k,
  input  logic signed [W-1:0]  wr_data [R],
  input  logic [KW-1:0]        rd_k,
  input  logic                 rd_natural,
  output logic signed [W-1:0]  rd_data [R]
);
  logic signed [W-1:0] win [R][K];
  logic [KW-1:0] wa [R];
  logic [KW-1:0] ra [R];

  fiws_addr #(.COMP(WR_COMP), .R(R), .K(K)) u_wa (.k(wr_k), .addr(wa));
  fiws_addr #(.COMP(RD_COMP), .R(R), .K(K)) u_ra (.k(rd_k), .addr(ra));

  for (genvar w = 0; w < R; w++) begin : g_win
    always_ff @(posedge clk) begin
      if (wr_en) win[w][wa[w]] <= wr_data[w];
    end
    assign rd_data[w] = win[w][rd_natural ? rd_k : ra[w]];
  end
endmodule
