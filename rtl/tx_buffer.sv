// tx_buffer: the two transmit buffers (ping-pong) between the turbo Hadamard
// encoder and the transmitter.
//
// Each set holds M code words: an information RAM R bits wide and a parity
// RAM M*(2^R - R) bits wide, both M*K deep (row = code word * K + block), as
// in the reference design. While the transmitter empties one set the encoder
// fills the other. The buffer keeps a full flag per set: the encoder may
// write set enc_set when enc_ok (it is empty), the transmitter may read set
// tx_set when tx_ok (it is full); enc_done and tx_done hand a set over and
// move the pointer to the other set.
//
// Interface: write port (wr_*) into set enc_set, read port (rd_addr ->
// rd_info, rd_par, combinational) from set tx_set, handshake signals above.
// Timing: writes at the clock edge, asynchronous reads.
module tx_buffer #(
  parameter int unsigned R = 7,
  parameter int unsigned K = 585,
  parameter int unsigned M = 5,
  localparam int unsigned AW = $clog2(M * K),
  localparam int unsigned NP = (1 << R) - R
) (
  input  logic            clk,
  input  logic            rst_n,
  // encoder side
  output logic            enc_ok,
  output logic            enc_set,
  input  logic            enc_done,
  input  logic            wr_info_en,
  input  logic            wr_par_en,
  input  logic [AW-1:0]   wr_addr,
  input  logic [R-1:0]    wr_info,
  input  logic [M*NP-1:0] wr_par,
  // transmitter side
  output logic            tx_ok,
  output logic            tx_set,
  input  logic            tx_done,
  input  logic [AW-1:0]   rd_addr,
  output logic [R-1:0]    rd_info,
  output logic [M*NP-1:0] rd_par
);
  logic [R-1:0]    info_ram [2][M*K];
  logic [M*NP-1:0] par_ram  [2][M*K];
  logic [1:0]      full;

  assign enc_ok = !full[enc_set];
  assign tx_ok  = full[tx_set];

  always_ff @(posedge clk) begin
    if (wr_info_en) info_ram[enc_set][wr_addr] <= wr_info;
    if (wr_par_en)  par_ram[enc_set][wr_addr]  <= wr_par;
  end

  assign rd_info = info_ram[tx_set][rd_addr];
  assign rd_par  = par_ram[tx_set][rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      enc_set <= 1'b0;
      tx_set  <= 1'b0;
    end else begin
      if (enc_done) begin
        full[enc_set] <= 1'b1;
        enc_set       <= !enc_set;
      end
      if (tx_done) begin
        full[tx_set] <= 1'b0;
        tx_set       <= !tx_set;
      end
    end
  end

  // the encoder only finishes a set it was allowed to start
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_info_en || wr_par_en) |-> !full[enc_set]);
endmodule
