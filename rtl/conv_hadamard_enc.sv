// conv_hadamard_enc: one component encoder of a turbo Hadamard code
// (convolutional Hadamard code).
//
// For each R-bit block d_k: the single parity check q'_k = XOR(d_k) is fed to a
// 2-state rate-1/2 systematic recursive convolutional encoder with feedback
// 1/(1+x), giving q_k = q'_k ^ q_(k-1) (state starts at 0 on `init`). Then
// (d_k, q_k) is Hadamard encoded into c_k = (d_k, q_k, p_k). The outputs are
// the code word bits that are not information bits: position 0 (q_k) first,
// then the parity positions in increasing order (2^R - R bits in all), which
// is the slice this component writes into the parity RAM of the transmit
// buffer. Structure as in the reference design; the output bit order is this
// design's choice.
//
// Interface: init clears the convolutional state (start of a code word);
// valid advances it with block d. par is combinational from d and the state.
// Timing: one block per cycle, no latency.
module conv_hadamard_enc
  import thc_pkg::*;
#(
  parameter int unsigned R = 7
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   init,
  input  logic                   valid,
  input  logic [R-1:0]           d,
  output logic [(1<<R)-R-1:0]    par,
  output logic                   q
);
  localparam int NP = (1 << R) - R;
  logic              state;
  logic [(1<<R)-1:0] cw;

  assign q = (^d) ^ state;

  hadamard_enc #(.R(R)) u_had (.d(d), .q(q), .c(cw));

  always_comb begin
    for (int i = 0; i < NP; i++) par[i] = cw[par_pos(i, R)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= 1'b0;
    else if (init)  state <= 1'b0;
    else if (valid) state <= q;
  end
endmodule
