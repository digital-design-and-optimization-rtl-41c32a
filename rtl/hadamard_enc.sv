// hadamard_enc: systematic order-R Hadamard encoder (combinational).
//
// The 2^R-bit code word is a column of +H or -H (H the Sylvester Hadamard
// matrix), written with bit 0 for +1 and bit 1 for -1. Information sits at
// the positions 0 and 2^b: c[0] = q (sign bit of the code word) and
// c[2^b] = d[b]. Every other position i is the parity c[i] = q ^ <i, j>
// where j = d ^ {R{q}} is the column index and <i,j> the GF(2) inner product
// of the index bits. That keeps c[2^b] = q ^ j[b] = d[b].
//
// Interface: d (R information bits), q (the extra information bit: the
// convolutional code bit in a turbo Hadamard code, the common bit in a zigzag
// Hadamard code) -> c (2^R code bits). Timing: purely combinational.
module hadamard_enc #(
  parameter int unsigned R = 7
) (
  input  logic [R-1:0]      d,
  input  logic              q,
  output logic [(1<<R)-1:0] c
);
  logic [R-1:0] j;
  assign j = d ^ {R{q}};

  always_comb begin
    for (int i = 0; i < (1 << R); i++) begin
      c[i] = q ^ (^(R'(i) & j));
    end
  end
endmodule
