// fiws_addr: interleaving pattern of one component code of a fixed
// inter-window shuffle (FIWS) interleaver.
//
// The R information bits of a block are R windows (columns) of depth K. The
// interleaver never moves a bit out of its window; window w of component COMP
// is permuted by its own pattern, so R reads or writes, one per window, can
// happen in the same cycle without contention. This module gives, for step k
// of component COMP, the row of each window: addr[w] = (A_w * k + B_w) mod K
// with A_w prime to K (thc_pkg::perm_mult); component 0 is the identity. The
// reference design stores random patterns in R depth-K ROMs; this module
// computes an affine pattern instead.
//
// Interface: k -> addr[R]. Timing: combinational.
module fiws_addr
  import thc_pkg::*;
#(
  parameter int unsigned COMP = 1,
  parameter int unsigned R    = 7,
  parameter int unsigned K    = 585,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [KW-1:0] k,
  output logic [KW-1:0] addr [R]
);
  for (genvar w = 0; w < R; w++) begin : g_win
    localparam int A = (COMP == 0) ? 1 : perm_mult(COMP, w, R, K);
    localparam int B = (COMP == 0) ? 0 : (7 * COMP + 3 * w + 1) % K;
    logic [KW+$clog2(K+1):0] prod;
    assign prod    = A * k + B;
    assign addr[w] = KW'(prod % K);
  end
endmodule
