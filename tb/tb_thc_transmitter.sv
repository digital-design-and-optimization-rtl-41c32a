// tb_thc_transmitter: checks the transmitter (R = 3, K = 4, M = 3, W_T = 6,
// so a row of 3 + 3*5 = 18 bits leaves in 3 words). A behavioural buffer
// answers rd_addr combinationally. The test checks that every row
// {parity, information} leaves LSB first, W_T bits per cycle with tx_valid
// high and no gaps, that done pulses once after the last word, and that a
// second start sends the set again.
module tb_thc_transmitter;
  localparam int R = 3, K = 4, M = 3, W_T = 6, NP = (1 << R) - R;
  localparam int ROW = R + M * NP, NW = ROW / W_T, AW = $clog2(M * K);
  logic clk = 0, rst_n = 0, start = 0, busy, done, tx_valid;
  logic [AW-1:0] rd_addr;
  logic [R-1:0] rd_info;
  logic [M*NP-1:0] rd_par;
  logic [W_T-1:0] tx_bits;
  always #5 clk = ~clk;
  thc_transmitter #(.R(R), .K(K), .M(M), .W_T(W_T)) dut (.*);

  logic [ROW-1:0] mem [M * K];
  assign rd_info = mem[rd_addr][R-1:0];
  assign rd_par  = mem[rd_addr][ROW-1:R];

  int checks = 0, failures = 0;
  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_set(int rep);
    int nword, ndone;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    nword = 0; ndone = 0;
    // words follow back to back
    while (nword < M * K * NW) begin
      chk(tx_valid, $sformatf("rep %0d: tx_valid at word %0d", rep, nword));
      chk(tx_bits == mem[nword / NW][(nword % NW) * W_T +: W_T],
          $sformatf("rep %0d word %0d: %h", rep, nword, tx_bits));
      chk(!done, "done before the last word");
      nword++;
      @(negedge clk);
    end
    chk(!tx_valid && done, $sformatf("rep %0d: done after the last word", rep));
    @(negedge clk);
    chk(!done && !busy, "done is a single pulse");
  endtask

  initial begin
    for (int a = 0; a < M * K; a++) mem[a] = ROW'(a * 40503 + 12345);
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    chk(!tx_valid && !busy, "idle after reset");
    send_set(0);
    for (int a = 0; a < M * K; a++) mem[a] = ROW'(a * 7777 + 3);
    send_set(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
