// tb_rx_buffer: checks the receive buffer (R = 3, K = 4, M = 3, W_T = 6, so a
// row of 18 LLRs arrives in 3 words). Sets of known LLR values are sent;
// a behavioural decoder answers dec_start by raising dec_busy and reads the
// whole set back through both read ports (information windows addressed
// separately, parity rows), comparing every value. The test checks that
// dec_start pulses once per full set and never while the decoder is busy,
// that a set arriving while the decoder holds the other one is stored
// without disturbing it, that sets_done counts sets, and that overflow rises
// only when a row arrives for a set the decoder has not released.
module tb_rx_buffer;
  localparam int R = 3, K = 4, M = 3, W_T = 6, N_CH = 6, NP = (1 << R) - R;
  localparam int ROW = R + M * NP, NW = ROW / W_T, KW = $clog2(K);
  logic clk = 0, rst_n = 0, in_valid = 0, dec_start, dec_busy = 0, overflow;
  logic signed [N_CH-1:0] in_llr [W_T];
  logic [KW-1:0] info_addr [M][R];
  logic signed [N_CH-1:0] info_data [M][R];
  logic [KW-1:0] par_addr;
  logic signed [N_CH-1:0] par_data [M][M][NP];
  logic [15:0] sets_done;
  always #5 clk = ~clk;
  rx_buffer #(.R(R), .K(K), .M(M), .W_T(W_T), .N_CH(N_CH)) dut (.*);

  int checks = 0, failures = 0, n_start = 0;
  always @(posedge clk) if (rst_n && dec_start) begin
    n_start++;
    checks++;
    if (dec_busy) begin failures++; $display("FAIL: dec_start while busy"); end
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int val(int s, int n, int p);
    return ((s * 37 + n * 11 + p * 5) % 63) - 31;
  endfunction

  task automatic send_set(int s);
    for (int n = 0; n < M * K; n++)
      for (int w = 0; w < NW; w++) begin
        in_valid = 1;
        for (int i = 0; i < W_T; i++) in_llr[i] = N_CH'(val(s, n, w * W_T + i));
        @(negedge clk);
      end
    in_valid = 0;
  endtask

  // wait for dec_start, go busy and read back set s
  task automatic decode_set(int s, bit wait_start = 1);
    int guard;
    guard = 0;
    if (wait_start) begin
      while (!dec_start && guard < 100) begin @(negedge clk); guard++; end
      chk(dec_start, $sformatf("dec_start for set %0d", s));
      @(negedge clk);
      dec_busy = 1;
    end
    @(negedge clk);
    for (int k = 0; k < K; k++) begin
      for (int c = 0; c < M; c++)
        for (int b = 0; b < R; b++) info_addr[c][b] = KW'((k + b + c) % K);
      par_addr = KW'(k);
      #1;
      for (int c = 0; c < M; c++) begin
        for (int b = 0; b < R; b++)
          chk(int'(info_data[c][b]) == val(s, c * K + (k + b + c) % K, b),
              $sformatf("set %0d cw %0d info %0d", s, c, b));
        for (int m = 0; m < M; m++)
          for (int i = 0; i < NP; i++)
            chk(int'(par_data[c][m][i]) == val(s, c * K + k, R + m * NP + i),
                $sformatf("set %0d cw %0d block %0d parity %0d/%0d", s, c, k, m, i));
      end
    end
  endtask

  task automatic release_set();
    @(negedge clk);
    dec_busy = 0;
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < W_T; i++) in_llr[i] = '0;
    for (int c = 0; c < M; c++) for (int b = 0; b < R; b++) info_addr[c][b] = '0;
    par_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    send_set(0);
    decode_set(0);                 // decoder holds set 0
    send_set(1);                   // fills the other set meanwhile
    chk(!overflow && n_start == 1 && sets_done == 2, "set 1 stored while set 0 decodes");
    decode_set(0, 0);              // set 0 is undisturbed (no new start: busy)
    chk(n_start == 1, "no dec_start while busy");
    release_set();
    decode_set(1);
    chk(n_start == 2, "dec_start for the waiting set");
    release_set();
    send_set(2);
    decode_set(2);
    send_set(3);
    chk(!overflow && sets_done == 4, "no overflow with one set pending");
    send_set(4);                   // both sets occupied: must overflow
    chk(overflow, "overflow when both sets are occupied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
