// tb_lfsr_prng: checks the 102-stage LFSR against a bit-serial model of the
// recurrence s(n) = s(n-35) ^ s(n-36) ^ s(n-101) ^ s(n-102) (polynomial
// 1 + x^35 + x^36 + x^101 + x^102), including hold when en is low.
module tb_lfsr_prng;
  localparam int STEP = 7;
  localparam logic [101:0] SEED = 102'h1_2345_6789_ABCD_EF01_2345_6789;
  logic clk = 0, rst_n = 0, en = 0;
  logic [STEP-1:0] bits;
  always #5 clk = ~clk;
  lfsr_prng #(.STEP(STEP), .SEED(SEED)) dut (.*);

  int checks = 0, failures = 0;
  bit hist [$];   // oldest first: hist[0] is the bit 102 shifts ago

  initial begin
    for (int i = 101; i >= 0; i--) hist.push_back(SEED[i]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      en = (n % 5 != 3);
      #1;
      for (int b = 0; b < STEP; b++) begin
        bit nb;
        int L;
        L = hist.size();
        nb = hist[L-35] ^ hist[L-36] ^ hist[L-101] ^ hist[L-102];
        checks++;
        if (bits[b] !== nb) begin
          failures++;
          if (failures < 5) $display("word %0d bit %0d: %b expected %b", n, b, bits[b], nb);
        end
        if (en) hist.push_back(nb);
        else break;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
