// tb_mod_adder_mersenne - exhaustive check of the modulo (2^K - 1) adder for
// K = 7 and K = 8 (the two Mersenne channels of the P7 moduli set).
// Every canonical operand pair is applied; the registered sum is compared one
// clock later with (a + b) mod (2^K - 1). Also checks that the code 2^K - 1
// on one input is treated as zero.
module tb_mod_adder_mersenne;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0] a7, b7, z7;
  logic [7:0] a8, b8, z8;
  mod_adder_mersenne #(.K(7)) u7 (.clk, .rst_n, .a(a7), .b(b7), .z(z7));
  mod_adder_mersenne #(.K(8)) u8 (.clk, .rst_n, .a(a8), .b(b8), .z(z8));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a7 = '0; b7 = '0; a8 = '0; b8 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i <= 127; i++) begin
      for (int j = 0; j < 127; j++) begin
        a7 = 7'(i); b7 = 7'(j);
        a8 = 8'(i * 2 + (j & 1)); b8 = 8'(j * 2 + (i & 1));
        @(negedge clk);
        checks++;
        if (int'(z7) != (i + j) % 127 && !(i == 127 && z7 == 7'(j % 127))) begin
          failures++;
          if (failures < 10) $display("K=7 %0d+%0d got %0d", i, j, z7);
        end
        checks++;
        if (int'(z8) != (int'(a8) + int'(b8)) % 255) begin
          failures++;
          if (failures < 10) $display("K=8 %0d+%0d got %0d", a8, b8, z8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
