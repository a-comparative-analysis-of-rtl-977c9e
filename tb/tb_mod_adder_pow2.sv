// tb_mod_adder_pow2 - exhaustive check of the modulo 2^7 adder and a random
// check of the modulo 2^10 adder; results are compared one clock after the
// operands are applied.
module tb_mod_adder_pow2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0] a7, b7, z7;
  logic [9:0] a10, b10, z10;
  mod_adder_pow2 #(.K(7))  u7  (.clk, .rst_n, .a(a7), .b(b7), .z(z7));
  mod_adder_pow2 #(.K(10)) u10 (.clk, .rst_n, .a(a10), .b(b10), .z(z10));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a7 = '0; b7 = '0; a10 = '0; b10 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 128; i++) begin
      for (int j = 0; j < 128; j++) begin
        a7 = 7'(i); b7 = 7'(j);
        a10 = 10'($urandom); b10 = 10'($urandom);
        @(negedge clk);
        checks += 2;
        if (int'(z7) != (i + j) % 128) failures++;
        if (int'(z10) != (int'(a10) + int'(b10)) % 1024) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
