// tb_dwt_downsample - feeds a numbered stream with random gaps and checks that
// exactly the even-indexed samples come out, in order, one clock after they
// enter.
module tb_dwt_downsample;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, out_valid;
  logic [15:0] d_in, d_out;
  dwt_downsample #(.W(16)) dut (.clk, .rst_n, .in_valid, .d_in, .out_valid, .d_out);

  int sent = 0, expect_next = 0, outs = 0;
  logic prev_even;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; d_in = '0; prev_even = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (sent < 1000) begin
      @(negedge clk);
      // check the previous clock's input
      checks++;
      if (out_valid != prev_even) failures++;
      if (out_valid) begin
        checks++;
        outs++;
        if (int'(d_out) != expect_next) failures++;
        expect_next += 2;
      end
      in_valid  = ($urandom % 3) != 0;
      d_in      = 16'(sent);
      prev_even = in_valid && (sent % 2 == 0);
      if (in_valid) sent++;
    end
    @(negedge clk);
    if (out_valid) begin outs++; checks++; end
    checks++;
    if (outs != 500) begin failures++; $display("outputs %0d", outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
