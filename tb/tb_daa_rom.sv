// tb_daa_rom - reads every word of the low-pass and high-pass bit-level ROMs
// and compares it with the sum of the DB2 Q5.16 taps selected by the address
// bits (taps written out here as literals), one clock after the address.
module tb_daa_rom;
  import dwt_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] addr;
  logic signed [21:0] qh, qg;
  daa_rom #(.W(22), .COEF(taps(DB2, LOW_PASS, 1'b1))) u_h (.clk, .addr, .q(qh));
  daa_rom #(.W(22), .COEF(taps(DB2, HIGH_PASS, 1'b1))) u_g (.clk, .addr, .q(qg));

  // round(h * 65536) for h = DB2 low pass; g[k] = (-1)^k h[3-k]
  localparam int HL [4] = '{31651, 54822, 14689, -8481};

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      int eh, eg;
      eh = 0; eg = 0;
      for (int k = 0; k < 4; k++) if (a[k]) begin
        eh += HL[k];
        eg += ((k % 2) == 0 ? HL[3-k] : -HL[3-k]);
      end
      @(negedge clk) addr = 4'(a);
      @(negedge clk);
      checks += 2;
      if (int'(qh) != eh) begin failures++; $display("h addr %0d: %0d != %0d", a, qh, eh); end
      if (int'(qg) != eg) begin failures++; $display("g addr %0d: %0d != %0d", a, qg, eg); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
