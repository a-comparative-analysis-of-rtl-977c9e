// tb_daa_fir - random Q5.16 stream (with idle cycles) into the low-pass and
// the high-pass DAA filter. Every output is compared with a bit-column model
// of distributed arithmetic, checked to lie within 17 LSB of the exact
// rounded product sum, and its latency (8 clocks after the accepting clock
// edge) is checked. Includes full-scale samples whose sums wrap.
module tb_daa_fir;
  import dwt_ref_pkg::*;
  import dwt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int LAT = 8;
  localparam int NS  = 3000;

  logic in_valid;
  logic signed [21:0] x_in;
  logic vh, vg;
  logic signed [21:0] yh, yg;
  daa_fir #(.COEF(taps(DB2, LOW_PASS, 1'b1))) u_h (.clk, .rst_n, .in_valid, .x_in, .out_valid(vh), .y_out(yh));
  daa_fir #(.COEF(taps(DB2, HIGH_PASS, 1'b1))) u_g (.clk, .rst_n, .in_valid, .x_in, .out_valid(vg), .y_out(yg));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint hist [4];
  longint exp_h [$], exp_g [$];
  int     exp_t [$];
  int     nout = 0;

  initial begin
    repeat (NS * 3) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; x_in = '0;
    hist = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; ) begin
      @(negedge clk);
      // check outputs
      checks++;
      if (vh != vg) failures++;
      if (vh) begin
        longint eh, eg;
        int t;
        eh = exp_h.pop_front(); eg = exp_g.pop_front(); t = exp_t.pop_front();
        nout++;
        checks += 3;
        if (longint'(yh) != eh) begin failures++; if (failures < 10) $display("h: %0d != %0d", yh, eh); end
        if (longint'(yg) != eg) begin failures++; if (failures < 10) $display("g: %0d != %0d", yg, eg); end
        if (cyc - t != LAT) begin failures++; if (failures < 10) $display("latency %0d", cyc - t); end
      end
      // drive a new sample
      in_valid = ($urandom % 4) != 0;
      if (in_valid) begin
        longint xv;
        if (s % 50 == 7) xv = ($urandom % 2) ? -(longint'(1) << 21) : (longint'(1) << 21) - 1;
        else             xv = longint'($urandom % 2000001) - 1000000;
        x_in = 22'(xv);
        for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = xv;
        exp_h.push_back(fir_daa(1'b0, hist[0], hist[1], hist[2], hist[3]));
        exp_g.push_back(fir_daa(1'b1, hist[0], hist[1], hist[2], hist[3]));
        exp_t.push_back(cyc + 1);
        // accuracy against the exact product sum, when no overflow occurs
        if (s % 50 > 10) begin
          longint ex, d;
          ex = fir_exact(1'b0, 16, hist[0], hist[1], hist[2], hist[3]);
          d  = exp_h[$] * 65536 - ex;
          checks++;
          if (d > 17 * 65536 || d < -17 * 65536) begin
            failures++; $display("accuracy: %0d vs %0d", exp_h[$], ex / 65536);
          end
        end
        s++;
      end
    end
    repeat (LAT + 2) begin
      @(negedge clk);
      in_valid = 1'b0;
      if (vh) begin
        longint eh, eg;
        int t;
        eh = exp_h.pop_front(); eg = exp_g.pop_front(); t = exp_t.pop_front();
        nout++;
        checks += 3;
        if (longint'(yh) != eh) failures++;
        if (longint'(yg) != eg) failures++;
        if (cyc - t != LAT) failures++;
      end
    end
    checks++;
    if (nout != NS) begin failures++; $display("outputs %0d of %0d", nout, NS); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
