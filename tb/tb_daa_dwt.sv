// tb_daa_dwt - one DWT level with distributed-arithmetic filters. A random
// Q5.16 stream with idle cycles goes in; for every even input index the
// approximation and detail outputs are compared with the bit-column model,
// their latency (9 clocks after the accepting edge) is checked, and the
// approximation is checked against the real-valued DB2 filter (error below
// 2^-10: coefficient rounding plus column truncation). The number of
// outputs must be half the number of inputs.
module tb_daa_dwt;
  import dwt_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int LAT = 9;
  localparam int NS  = 2000;

  logic in_valid, out_valid;
  logic signed [21:0] x_in, a_out, d_out;
  daa_dwt dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .a_out, .d_out);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint hist [4];
  real    rhist [4];
  longint exp_a [$], exp_d [$];
  real    exp_r [$];
  int     exp_t [$];
  int     nout = 0;

  task automatic check_out();
    if (out_valid) begin
      longint ea, ed;
      real er, got;
      int t;
      ea = exp_a.pop_front(); ed = exp_d.pop_front(); er = exp_r.pop_front(); t = exp_t.pop_front();
      nout++;
      checks += 4;
      if (longint'(a_out) != ea) begin failures++; if (failures < 10) $display("a: %0d != %0d", a_out, ea); end
      if (longint'(d_out) != ed) begin failures++; if (failures < 10) $display("d: %0d != %0d", d_out, ed); end
      if (cyc - t != LAT) begin failures++; if (failures < 10) $display("latency %0d", cyc - t); end
      got = real'(a_out) / 65536.0;
      if (got - er > 2.0 ** -10 || er - got > 2.0 ** -10) begin
        failures++; if (failures < 10) $display("accuracy %f vs %f", got, er);
      end
    end
  endtask

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
    rhist = '{0.0, 0.0, 0.0, 0.0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; ) begin
      @(negedge clk);
      check_out();
      in_valid = ($urandom % 5) != 0;
      if (in_valid) begin
        longint xv;
        // smooth signal plus noise, within +-16
        xv = longint'($rtoi(12.0 * $sin(real'(s) / 9.0) * 65536.0)) + longint'($urandom % 65536) - 32768;
        x_in = 22'(xv);
        for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = xv;
        for (int k = 3; k > 0; k--) rhist[k] = rhist[k-1];
        rhist[0] = real'(xv) / 65536.0;
        if (s % 2 == 0) begin
          exp_a.push_back(fir_daa(1'b0, hist[0], hist[1], hist[2], hist[3]));
          exp_d.push_back(fir_daa(1'b1, hist[0], hist[1], hist[2], hist[3]));
          exp_r.push_back(db2_h(0) * rhist[0] + db2_h(1) * rhist[1] + db2_h(2) * rhist[2] + db2_h(3) * rhist[3]);
          exp_t.push_back(cyc + 1);
        end
        s++;
      end
    end
    repeat (LAT + 2) begin
      @(negedge clk);
      in_valid = 1'b0;
      check_out();
    end
    checks++;
    if (nout != NS / 2) begin failures++; $display("outputs %0d of %0d", nout, NS / 2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
