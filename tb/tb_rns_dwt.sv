// tb_rns_dwt - one DWT level in the residue number system, for the two
// moduli sets: P7 = {127, 128, 255} with samples |x| <= 604 (the range
// whose results fit in [-M/2, M/2)) and P10 = {1023, 1024, 2047} with
// full-range 16-bit samples. Outputs for every even input index must equal
// the exact integer DB2 filter sums (taps round(h * 2^11)), arrive 10
// clocks after the accepting edge, and number half the inputs. Negative and
// positive results must both occur.
module tb_rns_dwt;
  import dwt_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int LAT = 10;
  localparam int NS  = 3000;

  logic in_valid, ov7, ov10;
  logic signed [15:0] x7, x10;
  logic signed [21:0] a7, d7;
  logic signed [30:0] a10, d10;
  rns_dwt #(.N(7))  u7  (.clk, .rst_n, .in_valid, .x_in(x7),  .out_valid(ov7),  .a_out(a7),  .d_out(d7));
  rns_dwt #(.N(10)) u10 (.clk, .rst_n, .in_valid, .x_in(x10), .out_valid(ov10), .a_out(a10), .d_out(d10));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint h7 [4], h10 [4];
  longint qa7 [$], qd7 [$], qa10 [$], qd10 [$];
  int     qt [$];
  int     nout = 0, nneg = 0, npos = 0;

  task automatic check_out();
    checks++;
    if (ov7 != ov10) failures++;
    if (ov7) begin
      longint ea7, ed7, ea10, ed10;
      int t;
      ea7 = qa7.pop_front(); ed7 = qd7.pop_front();
      ea10 = qa10.pop_front(); ed10 = qd10.pop_front(); t = qt.pop_front();
      nout++;
      if (ea7 < 0) nneg++; else npos++;
      checks += 5;
      if (longint'(a7)  != ea7)  begin failures++; if (failures < 10) $display("a7 %0d != %0d", a7, ea7); end
      if (longint'(d7)  != ed7)  begin failures++; if (failures < 10) $display("d7 %0d != %0d", d7, ed7); end
      if (longint'(a10) != ea10) begin failures++; if (failures < 10) $display("a10 %0d != %0d", a10, ea10); end
      if (longint'(d10) != ed10) begin failures++; if (failures < 10) $display("d10 %0d != %0d", d10, ed10); end
      if (cyc - t != LAT) begin failures++; if (failures < 10) $display("latency %0d", cyc - t); end
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
    in_valid = 1'b0; x7 = '0; x10 = '0;
    h7 = '{0, 0, 0, 0}; h10 = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; ) begin
      @(negedge clk);
      check_out();
      in_valid = ($urandom % 4) != 0;
      if (in_valid) begin
        x7  = (s % 100 == 3) ? -16'sd604 : 16'(int'($urandom % 1209) - 604);
        x10 = 16'($urandom);
        for (int k = 3; k > 0; k--) begin h7[k] = h7[k-1]; h10[k] = h10[k-1]; end
        h7[0] = longint'(x7);
        h10[0] = longint'(x10);
        if (s % 2 == 0) begin
          qa7.push_back(fir_exact(1'b0, 11, h7[0], h7[1], h7[2], h7[3]));
          qd7.push_back(fir_exact(1'b1, 11, h7[0], h7[1], h7[2], h7[3]));
          qa10.push_back(fir_exact(1'b0, 11, h10[0], h10[1], h10[2], h10[3]));
          qd10.push_back(fir_exact(1'b1, 11, h10[0], h10[1], h10[2], h10[3]));
          qt.push_back(cyc + 1);
        end
        s++;
      end
    end
    repeat (LAT + 2) begin
      @(negedge clk);
      in_valid = 1'b0;
      check_out();
    end
    checks += 2;
    if (nout != NS / 2) begin failures++; $display("outputs %0d", nout); end
    if (nneg == 0 || npos == 0) failures++;
    $display("negative results %0d, positive %0d", nneg, npos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
