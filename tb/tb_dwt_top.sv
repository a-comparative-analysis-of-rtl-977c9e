// tb_dwt_top - end-to-end test of both DWT datapaths at their default sizes
// (22-bit Q5.16 distributed-arithmetic level, P7 residue-number-system
// level). Both streams get the same signal, a sum of two sines plus noise
// (DAA: in Q5.16 within +-8; RNS: as integers within +-604), with random
// idle cycles. Every approximation/detail pair is compared with independent
// models: the DAA outputs with the bit-column model and, within 2^-10, with
// the real-valued DB2 filter; the RNS outputs exactly with the integer
// filter. Latencies (9 and 10 clocks after the accepting edge) are checked.
// Counted mechanisms, each of which must occur: input stalls (idle cycles
// that freeze the delay lines), odd-index outputs dropped by the
// down-sampler, negative DAA results (sign column subtracted), negative RNS
// results (values mapped to the upper half of [0, M) and decoded).
module tb_dwt_top;
  import dwt_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int LAT_DAA = 9;
  localparam int LAT_RNS = 10;
  localparam int NS      = 4000;

  logic daa_in_valid, daa_out_valid, rns_in_valid, rns_out_valid;
  logic signed [21:0] daa_x, daa_a;
  logic               daa_d_valid [1];
  logic signed [21:0] daa_d [1];
  logic signed [15:0] rns_x;
  logic signed [21:0] rns_a, rns_d;

  dwt_top dut (
    .clk, .rst_n,
    .daa_in_valid, .daa_x, .daa_out_valid, .daa_a, .daa_d_valid, .daa_d,
    .rns_in_valid, .rns_x, .rns_out_valid, .rns_a, .rns_d);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint hd [4], hr [4];
  real    hreal [4];
  longint qda [$], qdd [$], qra [$], qrd [$];
  real    qreal [$];
  int     qdt [$], qrt [$];
  int     n_daa = 0, n_rns = 0;
  int     n_stall = 0, n_drop = 0, n_neg_daa = 0, n_neg_rns = 0;

  task automatic check_out();
    if (daa_d_valid[0] !== daa_out_valid) begin failures++; $display("daa detail valid mismatch"); end
    if (daa_out_valid) begin
      longint ea, ed;
      real er, got;
      int t;
      ea = qda.pop_front(); ed = qdd.pop_front(); er = qreal.pop_front(); t = qdt.pop_front();
      n_daa++;
      if (daa_a < 0) n_neg_daa++;
      checks += 4;
      if (longint'(daa_a) != ea) begin failures++; if (failures < 10) $display("daa a %0d != %0d", daa_a, ea); end
      if (longint'(daa_d[0]) != ed) begin failures++; if (failures < 10) $display("daa d %0d != %0d", daa_d[0], ed); end
      if (cyc - t != LAT_DAA) begin failures++; if (failures < 10) $display("daa latency %0d", cyc - t); end
      got = real'(daa_a) / 65536.0;
      if (got - er > 2.0 ** -10 || er - got > 2.0 ** -10) failures++;
    end
    if (rns_out_valid) begin
      longint ea, ed;
      int t;
      ea = qra.pop_front(); ed = qrd.pop_front(); t = qrt.pop_front();
      n_rns++;
      if (rns_a < 0) n_neg_rns++;
      if (rns_d < 0) n_neg_rns++;
      checks += 3;
      if (longint'(rns_a) != ea) begin failures++; if (failures < 10) $display("rns a %0d != %0d", rns_a, ea); end
      if (longint'(rns_d) != ed) begin failures++; if (failures < 10) $display("rns d %0d != %0d", rns_d, ed); end
      if (cyc - t != LAT_RNS) begin failures++; if (failures < 10) $display("rns latency %0d", cyc - t); end
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
    daa_in_valid = 1'b0; rns_in_valid = 1'b0; daa_x = '0; rns_x = '0;
    for (int k = 0; k < 4; k++) begin hd[k] = 0; hr[k] = 0; hreal[k] = 0.0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; ) begin
      @(negedge clk);
      check_out();
      daa_in_valid = ($urandom % 6) != 0;
      rns_in_valid = daa_in_valid;
      if (!daa_in_valid) n_stall++;
      if (daa_in_valid) begin
        real sig;
        longint xd, xr;
        sig = 0.7 * $sin(real'(s) / 7.0) + 0.25 * $sin(real'(s) / 1.3) + (real'($urandom % 1000) - 500.0) / 10000.0;
        xd  = longint'($rtoi(sig * 8.0 * 65536.0));
        xr  = longint'($rtoi(sig * 600.0));
        daa_x = 22'(xd);
        rns_x = 16'(xr);
        for (int k = 3; k > 0; k--) begin hd[k] = hd[k-1]; hr[k] = hr[k-1]; hreal[k] = hreal[k-1]; end
        hd[0] = xd; hr[0] = xr; hreal[0] = real'(xd) / 65536.0;
        if (s % 2 == 0) begin
          qda.push_back(fir_daa(1'b0, hd[0], hd[1], hd[2], hd[3]));
          qdd.push_back(fir_daa(1'b1, hd[0], hd[1], hd[2], hd[3]));
          qreal.push_back(db2_h(0) * hreal[0] + db2_h(1) * hreal[1] + db2_h(2) * hreal[2] + db2_h(3) * hreal[3]);
          qdt.push_back(cyc + 1);
          qra.push_back(fir_exact(1'b0, 11, hr[0], hr[1], hr[2], hr[3]));
          qrd.push_back(fir_exact(1'b1, 11, hr[0], hr[1], hr[2], hr[3]));
          qrt.push_back(cyc + 1);
        end else begin
          n_drop++;
        end
        s++;
      end
    end
    repeat (LAT_RNS + 2) begin
      @(negedge clk);
      daa_in_valid = 1'b0; rns_in_valid = 1'b0;
      check_out();
    end
    checks += 6;
    if (n_daa != NS / 2) begin failures++; $display("DAA outputs %0d", n_daa); end
    if (n_rns != NS / 2) begin failures++; $display("RNS outputs %0d", n_rns); end
    if (n_stall == 0)   begin failures++; $display("no input stall"); end
    if (n_drop == 0)    begin failures++; $display("no dropped sample"); end
    if (n_neg_daa == 0) begin failures++; $display("no negative DAA result"); end
    if (n_neg_rns == 0) begin failures++; $display("no negative RNS result"); end
    $display("stalls %0d, dropped %0d, negative DAA %0d, negative RNS %0d", n_stall, n_drop, n_neg_daa, n_neg_rns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
