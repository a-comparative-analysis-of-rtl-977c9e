// tb_dwt_wavelets - the larger filter banks: one DWT level with DB4 (8 taps)
// and DB5 (10 taps), each built both with distributed arithmetic and in the
// P7 residue number system. One random stream with idle cycles drives all
// four (DAA: Q5.16 within +-8; RNS: integers within +-500, the range whose
// DB5 results fit P7). Every output pair is compared with independent models
// (bit-column DAA model, exact integer filter for RNS) and the latencies are
// checked: DAA 9 clock edges after the accepting edge for any filter length,
// RNS 8 + $clog2(taps), i.e. 11 for DB4 and 12 for DB5.
module tb_dwt_wavelets;
  import dwt_ref_pkg::*;
  import dwt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NS = 3000;

  logic in_valid;
  logic signed [21:0] xd;
  logic signed [15:0] xr;
  logic ov [4];
  logic signed [21:0] a [4];
  logic signed [21:0] d [4];

  daa_dwt #(.WAVELET(DB4)) u_d4 (.clk, .rst_n, .in_valid, .x_in(xd), .out_valid(ov[0]), .a_out(a[0]), .d_out(d[0]));
  daa_dwt #(.WAVELET(DB5)) u_d5 (.clk, .rst_n, .in_valid, .x_in(xd), .out_valid(ov[1]), .a_out(a[1]), .d_out(d[1]));
  rns_dwt #(.WAVELET(DB4)) u_r4 (.clk, .rst_n, .in_valid, .x_in(xr), .out_valid(ov[2]), .a_out(a[2]), .d_out(d[2]));
  rns_dwt #(.WAVELET(DB5)) u_r5 (.clk, .rst_n, .in_valid, .x_in(xr), .out_valid(ov[3]), .a_out(a[3]), .d_out(d[3]));

  localparam int NTS [4] = '{8, 10, 8, 10};
  localparam int LAT [4] = '{9, 9, 11, 12};

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint hd [10], hr [10];
  longint qa [4][$], qd [4][$];
  int     qt [4][$];
  int     nout [4] = '{0, 0, 0, 0};

  task automatic check_out();
    for (int i = 0; i < 4; i++) begin
      if (ov[i]) begin
        longint ea, ed;
        int t;
        ea = qa[i].pop_front(); ed = qd[i].pop_front(); t = qt[i].pop_front();
        nout[i]++;
        checks += 3;
        if (longint'(a[i]) != ea) begin failures++; if (failures < 10) $display("dut %0d a %0d != %0d", i, a[i], ea); end
        if (longint'(d[i]) != ed) begin failures++; if (failures < 10) $display("dut %0d d %0d != %0d", i, d[i], ed); end
        if (cyc - t != LAT[i]) begin failures++; if (failures < 10) $display("dut %0d latency %0d", i, cyc - t); end
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
    in_valid = 1'b0; xd = '0; xr = '0;
    for (int k = 0; k < 10; k++) begin hd[k] = 0; hr[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; ) begin
      @(negedge clk);
      check_out();
      in_valid = ($urandom % 5) != 0;
      if (in_valid) begin
        real sig;
        sig = 0.6 * $sin(real'(s) / 5.0) + 0.3 * $sin(real'(s) / 1.7) + (real'($urandom % 1000) - 500.0) / 5000.0;
        for (int k = 9; k > 0; k--) begin hd[k] = hd[k-1]; hr[k] = hr[k-1]; end
        hd[0] = longint'($rtoi(sig * 8.0 * 65536.0));
        hr[0] = longint'($rtoi(sig * 500.0));
        xd = 22'(hd[0]);
        xr = 16'(hr[0]);
        if (s % 2 == 0) begin
          for (int i = 0; i < 4; i++) begin
            if (i < 2) begin
              qa[i].push_back(firn_daa(NTS[i], 1'b0, hd));
              qd[i].push_back(firn_daa(NTS[i], 1'b1, hd));
            end else begin
              qa[i].push_back(firn_exact(NTS[i], 1'b0, 11, hr));
              qd[i].push_back(firn_exact(NTS[i], 1'b1, 11, hr));
            end
            qt[i].push_back(cyc + 1);
          end
        end
        s++;
      end
    end
    repeat (16) begin
      @(negedge clk);
      in_valid = 1'b0;
      check_out();
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (nout[i] != NS / 2) begin failures++; $display("dut %0d outputs %0d", i, nout[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
