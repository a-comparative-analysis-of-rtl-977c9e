// tb_rns_fcma - the RNS forward-converter/modulo-adder stage of the P7
// low-pass filter. A random 16-bit stream with idle cycles goes in; every
// output triple must equal the residues of the exact sum_k H[k] x[n-k]
// (taps round(h * 2^11)) and arrive 5 clocks after the accepting edge.
module tb_rns_fcma;
  import dwt_ref_pkg::*;
  import dwt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int LAT = 5;
  localparam int NS  = 3000;

  logic in_valid, out_valid;
  logic [15:0] x_in;
  logic [6:0] r1, r2;
  logic [7:0] r3;
  rns_fcma #(.N(7), .C(DB2_Q11)) dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .r1, .r2, .r3);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint hist [4];
  longint exq [$];
  int     etq [$];
  int     nout = 0;

  task automatic check_out();
    if (out_valid) begin
      longint e;
      int t;
      e = exq.pop_front(); t = etq.pop_front();
      nout++;
      checks += 4;
      if (longint'(r1) != modp(e, 127)) failures++;
      if (longint'(r2) != modp(e, 128)) failures++;
      if (longint'(r3) != modp(e, 255)) failures++;
      if (cyc - t != LAT) failures++;
      if (failures > 0 && failures < 5) $display("y=%0d: %0d %0d %0d lat %0d", e, r1, r2, r3, cyc - t);
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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; ) begin
      @(negedge clk);
      check_out();
      in_valid = ($urandom % 4) != 0;
      if (in_valid) begin
        x_in = 16'($urandom);
        for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'($signed(x_in));
        exq.push_back(fir_exact(1'b0, 11, hist[0], hist[1], hist[2], hist[3]));
        etq.push_back(cyc + 1);
        s++;
      end
    end
    repeat (LAT + 2) begin
      @(negedge clk);
      in_valid = 1'b0;
      check_out();
    end
    checks++;
    if (nout != NS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
