// tb_rns_brc - the binary-to-residue converter for P7 = {127, 128, 255}
// (tap h1) and P10 = {1023, 1024, 2047} (tap g3, negative). Random and
// extreme 16-bit two's complement samples are applied every clock; three
// clocks later the residues must equal |C * x| for each modulus.
module tb_rns_brc;
  import dwt_ref_pkg::*;
  import dwt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int LAT = 3;

  logic [15:0] x;
  logic [6:0]  a1, a2;
  logic [7:0]  a3;
  logic [9:0]  b1, b2;
  logic [10:0] b3;
  rns_brc #(.N(7),  .C(DB2_Q11[1])) u7  (.clk, .rst_n, .x, .r1(a1), .r2(a2), .r3(a3));
  rns_brc #(.N(10), .C(-DB2_Q11[0])) u10 (.clk, .rst_n, .x, .r1(b1), .r2(b2), .r3(b3));

  longint xq [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint c7, c10;
    c7  = tap_int(1'b0, 1, 11);
    c10 = tap_int(1'b1, 3, 11);
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 5000 + LAT; s++) begin
      @(negedge clk);
      if (s >= LAT) begin
        longint xv, p7, p10;
        xv = xq.pop_front();
        p7 = c7 * xv; p10 = c10 * xv;
        checks += 6;
        if (longint'(a1) != modp(p7, 127))  failures++;
        if (longint'(a2) != modp(p7, 128))  failures++;
        if (longint'(a3) != modp(p7, 255))  failures++;
        if (longint'(b1) != modp(p10, 1023)) failures++;
        if (longint'(b2) != modp(p10, 1024)) failures++;
        if (longint'(b3) != modp(p10, 2047)) failures++;
        if (failures > 0 && failures < 5) $display("x=%0d: %0d %0d %0d / %0d %0d %0d", xv, a1, a2, a3, b1, b2, b3);
      end
      case (s)
        0: x = 16'h8000;
        1: x = 16'h7fff;
        2: x = 16'hffff;
        default: x = 16'($urandom);
      endcase
      xq.push_back(longint'($signed(x)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
