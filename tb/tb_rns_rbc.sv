// tb_rns_rbc - the residue-to-binary converter for P7 and P10. Random values
// X in [0, M) (and the ends of the range) are given as residues; three
// clocks later the converter must return X itself.
module tb_rns_rbc;
  import dwt_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int LAT = 3;
  localparam longint M7  = 127 * 128 * 255;
  localparam longint M10 = 1023 * 1024 * 2047;

  logic        iv, ov7, ov10;
  logic [6:0]  a1, a2;
  logic [7:0]  a3;
  logic [9:0]  b1, b2;
  logic [10:0] b3;
  logic [21:0] y7;
  logic [30:0] y10;
  rns_rbc #(.N(7))  u7  (.clk, .rst_n, .in_valid(iv), .x1(a1), .x2(a2), .x3(a3), .out_valid(ov7),  .x_out(y7));
  rns_rbc #(.N(10)) u10 (.clk, .rst_n, .in_valid(iv), .x1(b1), .x2(b2), .x3(b3), .out_valid(ov10), .x_out(y10));

  longint q7 [$], q10 [$];

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 1'b0;
    {a1, a2, a3, b1, b2, b3} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 20000 + LAT; s++) begin
      @(negedge clk);
      checks++;
      if (ov7 != (s >= LAT)) failures++;
      if (s >= LAT) begin
        longint e7, e10;
        e7 = q7.pop_front(); e10 = q10.pop_front();
        checks += 2;
        if (longint'(y7) != e7) begin failures++; if (failures < 10) $display("P7 %0d -> %0d", e7, y7); end
        if (longint'(y10) != e10) begin failures++; if (failures < 10) $display("P10 %0d -> %0d", e10, y10); end
      end
      begin
        longint v7, v10;
        case (s)
          0: begin v7 = 0; v10 = 0; end
          1: begin v7 = M7 - 1; v10 = M10 - 1; end
          2: begin v7 = M7 / 2; v10 = M10 / 2; end
          default: begin
            v7  = modp(longint'({$urandom, $urandom}), M7);
            v10 = modp(longint'({$urandom, $urandom}), M10);
          end
        endcase
        iv = 1'b1;
        a1 = 7'(v7 % 127); a2 = 7'(v7 % 128); a3 = 8'(v7 % 255);
        b1 = 10'(v10 % 1023); b2 = 10'(v10 % 1024); b3 = 11'(v10 % 2047);
        q7.push_back(v7); q10.push_back(v10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
