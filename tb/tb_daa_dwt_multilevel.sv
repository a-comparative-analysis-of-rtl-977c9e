// tb_daa_dwt_multilevel - three cascaded distributed-arithmetic DB2 levels.
// A random Q5.16 stream with idle cycles goes in. A software cascade of the
// bit-column model (each level filtering the previous level's modelled
// approximation, keeping even indices) predicts every detail output d1..d3
// and the final approximation a3; all are compared bit-exactly in order.
// Also checked: level 1 latency (9 clocks after the accepting edge), each
// level's output count (NS/2, NS/4, NS/8), and that the final
// approximation is valid exactly when the last detail is.
module tb_daa_dwt_multilevel;
  import dwt_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int L   = 3;
  localparam int LAT = 9;
  localparam int NS  = 2000;

  logic in_valid, a_valid;
  logic signed [21:0] x_in, a_out;
  logic               d_valid [L];
  logic signed [21:0] d_out [L];
  daa_dwt_multilevel #(.LEVELS(L)) dut (.clk, .rst_n, .in_valid, .x_in,
    .d_valid, .d_out, .a_valid, .a_out);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint hist [L][4];
  int     cnt [L];
  longint exp_d [L][$];
  longint exp_a [$];
  int     exp_t [$];
  int     nout [L];

  // push one sample into level j of the model
  function automatic void model_in(int j, longint v);
    for (int k = 3; k > 0; k--) hist[j][k] = hist[j][k-1];
    hist[j][0] = v;
    if (cnt[j] % 2 == 0) begin
      longint a;
      a = fir_daa(1'b0, hist[j][0], hist[j][1], hist[j][2], hist[j][3]);
      exp_d[j].push_back(fir_daa(1'b1, hist[j][0], hist[j][1], hist[j][2], hist[j][3]));
      if (j == 0) exp_t.push_back(cyc + 1);
      if (j == L - 1) exp_a.push_back(a);
      else model_in(j + 1, a);
    end
    cnt[j]++;
  endfunction

  task automatic check_out();
    for (int j = 0; j < L; j++) begin
      if (d_valid[j]) begin
        longint ed;
        ed = exp_d[j].pop_front();
        nout[j]++;
        checks++;
        if (longint'(d_out[j]) != ed) begin
          failures++; if (failures < 10) $display("level %0d d: %0d != %0d", j + 1, d_out[j], ed);
        end
        if (j == 0) begin
          int t;
          t = exp_t.pop_front();
          checks++;
          if (cyc - t != LAT) begin failures++; if (failures < 10) $display("latency %0d", cyc - t); end
        end
      end
    end
    checks++;
    if (a_valid !== d_valid[L-1]) begin failures++; $display("a_valid mismatch"); end
    if (a_valid) begin
      longint ea;
      ea = exp_a.pop_front();
      checks++;
      if (longint'(a_out) != ea) begin failures++; if (failures < 10) $display("a: %0d != %0d", a_out, ea); end
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
    for (int j = 0; j < L; j++) begin
      hist[j] = '{0, 0, 0, 0};
      cnt[j] = 0;
      nout[j] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; ) begin
      @(negedge clk);
      check_out();
      in_valid = ($urandom % 5) != 0;
      if (in_valid) begin
        longint xv;
        // smooth signal plus noise, within +-16
        xv = longint'($rtoi(12.0 * $sin(real'(s) / 23.0) * 65536.0)) + longint'($urandom % 65536) - 32768;
        x_in = 22'(xv);
        model_in(0, xv);
        s++;
      end
    end
    repeat (LAT * L + 4) begin
      @(negedge clk);
      in_valid = 1'b0;
      check_out();
    end
    for (int j = 0; j < L; j++) begin
      checks++;
      if (nout[j] != NS >> (j + 1)) begin
        failures++; $display("level %0d outputs %0d of %0d", j + 1, nout[j], NS >> (j + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
