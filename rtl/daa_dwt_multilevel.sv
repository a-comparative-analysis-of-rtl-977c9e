// daa_dwt_multilevel - cascade of LEVELS distributed-arithmetic DWT levels
// (multilevel wavelet decomposition).
//
// Level 1 filters the input stream; level j+1 filters the approximation
// a_j of level j, which has the same 22-bit Q5.16 format as the input, so
// the levels connect directly (out_valid of one level is in_valid of the
// next). Every level delivers its detail d_j (d_valid[j-1], d_out[j-1]); the
// last level also delivers the final approximation a_LEVELS (a_valid,
// a_out). Level j produces one output per 2^j input samples; each level adds
// 9 clock edges of latency. The default of one level is the configuration
// built and evaluated; the cascade structure (identical filter banks on the
// decimated low-pass output) follows the multilevel decomposition. Memory
// grows as the sum over the levels: 44 ROMs of 2^NT x 22 bits per level.
module daa_dwt_multilevel
  import dwt_pkg::*;
#(
  parameter int unsigned LEVELS  = 1,     // decomposition levels
  parameter wavelet_e    WAVELET = DB2,
  parameter int unsigned W       = 22,
  parameter int unsigned FRAC    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in,
  output logic                d_valid [LEVELS],
  output logic signed [W-1:0] d_out [LEVELS],
  output logic                a_valid,
  output logic signed [W-1:0] a_out
);
  logic                lv_valid [LEVELS+1];
  logic signed [W-1:0] lv_a [LEVELS+1];

  assign lv_valid[0] = in_valid;
  assign lv_a[0]     = x_in;

  for (genvar j = 0; j < LEVELS; j++) begin : g_level
    daa_dwt #(.WAVELET(WAVELET), .W(W), .FRAC(FRAC)) u_dwt (
      .clk, .rst_n,
      .in_valid(lv_valid[j]), .x_in(lv_a[j]),
      .out_valid(lv_valid[j+1]), .a_out(lv_a[j+1]), .d_out(d_out[j]));
    assign d_valid[j] = lv_valid[j+1];
  end

  assign a_valid = lv_valid[LEVELS];
  assign a_out   = lv_a[LEVELS];
endmodule
