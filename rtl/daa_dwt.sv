// daa_dwt - one level of the Daubechies (DB2 by default) discrete wavelet
// transform built from
// distributed-arithmetic filters.
//
// The 22-bit Q5.16 input stream feeds a low-pass (h) and a high-pass (g)
// daa_fir in parallel; each output is down-sampled by two. a_out is the
// approximation a1[n] = sum_k h[k] x[2n-k], d_out the detail
// d1[n] = sum_k g[k] x[2n-k], both Q5.16, produced together (out_valid) once
// per two accepted input samples. The pair for x[2n] appears 9 clock edges
// after the edge that accepts x[2n] (8 in the filter, 1 in the
// down-sampler), i.e. in the 10th clock cycle counting the one in which the
// sample is presented.
// The filter structure follows the document; instantiating a separate
// high-pass filter next to the low-pass one is this design's choice.
module daa_dwt
  import dwt_pkg::*;
#(
  parameter wavelet_e    WAVELET = DB2,  // DB2 (4 taps), DB4 (8), DB5 (10)
  parameter int unsigned W       = 22,
  parameter int unsigned FRAC    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in,
  output logic                out_valid,
  output logic signed [W-1:0] a_out,
  output logic signed [W-1:0] d_out
);
  localparam int unsigned NT = ntaps(WAVELET);

  logic                lo_v, hi_v, hi_ds_v;
  logic signed [W-1:0] lo_y, hi_y;

  daa_fir #(.NT(NT), .W(W), .FRAC(FRAC), .COEF(taps(WAVELET, LOW_PASS, 1'b1))) u_lo (
    .clk, .rst_n, .in_valid, .x_in, .out_valid(lo_v), .y_out(lo_y));
  daa_fir #(.NT(NT), .W(W), .FRAC(FRAC), .COEF(taps(WAVELET, HIGH_PASS, 1'b1))) u_hi (
    .clk, .rst_n, .in_valid, .x_in, .out_valid(hi_v), .y_out(hi_y));

  dwt_downsample #(.W(W)) u_ds_lo (
    .clk, .rst_n, .in_valid(lo_v), .d_in(lo_y), .out_valid(out_valid), .d_out(a_out));
  dwt_downsample #(.W(W)) u_ds_hi (
    .clk, .rst_n, .in_valid(hi_v), .d_in(hi_y), .out_valid(hi_ds_v), .d_out(d_out));

  // Both branches run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) hi_ds_v == out_valid);
endmodule
