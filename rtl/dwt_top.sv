// dwt_top - the two multiplier-free DWT architectures side by side (one level
// each by default)
// (Daubechies DB2 by default; DB4 and DB5 selectable per datapath).
//
//   daa_*  distributed-arithmetic DWT: 22-bit Q5.16 samples in, Q5.16
//          approximation (a) and detail (d) coefficients out, one pair per
//          two samples, 9 clocks after the accepting edge. DAA_LEVELS > 1
//          cascades further levels on the approximation; daa_d[j] and
//          daa_d_valid[j] then carry the detail of level j+1 and daa_a the
//          approximation of the last level. Default: one level.
//   rns_*  residue-number-system DWT with moduli {2^N-1, 2^N, 2^(N+1)-1}
//          (N = 7 by default: 127, 128, 255): 16-bit integer samples in,
//          exact (3N+1)-bit integer a/d coefficients out (taps scaled by
//          2^11), one pair per two samples, 10 clocks after the accepting edge.
// The two datapaths share only the clock and reset; each has its own
// in_valid/out_valid stream interface.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int unsigned DAA_LEVELS  = 1,
  parameter wavelet_e    DAA_WAVELET = DB2,
  parameter wavelet_e    RNS_WAVELET = DB2,
  parameter int unsigned RNS_N       = 7,
  parameter int unsigned RNS_XSHIFT  = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // distributed-arithmetic DWT
  input  logic                    daa_in_valid,
  input  logic signed [21:0]      daa_x,
  output logic                    daa_out_valid,              // a (last level) valid
  output logic signed [21:0]      daa_a,                      // last-level approximation
  output logic                    daa_d_valid [DAA_LEVELS],   // detail of level j+1 valid
  output logic signed [21:0]      daa_d [DAA_LEVELS],         // detail of level j+1
  // residue-number-system DWT
  input  logic                    rns_in_valid,
  input  logic signed [15:0]      rns_x,
  output logic                    rns_out_valid,
  output logic signed [3*RNS_N:0] rns_a,
  output logic signed [3*RNS_N:0] rns_d
);
  daa_dwt_multilevel #(.LEVELS(DAA_LEVELS), .WAVELET(DAA_WAVELET), .W(22), .FRAC(16)) u_daa (
    .clk, .rst_n, .in_valid(daa_in_valid), .x_in(daa_x),
    .d_valid(daa_d_valid), .d_out(daa_d), .a_valid(daa_out_valid), .a_out(daa_a));

  rns_dwt #(.N(RNS_N), .XSHIFT(RNS_XSHIFT), .WAVELET(RNS_WAVELET)) u_rns (
    .clk, .rst_n, .in_valid(rns_in_valid), .x_in(rns_x),
    .out_valid(rns_out_valid), .a_out(rns_a), .d_out(rns_d));
endmodule
