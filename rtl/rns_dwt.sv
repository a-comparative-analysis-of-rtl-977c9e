// rns_dwt - one level of the Daubechies (DB2 by default) discrete wavelet
// transform computed in a
// residue number system with moduli {2^N - 1, 2^N, 2^(N+1) - 1}.
//
// The 16-bit two's complement input feeds a low-pass and a high-pass
// rns_fcma (taps round(h*2^11) and round(g*2^11)); each residue triple is
// turned back into binary by an rns_rbc. Signed values are mapped onto
// [0, M): results of M/2 and above stand for X - M, which the decode stage
// undoes. Each branch is then down-sampled by two. Outputs are the exact
// integers a1[n] = sum_k H[k] x'[2n-k] and d1[n] = sum_k G[k] x'[2n-k]
// (x' = x << XSHIFT); as fixed-point numbers they carry 11 + XSHIFT
// fraction bits plus those of the input. They are exact while
// |x'| * sum|H| < M/2 (for N = 7: |x'| <= 604; for N = 10: any 16-bit x).
//
// Timing: one sample per clock while in_valid is high; a1/d1 pair every two
// accepted samples. The pair for x[2n] appears 5 (FCMA) + 3 (RBC) +
// 1 (sign decode) + 1 (down-sampler) = 10 clock edges after the edge that
// accepts x[2n].
// FCMA/RBC partitioning follows the document; the signed mapping details,
// the separate high-pass branch and the pipeline are this design's.
module rns_dwt
  import dwt_pkg::*;
#(
  parameter int unsigned N       = 7,    // moduli-set parameter n (P7)
  parameter int unsigned XSHIFT  = 0,    // input scaling shift y
  parameter wavelet_e    WAVELET = DB2   // DB2 (4 taps), DB4 (8), DB5 (10)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [15:0]  x_in,
  output logic                out_valid,
  output logic signed [3*N:0] a_out,
  output logic signed [3*N:0] d_out
);
  localparam longint M     = ((64'd1 << N) - 1) * (64'd1 << N) * ((64'd1 << (N + 1)) - 1);
  localparam longint HALF  = M / 2;
  localparam int unsigned NT = ntaps(WAVELET);

  logic [1:0] fv, rv, dv, hi_ds_v;
  logic signed [3*N:0] y_dec [2];

  for (genvar b = 0; b < 2; b++) begin : g_branch
    logic [N-1:0] r1, r2;
    logic [N:0]   r3;
    logic [3*N:0] xu;
    logic signed [3*N:0] ys;

    rns_fcma #(.N(N), .XSHIFT(XSHIFT), .NT(NT),
               .C(taps(WAVELET, b == 0 ? LOW_PASS : HIGH_PASS, 1'b0))) u_fcma (
      .clk, .rst_n, .in_valid, .x_in(x_in), .out_valid(fv[b]), .r1, .r2, .r3);

    rns_rbc #(.N(N)) u_rbc (
      .clk, .rst_n, .in_valid(fv[b]), .x1(r1), .x2(r2), .x3(r3),
      .out_valid(rv[b]), .x_out(xu));

    // Signed decode: [M/2, M) -> [-M/2, 0)
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        dv[b] <= 1'b0;
        ys    <= '0;
      end else begin
        dv[b] <= rv[b];
        ys    <= (64'(xu) >= 64'(HALF)) ? signed'(xu - (3*N+1)'(M)) : signed'(xu);
      end
    end
    assign y_dec[b] = ys;
  end

  dwt_downsample #(.W(3*N+1)) u_ds_lo (
    .clk, .rst_n, .in_valid(dv[0]), .d_in(y_dec[0]), .out_valid(out_valid), .d_out(a_out));
  dwt_downsample #(.W(3*N+1)) u_ds_hi (
    .clk, .rst_n, .in_valid(dv[1]), .d_in(y_dec[1]), .out_valid(hi_ds_v[1]), .d_out(d_out));
  assign hi_ds_v[0] = out_valid;

  // Both branches run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) hi_ds_v[1] == hi_ds_v[0]);
endmodule
