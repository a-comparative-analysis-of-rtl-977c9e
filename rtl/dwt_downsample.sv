// dwt_downsample - down-sampling by two of a filter output stream.
//
// Keeps the outputs that belong to even input indices (0, 2, 4, ... counted
// from reset) and drops the odd ones, so y[n] = f[2n] as in the DWT analysis
// equation y_low[n] = sum_k h[k] x[2n-k]. A phase flag toggles on every
// in_valid; the kept sample is registered (one clock latency).
// Which phase is kept is this design's choice; the document gives only the
// factor of two.
module dwt_downsample #(
  parameter int unsigned W = 22         // data width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] d_in,
  output logic         out_valid,
  output logic [W-1:0] d_out
);
  logic odd;                            // next input has an odd index

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      odd       <= 1'b0;
      out_valid <= 1'b0;
      d_out     <= '0;
    end else begin
      out_valid <= in_valid && !odd;
      if (in_valid) begin
        odd <= !odd;
        if (!odd) d_out <= d_in;
      end
    end
  end
endmodule
