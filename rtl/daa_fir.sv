// daa_fir - NT-tap FIR filter computed by distributed arithmetic (no multipliers).
//
// The input is a stream of 22-bit signed Q5.16 samples (bit 21 is the sign).
// A delay line keeps the last NT samples x[n..n-NT+1] (NT = 4 for DB2). For
// every bit position l (0..21) a daa_rom is addressed by bit l of these;
// its output is the bit column's partial inner product, weighted by 2^(l-16):
// shifted right by 16-l for l < 16 (arithmetic, truncating), left by l-16 for
// l > 16. The sign column (l = 21) carries weight -2^5 and is negated
// (two's complement input). The 22 weighted partials are summed by a
// pipelined 21-adder tree; the result is the Q5.16 value of
// y[n] = sum_k COEF[k] * x[n-k], wrapped to 22 bits. The tree works at
// W + (W - FRAC) + 5 bits so that no partial overflows; only the low W bits
// of its sum are kept, and lint reports the upper bits as unused on purpose.
//
// Timing: one sample per clock when in_valid is held high; in_valid low
// freezes the delay line (no sample). The result for a sample appears
// 8 clock edges after the edge that accepts it: ROM read, shift register,
// 5 adder-tree levels, output register (the accepting edge loads the delay
// line).
// From the document: 22 ROMs of 2^NT x 22 bits, the per-bit shift by (16-l),
// the adder tree and the sign handling. The pipeline registers, the valid
// signal and wrap-around on overflow are this design's choices.
module daa_fir
  import dwt_pkg::*;
#(
  parameter int unsigned NT   = 4,      // filter taps
  parameter int unsigned W    = 22,     // sample and result width
  parameter int unsigned FRAC = 16,     // binary-point bits
  parameter coef_t       COEF = DB2_Q16 // filter taps in Q5.16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in,
  output logic                out_valid,
  output logic signed [W-1:0] y_out
);
  localparam int unsigned SW  = W + (W - FRAC) + 5;   // partial/sum width
  localparam int unsigned LAT_TREE = $clog2(W);

  logic [W-1:0]        tap_x [NT];                 // tap_x[k] = x[n-k]
  logic signed [W-1:0] rom_q [W];
  logic signed [SW-1:0] part [W];
  logic signed [SW-1:0] sum;
  logic [LAT_TREE+2:0] vpipe;                         // valid through rom, shift, tree

  // Delay line: tap 0 is the newest sample.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NT; k++) tap_x[k] <= '0;
    end else if (in_valid) begin
      tap_x[0] <= x_in;
      for (int k = 1; k < NT; k++) tap_x[k] <= tap_x[k-1];
    end
  end

  // One ROM per bit column.
  for (genvar l = 0; l < W; l++) begin : g_bit
    logic [NT-1:0] addr;
    always_comb
      for (int k = 0; k < NT; k++) addr[k] = tap_x[k][l];

    daa_rom #(.NT(NT), .W(W), .COEF(COEF)) u_rom (.clk(clk), .addr(addr), .q(rom_q[l]));

    // Weight 2^(l-FRAC); the sign column is subtracted.
    logic signed [SW-1:0] wide, shifted;
    always_comb begin
      wide = SW'(rom_q[l]);
      if (l >= FRAC) shifted = wide <<< (l - FRAC);
      else           shifted = wide >>> (FRAC - l);
    end
    always_ff @(posedge clk)
      part[l] <= (l == W - 1) ? -shifted : shifted;
  end

  adder_tree #(.N(W), .W(SW)) u_tree (.clk(clk), .d(part), .sum(sum));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vpipe     <= '0;
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      // vpipe[0]: taps updated, [1]: ROM out, [2]: partials, [2+LAT_TREE]: sum
      vpipe     <= {vpipe[LAT_TREE+1:0], in_valid};
      out_valid <= vpipe[LAT_TREE+2];
      y_out     <= sum[W-1:0];
    end
  end
endmodule
