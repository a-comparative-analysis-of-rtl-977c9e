// daa_rom - bit-level look-up table of a distributed-arithmetic FIR filter.
//
// One ROM serves one bit position l of the input word. Its NT-bit address is
// formed from bit l of the NT most recent samples (address bit k = bit l of
// x[n-k]); the word at address a is sum_k a[k] * COEF[k], i.e. every possible
// partial inner product of one bit column with the filter taps. COEF holds the
// coefficients already scaled to Q5.16, so the word is a 22-bit Q5.16 value.
// The table is filled at elaboration from COEF (2^NT words of W bits; 16 for
// the 4-tap DB2 filter).
// Read is registered (block-RAM style): data appears one clock after addr.
// Table size (16 x 22 for DB2) follows the document; the registered read is this
// design's choice.
module daa_rom
  import dwt_pkg::*;
#(
  parameter int unsigned NT   = 4,        // filter taps = address bits
  parameter int unsigned W    = 22,       // word width (Q5.16)
  parameter coef_t       COEF = DB2_Q16   // filter taps, scaled by 2^16
) (
  input  logic                clk,
  input  logic [NT-1:0]       addr,
  output logic signed [W-1:0] q
);
  localparam int unsigned DEPTH = 1 << NT;

  logic signed [W-1:0] mem [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      int acc;
      acc = 0;
      for (int k = 0; k < NT; k++)
        if (((a >> k) & 1) != 0) acc += COEF[k];
      mem[a] = W'(acc);
    end
  end

  always_ff @(posedge clk) q <= mem[addr];
endmodule
