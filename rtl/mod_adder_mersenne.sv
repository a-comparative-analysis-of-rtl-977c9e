// mod_adder_mersenne - registered modulo (2^K - 1) adder.
//
// z = |a + b|_(2^K - 1). A K-bit adder forms s = a + b + 1 with carry-out c;
// a subtractor then removes the inverted carry: z = s - !c. When a + b reaches
// 2^K - 1 the +1 overflows the adder, the carry is set and s is already the
// reduced sum; otherwise nothing was reduced and the extra 1 is taken back.
// Inputs may be any K-bit value (2^K - 1 is read as a second code for zero);
// if at least one input is below 2^K - 1 the result is in [0, 2^K - 2].
// The adder/subtractor structure is the document's; the output register,
// giving a latency of one clock, follows its remark that each modulo adder is
// delayed by one clock. Synchronous active-low reset clears the output.
module mod_adder_mersenne #(
  parameter int unsigned K = 7          // modulus is 2^K - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  output logic [K-1:0] z
);
  logic [K:0]   sum;      // {carry, s} of a + b + 1
  logic [K-1:0] diff;

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b} + {{K{1'b0}}, 1'b1};
    diff = sum[K-1:0] - {{(K-1){1'b0}}, ~sum[K]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) z <= '0;
    else        z <= diff;
  end
endmodule
