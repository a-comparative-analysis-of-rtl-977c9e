// mod_adder_pow2 - registered modulo 2^K adder.
//
// z = |a + b|_(2^K): the low K bits of the binary sum, the carry is dropped.
// Latency is one clock to match the modulo (2^K - 1) adders it runs beside,
// so the three residue channels stay aligned. Synchronous active-low reset.
module mod_adder_pow2 #(
  parameter int unsigned K = 7          // modulus is 2^K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  output logic [K-1:0] z
);
  always_ff @(posedge clk) begin
    if (!rst_n) z <= '0;
    else        z <= a + b;
  end
endmodule
