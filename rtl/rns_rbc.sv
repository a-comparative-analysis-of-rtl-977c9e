// rns_rbc - residue-to-binary converter for the moduli set
// {m1, m2, m3} = {2^N - 1, 2^N, 2^(N+1) - 1}, without any ROM.
//
// Mixed-radix reconstruction of X in [0, M), M = m1*m2*m3:
//   X = x2 + 2^N * Y,  Y in [0, m1*m3)
//   Y mod m1 = a = |x1 - x2|_m1            (2^N = 1 mod m1)
//   Y mod m3 = b = |2 * (x3 - x2)|_m3      (2^-N = 2 mod m3)
//   Y = a + m1 * t,  t = |2 * (a - b)|_m3  (m1^-1 = -2 mod m3)
// Subtractions are modulo (2^k - 1) additions of the one's complement,
// multiplications by 2 are one-bit left rotations, and m1 * t is
// (t << N) - t. Since x2 < 2^N, X is the concatenation {Y, x2}.
// Uses three registered modulo adders, one binary add/subtract stage.
//
// Inputs must be canonical residues; out is the unsigned (3N+1)-bit X.
// Timing: one conversion per clock, latency 3 clocks.
// The document fixes the moduli set, the ROM-free approach and the unsigned
// (3N+1)-bit result; this particular derivation is this design's own.
module rns_rbc #(
  parameter int unsigned N = 7          // moduli-set parameter n
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] x1,              // residue mod 2^N - 1
  input  logic [N-1:0] x2,              // residue mod 2^N
  input  logic [N:0]   x3,              // residue mod 2^(N+1) - 1
  output logic         out_valid,
  output logic [3*N:0] x_out
);
  function automatic logic [N:0] rotl1(logic [N:0] v);
    return {v[N-1:0], v[N]};
  endfunction

  // Stage 1: a = |x1 - x2|_m1, u = |x3 - x2|_m3
  logic [N-1:0] a_s1;
  logic [N:0]   u_s1;
  logic [N-1:0] x2_s1, x2_s2, a_s2;
  mod_adder_mersenne #(.K(N))   u_sub1 (.clk, .rst_n, .a(x1), .b(~x2),          .z(a_s1));
  mod_adder_mersenne #(.K(N+1)) u_sub3 (.clk, .rst_n, .a(x3), .b(~{1'b0, x2}),  .z(u_s1));

  // Stage 2: v = |a - 2u|_m3
  logic [N:0] v_s2;
  mod_adder_mersenne #(.K(N+1)) u_sub2 (.clk, .rst_n, .a({1'b0, a_s1}), .b(~rotl1(u_s1)), .z(v_s2));

  // Stage 3: Y = a + (2^N - 1) * t, t = 2v
  logic [N:0]     t;
  logic [2*N:0]   y_wide;   // Y < m1*m3 < 2^(2N+1)
  always_comb begin
    t      = rotl1(v_s2);
    y_wide = {{(N+1){1'b0}}, a_s2} + {t, {N{1'b0}}} - {{N{1'b0}}, t};
  end

  logic [2:0] vpipe;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x2_s1 <= '0; x2_s2 <= '0; a_s2 <= '0;
      x_out <= '0; vpipe <= '0;
    end else begin
      x2_s1 <= x2;
      x2_s2 <= x2_s1;
      a_s2  <= a_s1;
      x_out <= {y_wide, x2_s2};
      vpipe <= {vpipe[1:0], in_valid};
    end
  end
  assign out_valid = vpipe[2];
endmodule
