// rns_brc - binary-to-residue converter that also multiplies by one constant
// filter tap (forward converter of the RNS filter).
//
// Converts C * x, for a 16-bit two's complement sample x, into residues for
// the moduli {2^N - 1, 2^N, 2^(N+1) - 1}. The sample is cut into four 4-bit
// slices x[3:0], x[7:4], x[11:8], x[15:12]; each slice addresses an rns_rom
// that returns the packed residues of C * slice. The slice at bit position
// s = 0, 4, 8, 12 must still be multiplied by 2^s: for 2^N - 1 and
// 2^(N+1) - 1 this is a left rotation by s (mod N, mod N+1), for 2^N a plain
// left shift by s (bits beyond N fall away). The four shifted residues of
// each channel are summed by a two-level tree of registered modulo adders.
//
// Ports: x (sample), r1/r2/r3 (residues mod 2^N-1, 2^N, 2^(N+1)-1).
// Timing: fully pipelined, one sample per clock, latency 3 clocks
// (ROM read, two adder levels). All outputs are canonical residues.
// Slicing, packed ROMs, rotate/shift and modulo-adder sums follow the
// document; the signed top slice and the adder-tree shape are this design's.
module rns_brc
  import dwt_pkg::*;
#(
  parameter int unsigned N = 7,         // moduli-set parameter n
  parameter int          C = 989        // tap scaled by 2^11
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [15:0]   x,
  output logic [N-1:0]  r1,
  output logic [N-1:0]  r2,
  output logic [N:0]    r3
);
  localparam int unsigned NSL = 4;      // number of 4-bit slices

  // Left rotations by s positions of an N-bit and an (N+1)-bit value.
  function automatic logic [N-1:0] rotl_n(logic [N-1:0] v, int unsigned s);
    logic [N-1:0] r;
    for (int unsigned i = 0; i < N; i++) r[(i + s) % N] = v[i];
    return r;
  endfunction
  function automatic logic [N:0] rotl_n1(logic [N:0] v, int unsigned s);
    logic [N:0] r;
    for (int unsigned i = 0; i <= N; i++) r[(i + s) % (N + 1)] = v[i];
    return r;
  endfunction

  logic [N-1:0] s1 [NSL];
  logic [N-1:0] s2 [NSL];
  logic [N:0]   s3 [NSL];

  for (genvar sl = 0; sl < NSL; sl++) begin : g_slice
    logic [3*N:0] q;
    rns_rom #(.N(N), .C(C), .SIGNED_SLICE(sl == NSL - 1)) u_rom (
      .clk(clk), .addr(x[4*sl +: 4]), .q(q));

    always_comb begin
      s1[sl] = rotl_n(q[3*N -: N], (4 * sl) % N);
      s2[sl] = q[2*N -: N] << (4 * sl);
      s3[sl] = rotl_n1(q[N:0], (4 * sl) % (N + 1));
    end
  end

  // Two-level modulo adder trees, one per channel.
  rns_mod_adder_tree #(.NIN(NSL), .K(N),   .MERSENNE(1'b1)) u_t1 (.clk, .rst_n, .d(s1), .sum(r1));
  rns_mod_adder_tree #(.NIN(NSL), .K(N),   .MERSENNE(1'b0)) u_t2 (.clk, .rst_n, .d(s2), .sum(r2));
  rns_mod_adder_tree #(.NIN(NSL), .K(N+1), .MERSENNE(1'b1)) u_t3 (.clk, .rst_n, .d(s3), .sum(r3));
endmodule
