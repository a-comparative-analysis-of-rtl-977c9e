// rns_rom - nibble look-up table of the binary-to-residue converter.
//
// Holds, for a 4-bit input slice j, the residues of C * j for the moduli set
// {m1, m2, m3} = {2^N - 1, 2^N, 2^(N+1) - 1}, packed in one (3N+1)-bit word:
//   word = |C*j|_m1 * 2^(2N+1) + |C*j|_m2 * 2^(N+1) + |C*j|_m3
// (bits [3N:2N+1] = m1 residue, [2N:N+1] = m2 residue, [N:0] = m3 residue),
// so no logic is needed to separate the channels. C is the filter tap scaled
// by 2^11. When SIGNED_SLICE is set the slice is the top nibble of a two's
// complement word and j >= 8 stands for j - 16; negative products are stored
// as their non-negative residues. Registered read, one clock.
// Packing and the 16-entry size follow the document; the signed top slice is
// this design's way to accept negative inputs.
module rns_rom
  import dwt_pkg::*;
#(
  parameter int unsigned N            = 7,     // moduli-set parameter n
  parameter int          C            = 989,   // scaled coefficient
  parameter bit          SIGNED_SLICE = 1'b0
) (
  input  logic           clk,
  input  logic [3:0]     addr,
  output logic [3*N:0]   q
);
  localparam longint M1 = (64'd1 << N) - 1;
  localparam longint M2 = (64'd1 << N);
  localparam longint M3 = (64'd1 << (N + 1)) - 1;

  logic [3*N:0] mem [16];

  initial begin
    for (int j = 0; j < 16; j++) begin
      longint v;
      v = (SIGNED_SLICE && j >= 8) ? longint'(j) - 64'sd16 : longint'(j);
      v = v * longint'(C);
      mem[j] = {N'(mod_pos(v, M1)), N'(mod_pos(v, M2)), (N+1)'(mod_pos(v, M3))};
    end
  end

  always_ff @(posedge clk) q <= mem[addr];
endmodule
