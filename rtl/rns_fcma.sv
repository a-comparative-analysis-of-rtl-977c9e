// rns_fcma - forward converters and modulo adders of an NT-tap RNS FIR filter.
//
// Computes the residues of y[n] = sum_k C[k] * x[n-k] for the moduli
// {2^N - 1, 2^N, 2^(N+1) - 1}. The 16-bit two's complement input is scaled
// by 2^XSHIFT (the "<<" stage, which also registers it) and enters a delay
// line of NT taps (NT = 4 for DB2). Tap k drives an rns_brc holding C[k];
// the NT residue triples are then summed per channel by a tree of registered
// modulo adders (NT - 1 adders per channel, $clog2(NT) levels).
//
// Timing: one sample per clock while in_valid is high; in_valid low freezes
// the delay line. Residues appear 3 + $clog2(NT) clock edges after the edge
// that accepts the sample (BRC 3, adder tree 2 for DB2: 5 in all).
// The block structure follows the document; XSHIFT (default 0), the valid
// signal and the tree shape of the adders are this design's choices.
module rns_fcma
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 7,        // moduli-set parameter n
  parameter int unsigned XSHIFT = 0,        // input scaling shift y
  parameter int unsigned NT     = 4,        // filter taps
  parameter coef_t       C      = DB2_Q11   // taps scaled by 2^11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [15:0]  x_in,
  output logic         out_valid,
  output logic [N-1:0] r1,
  output logic [N-1:0] r2,
  output logic [N:0]   r3
);
  localparam int unsigned LAT = 3 + $clog2(NT);

  logic [15:0]  tap_x [NT];
  logic [N-1:0] b1 [NT];
  logic [N-1:0] b2 [NT];
  logic [N:0]   b3 [NT];
  logic [LAT:0]   vpipe;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NT; k++) tap_x[k] <= '0;
    end else if (in_valid) begin
      tap_x[0] <= x_in << XSHIFT;
      for (int k = 1; k < NT; k++) tap_x[k] <= tap_x[k-1];
    end
  end

  for (genvar k = 0; k < NT; k++) begin : g_tap
    rns_brc #(.N(N), .C(C[k])) u_brc (
      .clk, .rst_n, .x(tap_x[k]), .r1(b1[k]), .r2(b2[k]), .r3(b3[k]));
  end

  rns_mod_adder_tree #(.NIN(NT), .K(N),   .MERSENNE(1'b1)) u_t1 (.clk, .rst_n, .d(b1), .sum(r1));
  rns_mod_adder_tree #(.NIN(NT), .K(N),   .MERSENNE(1'b0)) u_t2 (.clk, .rst_n, .d(b2), .sum(r2));
  rns_mod_adder_tree #(.NIN(NT), .K(N+1), .MERSENNE(1'b1)) u_t3 (.clk, .rst_n, .d(b3), .sum(r3));

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT-1:0], in_valid};
  end
  assign out_valid = vpipe[LAT];
endmodule
