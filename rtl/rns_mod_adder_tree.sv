// rns_mod_adder_tree - pipelined tree of registered modulo adders that sums
// NIN residues of one RNS channel.
//
// MERSENNE = 1 selects modulo (2^K - 1) adders, 0 selects modulo 2^K adders.
// Each level adds neighbouring pairs; an odd operand left over at a level is
// carried to the next level through a plain register, so every operand sees
// the same delay. The sum appears $clog2(NIN) clocks after the operands.
module rns_mod_adder_tree #(
  parameter int unsigned NIN      = 4,    // number of operands (>= 2)
  parameter int unsigned K        = 7,    // residue width
  parameter bit          MERSENNE = 1'b1  // 1: mod 2^K-1, 0: mod 2^K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] d [NIN],
  output logic [K-1:0] sum
);
  localparam int unsigned L = $clog2(NIN);

  // operands at level lv: ceil(NIN / 2^lv)
  function automatic int unsigned cnt(int unsigned lv);
    return (NIN + (1 << lv) - 1) >> lv;
  endfunction

  for (genvar lv = 0; lv <= L; lv++) begin : g_lvl
    logic [K-1:0] s [cnt(lv)];
    if (lv == 0) begin : g_in
      assign s = d;
    end else begin : g_add
      for (genvar i = 0; i < cnt(lv); i++) begin : g_node
        if (2 * i + 1 < cnt(lv - 1)) begin : g_pair
          if (MERSENNE) begin : g_m
            mod_adder_mersenne #(.K(K)) u_add (
              .clk, .rst_n, .a(g_lvl[lv-1].s[2*i]), .b(g_lvl[lv-1].s[2*i+1]), .z(s[i]));
          end else begin : g_p
            mod_adder_pow2 #(.K(K)) u_add (
              .clk, .rst_n, .a(g_lvl[lv-1].s[2*i]), .b(g_lvl[lv-1].s[2*i+1]), .z(s[i]));
          end
        end else begin : g_pass
          always_ff @(posedge clk) begin
            if (!rst_n) s[i] <= '0;
            else        s[i] <= g_lvl[lv-1].s[2*i];
          end
        end
      end
    end
  end

  assign sum = g_lvl[L].s[0];
endmodule
