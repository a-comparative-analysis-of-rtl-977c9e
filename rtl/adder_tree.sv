// adder_tree - pipelined binary tree of two-input adders.
//
// Sums N signed W-bit operands. The operands are padded with zeros to the
// next power of two and reduced pairwise, one registered level per clock, so
// the sum appears $clog2(N) clocks after the operands (N-1 real adders; the
// padded ones fold away as additions of zero). Wrap-around arithmetic at W
// bits: the caller sizes W for the largest sum. No reset is needed for the
// data path; validity is tracked by the instantiating module.
module adder_tree #(
  parameter int unsigned N = 22,        // number of operands (N >= 2)
  parameter int unsigned W = 32         // operand and sum width
) (
  input  logic                clk,
  input  logic signed [W-1:0] d [N],
  output logic signed [W-1:0] sum
);
  localparam int unsigned L  = $clog2(N);
  localparam int unsigned NP = 1 << L;

  for (genvar lv = 0; lv <= L; lv++) begin : g_lvl
    logic signed [W-1:0] s [NP >> lv];
    if (lv == 0) begin : g_in
      for (genvar i = 0; i < NP; i++) begin : g_pad
        if (i < N) begin : g_op
          assign s[i] = d[i];
        end else begin : g_zero
          assign s[i] = '0;
        end
      end
    end else begin : g_add
      for (genvar i = 0; i < (NP >> lv); i++) begin : g_node
        always_ff @(posedge clk) s[i] <= g_lvl[lv-1].s[2*i] + g_lvl[lv-1].s[2*i+1];
      end
    end
  end

  assign sum = g_lvl[L].s[0];
endmodule
