// adder_tree: binary tree of ripple-carry adders over N_IN signed words.
//
// In the error-computation block there is one tree per place value: it adds
// the partial products of the same radix-4 digit from all N taps, so that the
// shift-add step is done once on the sums rather than once per tap.
// Stage s (s = 1 .. log2 N_IN) adds neighbouring pairs of stage s-1 results.
// Inputs are sign-extended to the output width OW = IW + log2(N_IN), which
// holds the exact sum; every adder is an OW-bit rca.
// p holds input k in bits [k*IW +: IW]. N_IN must be a power of two.
// Purely combinational; pipeline registers, if wanted, go outside.
// Defaults: N_IN = 4 taps, IW = 18 (W + 2).
module adder_tree #(
  parameter int unsigned N_IN = 4,
  parameter int unsigned IW   = 18,
  localparam int unsigned LOG = $clog2(N_IN),
  localparam int unsigned OW  = IW + LOG
) (
  input  logic [N_IN*IW-1:0] p,
  output logic [OW-1:0]      q
);
  // g_stage[s].lvl[k]: k-th sum of stage s (stage 0: the sign-extended inputs).
  for (genvar s = 0; s <= LOG; s++) begin : g_stage
    logic [OW-1:0] lvl [N_IN >> s];
    if (s == 0) begin : g_leaf
      for (genvar k = 0; k < N_IN; k++) begin : g_k
        assign lvl[k] = OW'($signed(p[k*IW +: IW]));
      end
    end else begin : g_adders
      for (genvar k = 0; k < (N_IN >> s); k++) begin : g_k
        logic cout_unused;
        rca #(.WIDTH(OW)) u_add (
          .a(g_stage[s-1].lvl[2*k]), .b(g_stage[s-1].lvl[2*k+1]), .cin(1'b0),
          .sum(lvl[k]), .cout(cout_unused)
        );
      end
    end
  end

  assign q = g_stage[LOG].lvl[0];
endmodule
