// shift_add_tree: combines radix-4 place-value words into one product or sum.
//
// Input q_j (j = 0 .. N_IN-1) has place value 4^j. Stage 1 forms
// q_2k + (q_2k+1 << 2); stage s in general adds neighbouring pairs of stage
// s-1 results with the upper one shifted left by 2^s bits (<<2, then <<4, ...).
// After log2(N_IN) stages the result is sum_j q_j * 4^j. With N_IN = L/2 that
// is log2(L) - 1 stages. Inputs are sign-extended to OW bits and every adder
// is an OW-bit rca. OW must hold the final value; the result is modulo 2^OW.
// q holds q_j in bits [j*IW +: IW]. N_IN must be a power of two.
// Purely combinational.
// Defaults: N_IN = 4 (L = 8), IW = 20 (W + 2 + log2 N), OW = 26 (W + L + log2 N),
// with W = 16 being this design's choice.
module shift_add_tree #(
  parameter int unsigned N_IN = 4,
  parameter int unsigned IW   = 20,
  parameter int unsigned OW   = 26,
  localparam int unsigned LOG = $clog2(N_IN)
) (
  input  logic [N_IN*IW-1:0] q,
  output logic [OW-1:0]      s
);
  // g_stage[st].lvl[k]: k-th sum of stage st (stage 0: the sign-extended inputs).
  for (genvar st = 0; st <= LOG; st++) begin : g_stage
    logic [OW-1:0] lvl [N_IN >> st];
    if (st == 0) begin : g_leaf
      for (genvar k = 0; k < N_IN; k++) begin : g_k
        assign lvl[k] = OW'($signed(q[k*IW +: IW]));
      end
    end else begin : g_adders
      for (genvar k = 0; k < (N_IN >> st); k++) begin : g_k
        logic [OW-1:0] upper;
        logic          cout_unused;
        assign upper = g_stage[st-1].lvl[2*k+1] << (1 << st);
        rca #(.WIDTH(OW)) u_add (
          .a(g_stage[st-1].lvl[2*k]), .b(upper), .cin(1'b0),
          .sum(lvl[k]), .cout(cout_unused)
        );
      end
    end
  end

  assign s = g_stage[LOG].lvl[0];
endmodule
