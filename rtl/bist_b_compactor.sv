// BIST-B of the dual ILV BIST: the dual of BIST-A, with the same shape but
// an XNOR between every pair of adjacent ILVs and a balanced OR tree giving
// Y2. On a fault-free bus every XNOR gives 0 and Y2 = 0; an equal neighbour
// pair gives Y2 = 1. Running beside BIST-A it catches ILV faults that a
// stuck-at-1 node inside BIST-A would hide. Structure as in the method.
//
// Interface: ilv_q[N_ILV] in, y2 out. Purely combinational.
module bist_b_compactor #(
  parameter int unsigned N_ILV = 32
) (
  input  logic [N_ILV-1:0] ilv_q,
  output logic             y2
);

  logic [N_ILV-2:0] xn;  // XNOR outputs, xn[i] compares ILV i and ILV i+1

  for (genvar i = 0; i < N_ILV - 1; i++) begin : g_xnor
    assign xn[i] = ~(ilv_q[i] ^ ilv_q[i+1]);
  end

  bist_reduce_tree #(.N_IN(N_ILV - 1), .IS_OR(1'b1)) u_or_tree (
    .d (xn),
    .y (y2)
  );

endmodule
