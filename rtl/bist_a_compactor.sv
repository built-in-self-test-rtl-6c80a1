// BIST-A of the dual ILV BIST, on the receiving tier: a 2-input XOR between
// every pair of adjacent ILVs (N_ILV-1 gates, since an ILV can short only to
// its two neighbours) feeding a balanced AND tree whose output is Y1.
// With the alternating test patterns every XOR sees opposite values on a
// fault-free bus, so Y1 = 1; a short, an open or a stuck-at ILV makes some
// neighbour pair equal and pulls Y1 to 0. Structure as in the method.
//
// Interface: ilv_q[N_ILV] in, y1 out. Purely combinational.
module bist_a_compactor #(
  parameter int unsigned N_ILV = 32
) (
  input  logic [N_ILV-1:0] ilv_q,
  output logic             y1
);

  logic [N_ILV-2:0] x;  // XOR outputs, x[i] compares ILV i and ILV i+1

  for (genvar i = 0; i < N_ILV - 1; i++) begin : g_xor
    assign x[i] = ilv_q[i] ^ ilv_q[i+1];
  end

  bist_reduce_tree #(.N_IN(N_ILV - 1), .IS_OR(1'b0)) u_and_tree (
    .d (x),
    .y (y1)
  );

endmodule
