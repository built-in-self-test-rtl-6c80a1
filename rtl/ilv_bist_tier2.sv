// Tier-2 segment of the dual ILV BIST for one bus (the tier the ILVs drive):
// the isolation switches followed by BIST-A (XOR/AND, Y1) and BIST-B
// (XNOR/OR, Y2) working on the same ILV outputs. The functional receivers
// take the ILV outputs directly, ahead of the switches. Structure as in
// the method.
//
// Interface: test_en, ilv_q[N_ILV] in; y1, y2 out. Combinational.
module ilv_bist_tier2 #(
  parameter int unsigned N_ILV = 32
) (
  input  logic             test_en,
  input  logic [N_ILV-1:0] ilv_q,
  output logic             y1,
  output logic             y2
);

  logic [N_ILV-1:0] bist_q;

  ilv_bist_isolation #(.N_ILV(N_ILV)) u_iso (
    .test_en (test_en),
    .ilv_q   (ilv_q),
    .bist_q  (bist_q)
  );

  bist_a_compactor #(.N_ILV(N_ILV)) u_bist_a (
    .ilv_q (bist_q),
    .y1    (y1)
  );

  bist_b_compactor #(.N_ILV(N_ILV)) u_bist_b (
    .ilv_q (bist_q),
    .y2    (y2)
  );

endmodule
