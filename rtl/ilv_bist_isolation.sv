// Switches between the ILV outputs and the receiving-tier BIST logic. The
// method uses transmission gates that open in functional mode so that the
// BIST gates stop toggling with functional traffic and burn no switching
// power. An open transmission gate leaves a floating node, which has no
// two-state equivalent; here the switch is written as gating that parks
// each BIST input at a constant while test_en is 0. The constant is the
// alternating 1010... pattern, so the compactors sit at a passing signature
// (Y1=1, Y2=0). The parking value is this design's choice.
//
// Interface: test_en, ilv_q[N_ILV] in; bist_q[N_ILV] out. Combinational.
module ilv_bist_isolation #(
  parameter int unsigned N_ILV = 32
) (
  input  logic             test_en,
  input  logic [N_ILV-1:0] ilv_q,
  output logic [N_ILV-1:0] bist_q
);

  for (genvar i = 0; i < N_ILV; i++) begin : g_sw
    localparam bit PARK = (i % 2 == 0);
    assign bist_q[i] = test_en ? ilv_q[i] : PARK;
  end

endmodule
