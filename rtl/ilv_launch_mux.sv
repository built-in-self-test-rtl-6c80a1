// Launch multiplexers of the ILV BIST: one 2:1 mux at the input of every
// ILV. Launch=0 passes functional data (func_d), Launch=1 passes the test
// pattern (test_d). This follows the method directly; the test path never
// touches the functional path except through this mux.
//
// Interface: launch, func_d[N_ILV], test_d[N_ILV] in; ilv_d[N_ILV] out.
// Purely combinational.
module ilv_launch_mux #(
  parameter int unsigned N_ILV = 32
) (
  input  logic             launch,
  input  logic [N_ILV-1:0] func_d,
  input  logic [N_ILV-1:0] test_d,
  output logic [N_ILV-1:0] ilv_d
);

  for (genvar i = 0; i < N_ILV; i++) begin : g_mux
    assign ilv_d[i] = launch ? test_d[i] : func_d[i];
  end

endmodule
