// Tier-1 segment of the enhanced dual-BIST for one ILV bus (the tier that
// drives the ILVs). Vin feeds the inverter chain, whose alternating pattern
// goes through the N_s-stage delay buffers to the test inputs of the launch
// muxes; Launch selects between that pattern and the functional data.
// The structure is the method's; the sub-chain reading of CHAIN_LEN and the
// buffer delay are this design's choices (see the submodules).
//
// Interface: vin, launch, func_d[N_ILV] in; ilv_d[N_ILV] out, to the ILVs.
// Combinational; the test pattern arrives NS*STAGE_DELAY after Vin changes.
module ilv_bist_tier1 #(
  parameter int unsigned N_ILV       = 32,
  parameter int unsigned CHAIN_LEN   = 9,
  parameter int unsigned NS          = 2,
  parameter int unsigned STAGE_DELAY = 20
) (
  input  logic             vin,
  input  logic             launch,
  input  logic [N_ILV-1:0] func_d,
  output logic [N_ILV-1:0] ilv_d
);

  logic [N_ILV-1:0] chain_q;
  logic [N_ILV-1:0] buf_q;
  logic [N_ILV-1:0] test_d;

  ilv_inverter_chain #(.N_ILV(N_ILV), .CHAIN_LEN(CHAIN_LEN)) u_chain (
    .vin     (vin),
    .pattern (chain_q)
  );

  ilv_delay_buffer #(.N_ILV(N_ILV), .NS(NS), .STAGE_DELAY(STAGE_DELAY)) u_buf (
    .a (chain_q),
    .y (buf_q)
  );

  // An odd stage count inverts; undo it so adjacent ILVs stay complementary
  // and the Vin=1 cycle still drives 1010...
  assign test_d = NS[0] ? ~buf_q : buf_q;

  ilv_launch_mux #(.N_ILV(N_ILV)) u_mux (
    .launch (launch),
    .func_d (func_d),
    .test_d (test_d),
    .ilv_d  (ilv_d)
  );

endmodule
