// Enhanced dual built-in self-test for the inter-layer vias (ILVs) of a
// two-tier monolithic 3D IC, for N_BUS buses of N_ILV vias each.
//
// On Tier 1 every bus has a test source: an inverter chain that turns the
// single signal Vin into complementary values on neighbouring ILVs, an
// N_s-stage delay buffer per ILV, and a launch mux per ILV that chooses
// functional or test data. On Tier 2 the ILV outputs pass through isolation
// switches into two compactors that reduce the bus to a 2-bit signature:
// Y1 = AND of the XORs of neighbour pairs, Y2 = OR of their XNORs. Two test
// cycles (Vin=1, then Vin=0) expose every hard short, open and stuck-at on
// the bus, and the dual compactor keeps a single stuck-at inside the BIST
// from hiding an ILV fault. A shared controller runs the two cycles and
// grades each bus, which localises a fault to its bus.
//
// The vias themselves are physical and lie outside this module: ilv_tx is
// the Tier-1 end of every via, ilv_rx the Tier-2 end. Connect ilv_rx to
// ilv_tx directly, or through a model of the vias.
//
// Interface: see the port list. func_tx is the Tier-1 functional data,
// func_rx the Tier-2 functional data (the via outputs, ahead of the
// switches). Timing: as ilv_bist_controller, results 2 cycles after start.
// The architecture follows the method; N_BUS, the per-stage buffer delay,
// the parking value of the switches and the controller are this design's.
module m3d_ilv_bist
  import ilv_bist_pkg::*;
#(
  parameter int unsigned N_ILV       = 32,
  parameter int unsigned N_BUS       = 1,
  parameter int unsigned CHAIN_LEN   = 9,
  parameter int unsigned NS          = 2,
  parameter int unsigned STAGE_DELAY = 20
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  // Tier 1
  input  logic [N_BUS-1:0][N_ILV-1:0] func_tx,
  output logic [N_BUS-1:0][N_ILV-1:0] ilv_tx,
  // Tier 2
  input  logic [N_BUS-1:0][N_ILV-1:0] ilv_rx,
  output logic [N_BUS-1:0][N_ILV-1:0] func_rx,
  // Results
  output logic                        busy,
  output logic                        done,
  output sig_t [N_BUS-1:0]            sig_c1,
  output sig_t [N_BUS-1:0]            sig_c2,
  output logic [N_BUS-1:0]            bus_pass,
  output diag_e [N_BUS-1:0]           bus_diag
);

  logic             launch, vin, test_en;
  logic [N_BUS-1:0] y1, y2;

  for (genvar b = 0; b < N_BUS; b++) begin : g_bus
    ilv_bist_tier1 #(
      .N_ILV(N_ILV), .CHAIN_LEN(CHAIN_LEN), .NS(NS), .STAGE_DELAY(STAGE_DELAY)
    ) u_tier1 (
      .vin    (vin),
      .launch (launch),
      .func_d (func_tx[b]),
      .ilv_d  (ilv_tx[b])
    );

    ilv_bist_tier2 #(.N_ILV(N_ILV)) u_tier2 (
      .test_en (test_en),
      .ilv_q   (ilv_rx[b]),
      .y1      (y1[b]),
      .y2      (y2[b])
    );
  end

  assign func_rx = ilv_rx;

  ilv_bist_controller #(.N_BUS(N_BUS)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .y1       (y1),
    .y2       (y2),
    .launch   (launch),
    .vin      (vin),
    .test_en  (test_en),
    .busy     (busy),
    .done     (done),
    .sig_c1   (sig_c1),
    .sig_c2   (sig_c2),
    .bus_pass (bus_pass),
    .bus_diag (bus_diag)
  );

endmodule
