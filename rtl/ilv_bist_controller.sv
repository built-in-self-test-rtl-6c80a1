// Test sequencer and result grader of the ILV BIST.
//
// A test takes two clock cycles. After `start` (sampled in idle) the
// controller raises Launch and closes the isolation switches, drives Vin=1
// for one cycle (pattern 1010... on the ILVs) and Vin=0 for the next
// (0101...). The signature {Y1,Y2} of every bus is captured at the clock
// edge that ends each cycle, so the Vin=1 signature is taken at the rising
// edge that begins the second cycle. Then Launch drops, `done` rises and the
// results hold until the next start. A bus passes when Y1=1 and Y2=0 in
// both cycles; bus_diag separates failures by pattern (ilv_bist_pkg::grade).
// The two-cycle sequence and the pass rule are the method's; the state
// machine, the registered controls, the reset and the diagnosis classes are
// this design's.
//
// Timing: start high at edge k -> Launch/Vin=1 during cycle k..k+1, Vin=0
// during k+1..k+2, done high from edge k+2 on. Reset: asynchronous, active
// low, to idle with Launch=0 and done=0.
module ilv_bist_controller
  import ilv_bist_pkg::*;
#(
  parameter int unsigned N_BUS = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_BUS-1:0]  y1,
  input  logic [N_BUS-1:0]  y2,
  output logic              launch,
  output logic              vin,
  output logic              test_en,
  output logic              busy,
  output logic              done,
  output sig_t [N_BUS-1:0]  sig_c1,
  output sig_t [N_BUS-1:0]  sig_c2,
  output logic [N_BUS-1:0]  bus_pass,
  output diag_e [N_BUS-1:0] bus_diag
);

  state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE: if (start) state_d = ST_CYC1;
      ST_CYC1: state_d = ST_CYC2;
      ST_CYC2: state_d = ST_IDLE;
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      launch  <= 1'b0;
      vin     <= 1'b0;
      test_en <= 1'b0;
      done    <= 1'b0;
      sig_c1  <= '0;
      sig_c2  <= '0;
    end else begin
      state_q <= state_d;
      // Controls are registered from the next state so they change cleanly
      // at the clock edge.
      launch  <= (state_d != ST_IDLE);
      test_en <= (state_d != ST_IDLE);
      vin     <= (state_d == ST_CYC1);
      if (state_q == ST_IDLE && start) done <= 1'b0;
      for (int b = 0; b < N_BUS; b++) begin
        if (state_q == ST_CYC1) sig_c1[b] <= '{y1: y1[b], y2: y2[b]};
        if (state_q == ST_CYC2) sig_c2[b] <= '{y1: y1[b], y2: y2[b]};
      end
      if (state_q == ST_CYC2) done <= 1'b1;
    end
  end

  assign busy = (state_q != ST_IDLE);

  always_comb begin
    for (int b = 0; b < N_BUS; b++) begin
      bus_diag[b] = grade(sig_c1[b], sig_c2[b]);
      bus_pass[b] = done && (bus_diag[b] == DIAG_PASS);
    end
  end

  // Vin is high only in the first test cycle, and only while launching.
  a_vin_in_launch : assert property (@(posedge clk) disable iff (!rst_n) vin |-> launch);
  // The switches are closed whenever the test pattern is launched.
  a_iso_closed : assert property (@(posedge clk) disable iff (!rst_n) launch |-> test_en);
  // Exactly two launch cycles per test.
  a_two_cycles : assert property (@(posedge clk) disable iff (!rst_n)
                                  (state_q == ST_CYC1) |=> (state_q == ST_CYC2) ##1 (state_q == ST_IDLE));

endmodule
