// Behavioural model of a bus of N inter-layer vias with injectable faults,
// for the BIST testbenches. Fault controls, one bit per via:
//   sa0 / sa1   stuck-at-0 / stuck-at-1
//   open_hard   hard open: the far end floats and holds open_val
//   open_res    resistive open: the far end follows the near end RES_DELAY_PS
//               later (RC delay of the open)
//   short_nxt   hard short between via i and via i+1. The via nearer the
//               test source (lower index) wins and drives both, as the
//               source-side via has the lower-resistance pull.
// Stuck-at and opens are applied first, then shorts spread the value of
// the lower via upward. Resistive shorts are not modelled.
module ilv_channel_model #(
  parameter int unsigned N            = 32,
  parameter int unsigned RES_DELAY_PS = 480
) (
  input  logic [N-1:0] tx,
  input  logic [N-1:0] sa0,
  input  logic [N-1:0] sa1,
  input  logic [N-1:0] open_hard,
  input  logic [N-1:0] open_val,
  input  logic [N-1:0] open_res,
  input  logic [N-1:0] short_nxt,
  output logic [N-1:0] rx
);
  logic [N-1:0] tx_late;
  logic [N-1:0] base;

  assign #(RES_DELAY_PS * 1ps) tx_late = tx;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      base[i] = open_res[i] ? tx_late[i] : tx[i];
      if (open_hard[i]) base[i] = open_val[i];
      if (sa0[i])       base[i] = 1'b0;
      if (sa1[i])       base[i] = 1'b1;
    end
    rx[0] = base[0];
    for (int i = 1; i < N; i++) rx[i] = short_nxt[i-1] ? rx[i-1] : base[i];
  end
endmodule
