// Behavioural model (not synthesizable logic): the N_s-stage inverter that
// the enhanced dual-BIST places in the test path of every ILV.
//
// In silicon this is a chain of NS small CMOS inverters whose weak drive
// adds delay (and series resistance) in front of each ILV, so that a
// resistive open pushes the ILV output past the capture edge and a
// resistive short no longer flips the receiving XOR. This model keeps the
// logic function (one inversion per stage, a plain buffer for even NS) and
// the delay, NS*STAGE_DELAY time units; the resistive effect on shorts is
// analog and not modelled. NS=2 follows the method; the per-stage delay is
// this design's assumption (STAGE_DELAY is in picoseconds, default 20 ps).
// It sits between the inverter chain and the launch mux, off the functional
// path.
//
// Interface: a[N_ILV] in, y[N_ILV] out, combinational with delay.
module ilv_delay_buffer #(
  parameter int unsigned N_ILV       = 32,
  parameter int unsigned NS          = 2,
  parameter int unsigned STAGE_DELAY = 20
) (
  input  logic [N_ILV-1:0] a,
  output logic [N_ILV-1:0] y
);

  localparam bit INVERT = NS[0];

  assign #(NS * STAGE_DELAY * 1ps) y = INVERT ? ~a : a;

endmodule
