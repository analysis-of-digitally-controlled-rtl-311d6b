// nand2_cell: behavioural model of a two-input NAND standard cell.
//
// Behavioural model, not synthesizable logic: the line's delay is made of
// these gates, so the model carries a propagation delay T_PD (time units,
// ps by default) on its output. The delay is inertial: an input pulse
// shorter than T_PD does not reach the output. Both inputs see the same
// delay; the fast/slow input asymmetry of a real CMOS NAND is not modelled.
// Interface: inputs a, b; output y = ~(a & b), T_PD after the inputs change.
// The NAND gate itself is what the delay line is built from; its delay value
// is this design's own choice (about one 90 nm NAND2 delay).
module nand2_cell #(
  parameter int unsigned T_PD = dcdl_pkg::T_PD_DEFAULT
) (
  input  logic a,
  input  logic b,
  output logic y
);

  assign #(T_PD) y = ~(a & b);

endmodule
