// dcdl_line: glitch-free NAND-based digitally controlled delay line.
//
// N_DE delay elements (dcdl_de) in a row. The input enters the forward path
// of DE 0 and travels through every DE in pass state; the first DE in turn
// state (index c, the control code) folds it onto the return path, which
// brings it back through the same pass DEs to the output. The DE after the
// turning one is in post-turn state and folds the signal as well, so that
// the turn point can move by one DE without a glitch. The return input of
// the last DE is tied to 1 (the NAND's neutral value).
// Interface: in_i, out_o, control bits s[N_DE-1:0] and t[N_DE-1:0] as
// produced by dcdl_encoder (S_i = i>=c, T_i = 0 only for i=c+1).
// Timing (purely combinational, gate delays T_PD): out follows in with
// 2*c*T_PD + 2*T_PD when the edge that reaches DE c is rising, and
// 2*c*T_PD + 4*T_PD when it is falling and a post-turn DE exists (the
// falling edge of the turning NAND waits for the post-turn DE's copy).
// Line structure and control law follow the described design; the gate
// level wiring of the DE is reconstructed (see dcdl_de).
module dcdl_line #(
  parameter int unsigned N_DE = dcdl_pkg::N_DE_DEFAULT,
  parameter int unsigned T_PD = dcdl_pkg::T_PD_DEFAULT
) (
  input  logic            in_i,
  output logic            out_o,
  input  logic [N_DE-1:0] s,
  input  logic [N_DE-1:0] t
);

  logic [N_DE:0] fwd;  // fwd[i]: forward input of DE i; fwd[N_DE] goes nowhere
  logic [N_DE:0] ret;  // ret[i]: return output of DE i, ret[N_DE] = end of line

  assign fwd[0]    = in_i;
  assign ret[N_DE] = 1'b1;
  assign out_o     = ret[0];

  for (genvar i = 0; i < N_DE; i++) begin : g_de
    dcdl_de #(.T_PD(T_PD)) u_de (
      .f_i(fwd[i]),
      .f_o(fwd[i+1]),
      .r_i(ret[i+1]),
      .r_o(ret[i]),
      .s  (s[i]),
      .t  (t[i])
    );
  end

endmodule
