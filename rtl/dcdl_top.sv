// dcdl_top: glitch-free NAND-based digitally controlled delay line with its
// driving circuit.
//
// The control code selects how many delay elements the input signal passes
// through before it is folded back: delay = 2*T_PD per code step plus a
// fixed part. dcdl_encoder turns the code into the S/T control bits,
// dcdl_driver registers them (dual edge triggered flip-flops by default,
// so a new code takes effect at the next clock edge of either polarity),
// and dcdl_line is the NAND delay line itself.
// Interface: clk, rst_n (async, active low, resets to code 0), code_i,
// in_i (signal to delay), out_o (delayed signal), and the registered
// control bits s_o, s_n_o, t_o for observation.
// Timing: code_i -> control bits: one clock edge; in_i -> out_o: gate
// delays only (see dcdl_line). Switching is glitch-free when the code moves
// by at most one step per clock edge and the control bits change while no
// input edge is inside the line. One way to guarantee the latter, used by
// the running-signal testbenches, is to clock the driver with out_o itself:
// an output edge means the last input edge has left the line. Clocking the
// driver with in_i races the new edge against the reconfiguration of the
// post-turn element: the first edge after a switch can then arrive two
// gate delays early or late.
// The structure (encoder, flip-flop driving circuit, glitch-free line)
// follows the described design; widths, reset and delays are this
// design's own choices.
module dcdl_top #(
  parameter int unsigned N_DE      = dcdl_pkg::N_DE_DEFAULT,
  parameter int unsigned T_PD      = dcdl_pkg::T_PD_DEFAULT,
  parameter bit          DUAL_EDGE = 1'b1,
  parameter int unsigned CODE_W    = (N_DE > 1) ? $clog2(N_DE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CODE_W-1:0] code_i,
  input  logic              in_i,
  output logic              out_o,
  output logic [N_DE-1:0]   s_o,
  output logic [N_DE-1:0]   s_n_o,
  output logic [N_DE-1:0]   t_o
);

  logic [N_DE-1:0] s_d, t_d;

  dcdl_encoder #(.N_DE(N_DE), .CODE_W(CODE_W)) u_enc (
    .code_i(code_i), .s_o(s_d), .t_o(t_d));

  dcdl_driver #(.N_DE(N_DE), .DUAL_EDGE(DUAL_EDGE)) u_drv (
    .clk(clk), .rst_n(rst_n), .s_d(s_d), .t_d(t_d),
    .s_q(s_o), .s_n_q(s_n_o), .t_q(t_o));

  dcdl_line #(.N_DE(N_DE), .T_PD(T_PD)) u_line (
    .in_i(in_i), .out_o(out_o), .s(s_o), .t(t_o));

endmodule
