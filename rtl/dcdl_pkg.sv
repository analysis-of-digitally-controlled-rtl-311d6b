// dcdl_pkg: constants and types shared by the glitch-free NAND delay line.
//
// A delay element (DE) of the line is steered by two control bits, S and T.
// The three legal {S,T} pairs name the three DE states: pass (signal goes on
// to the next DE and comes back from it), turn (the signal is folded back
// here) and post-turn (the DE just behind the turning one, which already
// folds the signal back so that moving the turn point one step never
// exposes an unsettled node). {S,T} = 00 never occurs.
// The default line length of four DEs (control bits S0..S3) follows the
// described design; the NAND2 delay of 20 time units (ps) is this design's own
// choice for a 90 nm cell.
package dcdl_pkg;

  localparam int unsigned N_DE_DEFAULT  = 4;   // delay elements S0..S3
  localparam int unsigned T_PD_DEFAULT  = 20;  // NAND2 propagation delay, ps (assumed)

  // {S,T} of one delay element
  typedef enum logic [1:0] {
    DE_ILLEGAL   = 2'b00,
    DE_POST_TURN = 2'b10,
    DE_PASS      = 2'b01,
    DE_TURN      = 2'b11
  } de_state_e;

  function automatic de_state_e de_state(input logic s, input logic t);
    return de_state_e'({s, t});
  endfunction

endpackage
