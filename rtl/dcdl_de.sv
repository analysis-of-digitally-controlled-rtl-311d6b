// dcdl_de: one delay element (DE) of the glitch-free NAND delay line.
//
// Four NAND2 gates:
//   G1 forward : f_o = ~(f_i & t)   passes the signal on unless post-turn
//   G2 turn    : x   = ~(f_i & s)   folds the signal back when S=1
//   G3 return  : r_o = ~(x & r_i)   return path towards the line input
//   G4 dummy   : ~(r_i & 1)         loads the return node like a forward
//                                   node is loaded (load balancing only)
// State by {S,T} (see dcdl_pkg::de_state_e):
//   pass      S=0 T=1 : f_o = ~f_i, r_o = ~r_i           (one gate each way)
//   turn      S=1 T=1 : f_o = ~f_i, r_o = ~(~f_i & r_i)  (r_i carries ~f_i
//                       from the post-turn DE, so r_o = f_i)
//   post-turn S=1 T=0 : f_o = 1 (blocks the rest of the line),
//                       r_o = ~(~f_i & r_i) with r_i = 1, so r_o = f_i
// Because the turning DE keeps its forward gate open, the DE behind it is
// already folding the live signal; when the code moves by one the new turn
// point's return output is settled before the pass gate switches onto it.
// The four-gate DE, the S/T control and the three states follow the
// described design; which gate input each control bit drives is this
// design's reconstruction (S/T on G2/G1, the fourth gate as dummy load).
// Timing: each gate has delay T_PD; a pass DE adds 2*T_PD to the loop.
module dcdl_de #(
  parameter int unsigned T_PD = dcdl_pkg::T_PD_DEFAULT
) (
  input  logic f_i,   // forward input (from previous DE or line input)
  output logic f_o,   // forward output (to next DE)
  input  logic r_i,   // return input (from next DE, 1 at the end of line)
  output logic r_o,   // return output (to previous DE or line output)
  input  logic s,     // S control bit
  input  logic t      // T control bit
);

  logic x;
  logic dmy;  // dummy gate output: load balancing only, drives nothing

  nand2_cell #(.T_PD(T_PD)) u_g1_fwd  (.a(f_i), .b(t),    .y(f_o));
  nand2_cell #(.T_PD(T_PD)) u_g2_turn (.a(f_i), .b(s),    .y(x));
  nand2_cell #(.T_PD(T_PD)) u_g3_ret  (.a(x),   .b(r_i),  .y(r_o));
  nand2_cell #(.T_PD(T_PD)) u_g4_dmy  (.a(r_i), .b(1'b1), .y(dmy));

endmodule
