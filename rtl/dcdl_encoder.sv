// dcdl_encoder: control code to delay-line control bits.
//
// For each delay element i of an N_DE line and control code c:
//   S_i = 0 for i < c (pass), S_i = 1 for i >= c (turn)   -- thermometer code
//   T_i = 0 for i = c+1 (post-turn), T_i = 1 otherwise
// This is the control law of the described design. A code above N_DE-1
// (possible only when N_DE is not a power of two) is clamped to N_DE-1,
// which is this design's own choice.
// Interface: code_i (CODE_W bits); s_o, t_o (N_DE bits each).
// Timing: purely combinational; registered by dcdl_driver.
module dcdl_encoder #(
  parameter int unsigned N_DE   = dcdl_pkg::N_DE_DEFAULT,
  parameter int unsigned CODE_W = (N_DE > 1) ? $clog2(N_DE) : 1
) (
  input  logic [CODE_W-1:0] code_i,
  output logic [N_DE-1:0]   s_o,
  output logic [N_DE-1:0]   t_o
);

  int unsigned c;

  always_comb begin
    c = (int'(code_i) > N_DE - 1) ? N_DE - 1 : int'(code_i);
    for (int unsigned i = 0; i < N_DE; i++) begin
      s_o[i] = (i >= c);
      t_o[i] = (i != c + 1);
    end
  end

  // Every DE must be in one of the three legal states, {S,T} = 00 never.
  always_comb begin
    for (int unsigned i = 0; i < N_DE; i++)
      assert (s_o[i] || t_o[i]) else $error("DE %0d in illegal state", i);
  end

endmodule
