// tb_dcdl_de: self-checking test of one delay element.
// For each DE state (pass, turn, post-turn) it checks the static values the
// state must produce: pass forwards and returns the signal (one inversion
// each way), turn and post-turn fold the forward signal back onto the
// return output, post-turn blocks the forward output at 1. It also checks
// the one-gate delay of the forward path in pass state.
module tb_dcdl_de;
  localparam int unsigned D = 20;
  logic f_i, r_i, s, t;
  logic f_o, r_o;
  int checks = 0, failures = 0;

  dcdl_de #(.T_PD(D)) dut (.f_i(f_i), .f_o(f_o), .r_i(r_i), .r_o(r_o), .s(s), .t(t));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f_i = 0; r_i = 1; s = 0; t = 1;
    #(10*D);
    // pass: S=0 T=1
    for (int v = 0; v < 4; v++) begin
      {f_i, r_i} = 2'(v);
      #(5*D);
      check(f_o == !f_i, "pass: forward output");
      check(r_o == !r_i, "pass: return output");
    end
    // turn: S=1 T=1, the post-turn DE returns ~f_i
    s = 1; t = 1;
    for (int v = 0; v < 2; v++) begin
      f_i = v[0]; r_i = !v[0];
      #(5*D);
      check(f_o == !f_i, "turn: forward stays open");
      check(r_o == f_i,  "turn: signal folded back");
    end
    // post-turn: S=1 T=0, end of the active line returns 1
    s = 1; t = 0;
    for (int v = 0; v < 2; v++) begin
      f_i = v[0]; r_i = 1'b1;
      #(5*D);
      check(f_o == 1'b1, "post-turn: forward blocked");
      check(r_o == f_i,  "post-turn: signal folded back");
    end
    // forward delay in pass state: exactly one gate
    s = 0; t = 1; f_i = 0; r_i = 1;
    #(5*D);
    f_i = 1;
    #(D-1); check(f_o == 1'b1, "pass: forward edge too early");
    #1;     check(f_o == 1'b0, "pass: forward edge after one T_PD");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
