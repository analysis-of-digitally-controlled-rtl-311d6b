// tb_dcdl_running_sff: as tb_dcdl_running, with the single edge (Nikolic
// sense-amplifier) driving flip-flops instead of the dual edge ones.
// The new control word is then taken at rising output edges only, so the
// code is moved only after rising input edges.
//
// The input is a square wave whose half period is longer than the longest
// line delay. The driving flip-flops are clocked by the line's own
// output: an output edge means the last input edge has left the line, so the
// new control word is applied while every node of the line is at rest, and
// the next input edge runs through the new setting. The code performs a
// random walk of one step (up, down or unchanged) per input edge, which
// includes the 1 -> 2 and 1 -> 3 (in two steps) switching cases. Every
// output edge is checked against the input edge that caused it: same
// direction and a delay equal to the gate count of the code in force
// (2c+2 or 2c+4 NAND delays). An extra output edge (a glitch) or a missing
// one is a failure.
module tb_dcdl_running_sff;
  import dcdl_pkg::*;
  localparam int unsigned N     = N_DE_DEFAULT;
  localparam int unsigned D     = T_PD_DEFAULT;
  localparam int unsigned HALF  = 500;   // half period of the input square wave
  localparam int unsigned EDGES = 400;

  logic rst_n, in_sig;
  logic [1:0] code;
  logic out_sig;
  logic [N-1:0] s_o, s_n_o, t_o;
  int checks = 0, failures = 0;

  // expected output edges: time and level, queued at each input edge
  time  exp_t[$];
  logic exp_v[$];
  int   n_out_edges = 0;
  int   n_up = 0, n_down = 0, n_hold = 0;
  int   n_code[N];
  bit   armed = 1'b0;  // set once the line has settled after reset

  dcdl_top #(.DUAL_EDGE(1'b0)) dut (.clk(out_sig), .rst_n(rst_n), .code_i(code), .in_i(in_sig), .out_o(out_sig),
                .s_o(s_o), .s_n_o(s_n_o), .t_o(t_o));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int exp_delay(input int c, input bit in_rising);
    if ((in_rising ^ c[0]) || c == N - 1) return (2*c + 2) * D;
    return (2*c + 4) * D;
  endfunction

  always @(out_sig) begin
    if (armed) begin
      n_out_edges++;
      if (exp_t.size() == 0) begin
        check(1'b0, "output edge with no input edge (glitch)");
      end else begin
        time  et;
        logic ev;
        et = exp_t.pop_front();
        ev = exp_v.pop_front();
        check(out_sig == ev && $time == et,
              $sformatf("output edge %0b at %0t, expected %0b at %0t", out_sig, $time, ev, et));
      end
    end
  end

  initial begin
    #((EDGES + 20) * HALF);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, c_next, step;
    rst_n = 1; in_sig = 0; code = 2'd0;
    #1 rst_n = 0;
    #(4*HALF);
    rst_n = 1;
    c = 0;                           // reset loads code 0
    #(HALF);
    armed = 1'b1;
    for (int k = 0; k < EDGES; k++) begin
      in_sig = ~in_sig;              // launched with code c
      n_code[c]++;
      exp_t.push_back($time + time'(exp_delay(c, in_sig)));
      exp_v.push_back(in_sig);
      #1;
      // the code for the next edge, one step at most, taken at this edge's output
      step = int'($urandom_range(2)) - 1;
      if (c + step < 0 || c + step > N - 1) step = -step;
      if (!in_sig) step = 0;         // a falling output edge does not clock the driver
      if (step > 0) n_up++; else if (step < 0) n_down++; else n_hold++;
      c_next = c + step;
      code = 2'(c_next);
      #(HALF - 1);
      check(s_o == 4'(4'hF << c_next) && t_o == ~4'(4'h1 << (c_next + 1)),
            $sformatf("control bits for code %0d", c_next));
      c = c_next;
    end
    #(HALF);
    check(exp_t.size() == 0, $sformatf("%0d output edges missing", exp_t.size()));
    check(n_out_edges == EDGES, $sformatf("%0d output edges for %0d input edges", n_out_edges, EDGES));
    $display("steps: up=%0d down=%0d hold=%0d; edges per code: %0d %0d %0d %0d",
             n_up, n_down, n_hold, n_code[0], n_code[1], n_code[2], n_code[3]);
    check(n_up > 0 && n_down > 0, "code never moved both ways");
    for (int i = 0; i < N; i++) check(n_code[i] > 0, $sformatf("code %0d never used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
