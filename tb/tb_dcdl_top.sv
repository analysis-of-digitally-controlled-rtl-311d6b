// tb_dcdl_top: end-to-end test of the driven glitch-free delay line at its
// default size (four delay elements, dual edge driving flip-flops).
//
// Sequence:
//   1. reset: control bits must hold the encoding of code 0;
//   2. the code is changed a quarter clock period after an edge, alternately
//      after rising and falling edges; the registered control bits must not
//      move before the next edge and must hold the new encoding right after
//      it (latency: one edge of either polarity);
//   3. for every code, the input is toggled and both output edges are timed
//      against the expected gate count (2c+2 or 2c+4 NAND delays);
//   4. with the input held at 0 and at 1, the code is stepped up and down by
//      one through the driver and the output must not move (glitch-free).
// Every mechanism (each element state, updates on each clock edge, steps up
// and down, delay of each code) is counted; one that never happened counts
// as a failure.
module tb_dcdl_top;
  import dcdl_pkg::*;
  localparam int unsigned N = N_DE_DEFAULT;
  localparam int unsigned D = T_PD_DEFAULT;
  localparam int unsigned P = 2000;  // clock period, well above the longest line delay

  logic clk = 0, rst_n, in_sig;
  logic [1:0] code;
  logic out_sig;
  logic [N-1:0] s_o, s_n_o, t_o;
  int checks = 0, failures = 0;
  int out_edges = 0;

  // mechanism counters
  int n_pass = 0, n_turn = 0, n_post = 0;
  int n_upd_rise = 0, n_upd_fall = 0;
  int n_step_up = 0, n_step_down = 0;
  int n_delay[N];

  dcdl_top dut (.clk(clk), .rst_n(rst_n), .code_i(code), .in_i(in_sig), .out_o(out_sig),
                .s_o(s_o), .s_n_o(s_n_o), .t_o(t_o));

  always #(P/2) clk = ~clk;
  always @(out_sig) out_edges++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [N-1:0] s_ref(input int c);
    for (int i = 0; i < N; i++) s_ref[i] = (i >= c);
  endfunction
  function automatic logic [N-1:0] t_ref(input int c);
    for (int i = 0; i < N; i++) t_ref[i] = (i != c + 1);
  endfunction

  function automatic int exp_delay(input int c, input bit in_rising);
    if ((in_rising ^ c[0]) || c == N - 1) return (2*c + 2) * D;
    return (2*c + 4) * D;
  endfunction

  // count the element states present on the registered control bits
  task automatic count_states();
    for (int i = 0; i < N; i++) begin
      case (de_state(s_o[i], t_o[i]))
        DE_PASS:      n_pass++;
        DE_TURN:      n_turn++;
        DE_POST_TURN: n_post++;
        default:      check(1'b0, "illegal element state");
      endcase
    end
  endtask

  // Apply a code a quarter period after an edge; check the one-edge latency.
  task automatic apply_code(input int c);
    logic [N-1:0] s_before, t_before;
    bit rising_next;
    s_before = s_o; t_before = t_o;
    rising_next = !clk;              // clk low now: the next edge rises
    code = 2'(c);
    #(P/4 - 1);
    check(s_o == s_before && t_o == t_before, "control bits moved before the edge");
    #(2);
    check(s_o == s_ref(c) && t_o == t_ref(c), $sformatf("control bits for code %0d after one edge: s=%b t=%b clk=%b", c, s_o, t_o, clk));
    check(s_n_o == ~s_o, "S' complement");
    if (s_before != s_o || t_before != t_o) begin
      if (rising_next) n_upd_rise++; else n_upd_fall++;
    end
    count_states();
    #(P/4 - 1);                      // back to a quarter period after the edge
  endtask

  task automatic measure(input int c, input bit level);
    time t0;
    int e0;
    e0 = out_edges;
    in_sig = level;
    t0 = $time;
    fork
      begin : wait_edge
        @(out_sig);
      end
      begin : limit
        #(P/4);
      end
    join_any
    disable fork;
    check(out_sig == level, $sformatf("code %0d output level", c));
    check(int'($time - t0) == exp_delay(c, level),
          $sformatf("code %0d %s delay %0d expected %0d", c, level ? "rise" : "fall",
                    $time - t0, exp_delay(c, level)));
    if (out_sig == level && int'($time - t0) == exp_delay(c, level)) n_delay[c]++;
    #(P/8);
    check(out_edges - e0 == 1, $sformatf("code %0d exactly one output edge", c));
  endtask

  initial begin
    #(400*P);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0;
    rst_n = 1; code = 2'd2; in_sig = 0;
    #1 rst_n = 0;
    #(P/4 - 1);
    check(s_o == s_ref(0) && t_o == t_ref(0), $sformatf("reset loads code 0: s=%b t=%b ref %b %b", s_o, t_o, s_ref(0), t_ref(0)));
    #(P);
    rst_n = 1;
    #(P/2);                          // a quarter period after an edge

    // latency and delay of every code, stepping up then down
    for (int c = 0; c < N; c++) begin
      apply_code(c);
      measure(c, 1'b1);
      measure(c, 1'b0);
      @(clk);                        // realign to a quarter period after an edge
      @(clk);
      #(P/4);
    end

    // glitch-free switching by one step with a static input
    for (int lv = 0; lv < 2; lv++) begin
      in_sig = lv[0];
      apply_code(0);
      #(P);
      for (int c = 1; c < N; c++) begin
        e0 = out_edges;
        apply_code(c);
        #(P);
        check(out_edges == e0, $sformatf("glitch stepping up to code %0d, input %0d", c, lv));
        check(out_sig == lv[0], "output level after step up");
        n_step_up++;
      end
      for (int c = N - 2; c >= 0; c--) begin
        e0 = out_edges;
        apply_code(c);
        #(P);
        check(out_edges == e0, $sformatf("glitch stepping down to code %0d, input %0d", c, lv));
        check(out_sig == lv[0], "output level after step down");
        n_step_down++;
      end
    end

    $display("mechanisms: pass=%0d turn=%0d post_turn=%0d update_rise=%0d update_fall=%0d step_up=%0d step_down=%0d",
             n_pass, n_turn, n_post, n_upd_rise, n_upd_fall, n_step_up, n_step_down);
    check(n_pass > 0, "pass state never seen");
    check(n_turn > 0, "turn state never seen");
    check(n_post > 0, "post-turn state never seen");
    check(n_upd_rise > 0, "no update on a rising edge");
    check(n_upd_fall > 0, "no update on a falling edge");
    check(n_step_up > 0, "no glitch-free step up");
    check(n_step_down > 0, "no glitch-free step down");
    for (int c = 0; c < N; c++) begin
      $display("code %0d: delays timed correctly %0d times", c, n_delay[c]);
      check(n_delay[c] == 2, $sformatf("delay of code %0d not timed", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
