// tb_dcdl_line: self-checking test of the glitch-free NAND delay line.
//
// Control bits are generated here from the control law (S_i = i>=c,
// T_i = 0 only at i=c+1). For every code the test
//   * toggles the input and measures the delay of rising and falling
//     output edges against the expected gate count: 2c+2 gate delays when
//     the edge reaching the turning element rises, 2c+4 when it falls and a
//     post-turn element exists (2c+2 at the last element);
//   * with the input held at 0 and at 1, moves the code up and down by one
//     and requires that the output does not move at all (no glitch).
// Code jumps of more than one step are applied and their glitches are only
// reported: the design switches glitch-free one step at a time.
module tb_dcdl_line;
  localparam int unsigned N = 4;
  localparam int unsigned D = 20;
  logic in_sig;
  logic out_sig;
  logic [N-1:0] s, t;
  int checks = 0, failures = 0;
  int out_edges = 0;

  dcdl_line #(.N_DE(N), .T_PD(D)) dut (.in_i(in_sig), .out_o(out_sig), .s(s), .t(t));

  always @(out_sig) out_edges++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic set_code(input int c);
    for (int i = 0; i < N; i++) begin
      s[i] = (i >= c);
      t[i] = (i != c + 1);
    end
  endtask

  function automatic int exp_delay(input int c, input bit in_rising);
    bit turn_edge_rising = in_rising ^ c[0];
    if (turn_edge_rising || c == N - 1) return (2*c + 2) * D;
    return (2*c + 4) * D;
  endfunction

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
        #(10*N*D + 10*D);
      end
    join_any
    disable fork;
    check(out_sig == level, $sformatf("code %0d: output level after %s input edge", c, level ? "rising" : "falling"));
    check(int'($time - t0) == exp_delay(c, level),
          $sformatf("code %0d %s delay %0d expected %0d", c, level ? "rise" : "fall",
                    $time - t0, exp_delay(c, level)));
    #(10*N*D);
    check(out_edges - e0 == 1, $sformatf("code %0d: exactly one output edge", c));
  endtask

  task automatic switch_code(input int c_from, input int c_to, input bit level, input bit must_be_clean);
    int e0;
    in_sig = level;
    set_code(c_from);
    #(10*N*D);
    e0 = out_edges;
    set_code(c_to);
    #(10*N*D);
    if (must_be_clean) begin
      check(out_edges == e0, $sformatf("glitch: code %0d->%0d with input %0b (%0d edges)",
                                       c_from, c_to, level, out_edges - e0));
    end else if (out_edges != e0) begin
      $display("note: code %0d->%0d with input %0b gave %0d output edges", c_from, c_to, level, out_edges - e0);
    end
    check(out_sig == level, $sformatf("level after code %0d->%0d", c_from, c_to));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_sig = 0;
    set_code(0);
    #(10*N*D);
    for (int c = 0; c < N; c++) begin
      set_code(c);
      #(10*N*D);
      measure(c, 1'b1);
      measure(c, 1'b0);
    end
    for (int c = 0; c < N - 1; c++) begin
      for (int lv = 0; lv < 2; lv++) begin
        switch_code(c, c + 1, lv[0], 1'b1);
        switch_code(c + 1, c, lv[0], 1'b1);
      end
    end
    for (int lv = 0; lv < 2; lv++) begin
      switch_code(0, 2, lv[0], 1'b0);
      switch_code(1, 3, lv[0], 1'b0);
      switch_code(3, 0, lv[0], 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
