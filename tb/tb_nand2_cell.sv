// tb_nand2_cell: self-checking test of the NAND2 cell model.
// Checks the truth table, that the output moves exactly T_PD after an
// input change, and that a pulse shorter than T_PD is filtered.
module tb_nand2_cell;
  localparam int unsigned D = 20;
  logic a, b;
  logic y;
  int checks = 0, failures = 0;

  nand2_cell #(.T_PD(D)) dut (.a(a), .b(b), .y(y));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    #(5*D);
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #(2*D);
      check(y == !(v == 3), $sformatf("truth table a=%0b b=%0b", a, b));
    end
    // now a=b=1, y=0: drop b, output must rise exactly D later
    b = 0;
    #(D-1); check(y == 1'b0, "output too early");
    #1;     check(y == 1'b1, "output not there after T_PD");
    // short pulse on b (shorter than D) must not reach y
    #(2*D);
    b = 1; #(D/2); b = 0;
    for (int k = 0; k < 3*D; k++) begin
      #1; check(y == 1'b1, "short pulse passed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
