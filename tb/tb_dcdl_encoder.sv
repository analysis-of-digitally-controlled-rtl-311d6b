// tb_dcdl_encoder: exhaustive test of the control-bit encoder.
// Reference: S = ones from bit c upwards (thermometer), T = all ones but bit
// c+1. A second instance with six elements checks clamping of codes 6, 7.
module tb_dcdl_encoder;
  localparam int unsigned N  = 4;
  localparam int unsigned N6 = 6;
  logic [1:0] code;
  logic [N-1:0] s, t;
  logic [2:0] code6;
  logic [N6-1:0] s6, t6;
  int checks = 0, failures = 0;

  dcdl_encoder dut (.code_i(code), .s_o(s), .t_o(t));
  dcdl_encoder #(.N_DE(N6)) dut6 (.code_i(code6), .s_o(s6), .t_o(t6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s_ref, t_ref;
    int ce;
    for (int c = 0; c < 4; c++) begin
      code = 2'(c);
      #1;
      s_ref = 8'hFF << c;
      t_ref = ~(8'h01 << (c + 1));
      checks++;
      if (s !== s_ref[N-1:0] || t !== t_ref[N-1:0]) begin
        failures++;
        $display("FAIL N=4 code %0d: s=%b t=%b expected s=%b t=%b", c, s, t, s_ref[N-1:0], t_ref[N-1:0]);
      end
    end
    for (int c = 0; c < 8; c++) begin
      code6 = 3'(c);
      #1;
      ce = (c > 5) ? 5 : c;
      s_ref = 8'hFF << ce;
      t_ref = ~(8'h01 << (ce + 1));
      checks++;
      if (s6 !== s_ref[N6-1:0] || t6 !== t_ref[N6-1:0]) begin
        failures++;
        $display("FAIL N=6 code %0d: s=%b t=%b", c, s6, t6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
