// tb_dac: checks the DAC model output equals 2.5 V * code / 256 after the
// settling delay.
`timescale 1ns / 1ps
module tb_dac;
  logic [7:0] code;
  real vout;
  int checks = 0, failures = 0;
  dac dut (.code, .vout);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 40; i++) begin
      real exp;
      code = (i == 0) ? 8'd0 : (i == 1) ? 8'd255 : 8'($urandom);
      exp  = 2.5 * code / 256.0;
      #150;
      checks++;
      if (vout > exp + 1e-9 || vout < exp - 1e-9) begin
        failures++;
        $display("code %0d vout %f expected %f", code, vout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
