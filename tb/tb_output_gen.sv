// tb_output_gen: drives all combinations of PWM bit and sign, in random
// order, and checks the registered H-bridge controls one clock later: both
// enables high out of reset, the PWM bit on the right side for sign 0 and on
// the left side for sign 1, and everything low in reset.
module tb_output_gen;
  logic clk = 1'b0;
  logic rst, pwm_out, sign;
  logic left_high, left_en, right_high, right_en;
  int checks = 0, failures = 0;

  output_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; pwm_out = 1'b1; sign = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (left_high || left_en || right_high || right_en) begin
      failures++; $display("FAIL outputs active in reset");
    end
    rst = 1'b0;
    for (int k = 0; k < 200; k++) begin
      logic p, s;
      p = (k < 4) ? k[0] : 1'($urandom);
      s = (k < 4) ? k[1] : 1'($urandom);
      pwm_out = p; sign = s;
      @(negedge clk);
      checks++;
      if (left_en !== 1'b1 || right_en !== 1'b1 ||
          left_high !== (s & p) || right_high !== (!s & p)) begin
        failures++;
        $display("FAIL pwm=%0b sign=%0b -> L %0b/%0b R %0b/%0b", p, s, left_high, left_en, right_high, right_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
