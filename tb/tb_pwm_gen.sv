// tb_pwm_gen: checks the PWM generator's sample request period (256 clocks,
// first one 128 clocks after reset), and for a set of magnitudes that the
// output is high for exactly magnitude clocks of every 256-clock period,
// including 0 (never high) and 255.
module tb_pwm_gen;
  import hdr_pkg::*;

  logic             clk = 1'b0;
  logic             rst;
  logic [PWM_W-1:0] magnitude;
  logic             sample_en;
  logic             pwm_out;

  int checks = 0, failures = 0;

  pwm_gen dut (.*);

  always #5 clk = ~clk;

  int cyc, last_req, high_cnt, first_req;

  initial begin
    rst = 1'b1; magnitude = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    cyc = 0;
    // first request after 128 clocks
    while (!sample_en) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 128) begin failures++; $display("FAIL first request after %0d", cyc); end

    for (int k = 0; k < 40; k++) begin
      int m;
      m = (k == 0) ? 0 : (k == 1) ? 255 : (k == 2) ? 1 : (k == 3) ? 128 : $urandom_range(0, 255);
      // magnitude changes at the sample request, as in the track datapath
      magnitude = PWM_W'(m);
      high_cnt = 0;
      cyc = 0;
      @(negedge clk);
      cyc++;
      while (!sample_en) begin
        if (pwm_out) high_cnt++;
        @(negedge clk);
        cyc++;
      end
      if (pwm_out) high_cnt++;  // compare made on the request clock
      checks++;
      if (cyc != 256) begin failures++; $display("FAIL period %0d", cyc); end
      checks++;
      if (high_cnt != m) begin failures++; $display("FAIL magnitude %0d gave %0d high clocks", m, high_cnt); end
    end
    // reset forces the output low
    magnitude = 8'd255;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    checks++; if (pwm_out) begin failures++; $display("FAIL output high in reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
