// tb_sine_lut: checks every entry of the quarter-wave sine table against
// round(255 * sin(pi/2 * (i + 0.5) / 1024)) computed here with real
// arithmetic, and checks the symmetry the wave generator relies on:
// entry i of the table read backwards (~i) equals the cosine sample.
module tb_sine_lut;
  localparam int ADDR_W = 10;
  localparam int AMP_W  = 8;

  logic [ADDR_W-1:0] addr;
  logic [AMP_W-1:0]  amplitude;
  int checks = 0, failures = 0;

  sine_lut #(.ADDR_W(ADDR_W), .AMP_W(AMP_W)) dut (.addr(addr), .amplitude(amplitude));

  function automatic int expected(input int i);
    real x;
    x = 3.14159265358979 / 2.0 * (real'(i) + 0.5) / real'(2 ** ADDR_W);
    return int'($floor(255.0 * $sin(x) + 0.5));
  endfunction

  function automatic int expected_cos(input int i);
    real x;
    x = 3.14159265358979 / 2.0 * (real'(i) + 0.5) / real'(2 ** ADDR_W);
    return int'($floor(255.0 * $cos(x) + 0.5));
  endfunction

  initial begin
    #1;
    for (int i = 0; i < 2 ** ADDR_W; i++) begin
      addr = ADDR_W'(i);
      #1;
      checks++;
      if (int'(amplitude) != expected(i)) begin
        failures++;
        if (failures < 10) $display("FAIL sin[%0d] = %0d, expected %0d", i, amplitude, expected(i));
      end
      addr = ~ADDR_W'(i);
      #1;
      checks++;
      if (int'(amplitude) != expected_cos(i)) begin
        failures++;
        if (failures < 10) $display("FAIL cos[%0d] = %0d, expected %0d", i, amplitude, expected_cos(i));
      end
    end
    // end points: first entry rounds to 0, last to full scale
    addr = '0; #1; checks++; if (amplitude != 8'd0)   failures++;
    addr = '1; #1; checks++; if (amplitude != 8'd255) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
