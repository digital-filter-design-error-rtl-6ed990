// tb_therm_decoder: exhaustive check of the binary-to-thermometer decoder
// for 3-bit (the DAC's 3-to-8 decoder) and 4-bit codes. The expected word for
// code b is 2**b - 1, worked out here arithmetically.
module tb_therm_decoder;
  int checks = 0, failures = 0;
  logic [2:0] b3;  logic [7:0]  t3;
  logic [3:0] b4;  logic [15:0] t4;

  therm_decoder #(.N_BITS(3)) dut3 (.bin_i(b3), .therm_o(t3));
  therm_decoder #(.N_BITS(4)) dut4 (.bin_i(b4), .therm_o(t4));

  initial begin
    for (int b = 0; b < 8; b++) begin
      b3 = 3'(b); #1;
      checks++;
      if (t3 !== 8'((1 << b) - 1)) begin
        failures++; $display("FAIL 3-bit code %0d -> %b", b, t3);
      end
    end
    // Spot values of the DAC table: "011" -> 00000111, "111" -> 01111111
    b3 = 3'b011; #1; checks++; if (t3 !== 8'b00000111) failures++;
    b3 = 3'b111; #1; checks++; if (t3 !== 8'b01111111) failures++;
    for (int b = 0; b < 16; b++) begin
      b4 = 4'(b); #1;
      checks++;
      if (t4 !== 16'((1 << b) - 1)) begin
        failures++; $display("FAIL 4-bit code %0d -> %b", b, t4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
