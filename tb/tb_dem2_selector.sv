// tb_dem2_selector: checks the second-order element selection.
//
// For random and constant codes it checks every sample that exactly `code`
// elements are switched on, and it checks the shaping property directly:
// with u_i = 8*s_i - code the usage error of element i, a (1 - z^-1)^2
// shaped error has a bounded double running sum S2_i = sum sum u_i. The
// testbench accumulates S2_i itself and requires |S2_i| to stay small; a
// plain thermometer decoder (no DEM) lets S2 grow without bound. It also
// counts how often a repeated code is served by a different element set.
module tb_dem2_selector;
  import sd_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  code_t  code;
  elsel_t sel, prev_sel;
  code_t  prev_code;
  longint s1 [NUM_EL], s2 [NUM_EL];
  longint max_s2;
  int rotations;

  dem2_selector dut (.clk, .rst_n, .en_i(en), .code_i(code), .sel_o(sel));

  always #5 clk = ~clk;

  task automatic run(input int n, input int mode);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      case (mode)
        0: code = code_t'($urandom_range(0, 7));
        1: code = 3'd3;
        2: code = 3'd5;
        default: code = code_t'((k % 8 < 4) ? 4 + (k % 2) : 6 - (k % 3)); // 4,4,5,5,... like a slow sine
      endcase
      en = 1;
      #1;
      checks++;
      if ($countones(sel) != int'(code)) begin
        failures++; $display("FAIL count: code %0d sel %b", code, sel);
      end
      if (code == prev_code && sel != prev_sel && code != 0) rotations++;
      for (int i = 0; i < NUM_EL; i++) begin
        s1[i] += (sel[i] ? NUM_EL : 0) - int'(code);
        s2[i] += s1[i];
        if ((s2[i] < 0 ? -s2[i] : s2[i]) > max_s2) max_s2 = (s2[i] < 0 ? -s2[i] : s2[i]);
      end
      prev_code = code; prev_sel = sel;
    end
  endtask

  initial begin
    code = '0; prev_code = '0; prev_sel = '0; max_s2 = 0; rotations = 0;
    for (int i = 0; i < NUM_EL; i++) begin s1[i] = 0; s2[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // After reset the states are zero: the selection is the thermometer code.
    @(negedge clk); code = 3'd3; #1;
    checks++; if (sel !== 8'b0000_0111) begin failures++; $display("FAIL reset selection %b", sel); end
    run(4000, 0);
    run(2000, 1);
    run(2000, 2);
    run(4000, 3);
    run(4000, 0);
    checks++;
    if (max_s2 > 511) begin failures++; $display("FAIL double-sum of usage error reached %0d", max_s2); end
    checks++;
    if (rotations < 100) begin failures++; $display("FAIL selection seldom rotates (%0d)", rotations); end
    $display("max |S2| = %0d, rotations = %0d", max_s2, rotations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
