// tb_lms_block: checks one 5-tap LMS section on its own, in both forms: the
// first section (no D0 register, tap 0 sees x directly) and an inner section
// (D0..D4). Random x, error and incoming partial sum are driven; an integer
// model kept here predicts the partial-sum output, the x passed on and the
// five taps after every update (w += round(mu*err*x), 12-bit saturation).
module tb_lms_block;
  import sd_pkg::*;
  localparam int ACC_W = DATA_W + TAP_W + 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  word_t x, e;
  logic signed [ACC_W-1:0] yin, yo_f, yo_m;
  word_t xo_f, xo_m;
  logic signed [TAP_W-1:0] w_f [BLK_TAPS], w_m [BLK_TAPS];

  lms_block #(.FIRST(1'b1)) dut_f (.clk, .rst_n, .en_i(en), .x_i(x), .err_i(e), .y_i(yin), .y_o(yo_f), .x_o(xo_f), .w_o(w_f));
  lms_block #(.FIRST(1'b0)) dut_m (.clk, .rst_n, .en_i(en), .x_i(x), .err_i(e), .y_i(yin), .y_o(yo_m), .x_o(xo_m), .w_o(w_m));

  always #5 clk = ~clk;

  longint xs [8];
  longint wf [BLK_TAPS], wm [BLK_TAPS];

  function automatic longint sat(longint v, int bits);
    longint mx = (longint'(1) <<< (bits-1)) - 1;
    longint mn = -(longint'(1) <<< (bits-1));
    return v > mx ? mx : (v < mn ? mn : v);
  endfunction
  function automatic longint upd(longint ww, longint ee, longint xx);
    return sat(ww + ((ee * xx * longint'(MU_Q) + (longint'(1) <<< 27)) >>> 28), TAP_W);
  endfunction

  initial begin
    longint yf, ym;
    int bad = 0;
    for (int i = 0; i < 8; i++) xs[i] = 0;
    for (int i = 0; i < BLK_TAPS; i++) begin wf[i] = 0; wm[i] = 0; end
    x = '0; e = '0; yin = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 7; i > 0; i--) xs[i] = xs[i-1];
      xs[0] = longint'($urandom_range(0, 4095)) - 2048;
      x = word_t'(xs[0]);
      // large errors early so the taps move far, then small ones
      e = word_t'((n < 1500) ? longint'($urandom_range(0, 4095)) - 2048 : longint'($urandom_range(0, 63)) - 32);
      yin = ACC_W'(longint'($urandom_range(0, 1000000)) - 500000);
      en = ($urandom_range(0, 3) != 0);   // some samples skipped
      #1;
      yf = longint'(yin); ym = longint'(yin);
      for (int j = 0; j < BLK_TAPS; j++) begin
        yf += wf[j] * xs[j];     // first block: taps on x[n]..x[n-4]
        ym += wm[j] * xs[j+1];   // inner block: taps on x[n-1]..x[n-5]
      end
      checks += 4;
      if (longint'(yo_f) != yf) begin failures++; if (bad++ < 5) $display("FAIL n=%0d first y %0d exp %0d", n, yo_f, yf); end
      if (longint'(yo_m) != ym) begin failures++; if (bad++ < 5) $display("FAIL n=%0d inner y %0d exp %0d", n, yo_m, ym); end
      if (longint'(xo_f) != xs[4]) begin failures++; if (bad++ < 5) $display("FAIL n=%0d first x_o", n); end
      if (longint'(xo_m) != xs[5]) begin failures++; if (bad++ < 5) $display("FAIL n=%0d inner x_o", n); end
      if (en) begin
        for (int j = 0; j < BLK_TAPS; j++) begin
          wf[j] = upd(wf[j], longint'(e), xs[j]);
          wm[j] = upd(wm[j], longint'(e), xs[j+1]);
        end
      end else begin
        // no sample: the delay line must not move, undo the model's shift
        for (int i = 0; i < 7; i++) xs[i] = xs[i+1];
      end
      @(posedge clk); #1;
      for (int j = 0; j < BLK_TAPS; j++) begin
        checks += 2;
        if (longint'(w_f[j]) != wf[j]) begin failures++; if (bad++ < 5) $display("FAIL n=%0d first tap %0d: %0d exp %0d en %0d e %0d", n, j, w_f[j], wf[j], en, e); end
        if (longint'(w_m[j]) != wm[j]) begin failures++; if (bad++ < 5) $display("FAIL n=%0d inner tap %0d", n, j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
