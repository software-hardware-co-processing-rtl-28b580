// tb_gmm_conv_lane: self-checking test of one 3x3 convolution lane.
//
// Drives random windows and kernels, plus the Sobel kernels and the two
// saturation corners, and compares the result with a sum of products
// worked out in integer arithmetic here, clamped to [-32768, 32767].
module tb_gmm_conv_lane;
  import gmm_pkg::*;

  pix_t  [KTAPS-1:0] win;
  coef_t [KTAPS-1:0] coef;
  res_t              res;
  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0;

  gmm_conv_lane dut (.win(win), .coef(coef), .res(res));

  function automatic int ref_conv(pix_t [KTAPS-1:0] w, coef_t [KTAPS-1:0] c);
    int s = 0;
    for (int t = 0; t < KTAPS; t++) s += int'(w[t]) * int'(c[t]);
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  task automatic check();
    int exp;
    #1;
    exp = ref_conv(win, coef);
    checks++;
    if (exp == 32767) sat_hi++;
    if (exp == -32768) sat_lo++;
    if (int'(res) != exp) begin
      failures++;
      $display("FAIL win=%h coef=%h res=%0d exp=%0d", win, coef, res, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Sobel X on a vertical edge: -1 0 1 / -2 0 2 / -1 0 1
    coef = '{8'sd1, 8'sd0, -8'sd1, 8'sd2, 8'sd0, -8'sd2, 8'sd1, 8'sd0, -8'sd1};
    win  = '{8'd200, 8'd0, 8'd0, 8'd200, 8'd0, 8'd0, 8'd200, 8'd0, 8'd0};
    check();
    if (res !== 16'sd800) begin failures++; $display("FAIL sobel edge %0d", res); end
    checks++;
    // saturation corners
    win = '{default: 8'd255};
    coef = '{default: 8'sd127};   check();
    coef = '{default: -8'sd128};  check();
    for (int i = 0; i < 3000; i++) begin
      for (int t = 0; t < KTAPS; t++) begin
        win[t]  = pix_t'($urandom);
        coef[t] = coef_t'($urandom);
      end
      if (i % 3 == 0) for (int t = 0; t < KTAPS; t++) coef[t] = coef_t'($signed(4'($urandom)));
      check();
    end
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
