// tb_dpc_filter: checks the moving-average filter against a floating-point
// model of C' = (1 - alpha) C + alpha N with alpha = 0.03, for random inputs
// and for a long run of constant input, where C must converge to N.
module tb_dpc_filter;
  import griffin_pkg::*;
  filt_cnt_t c_old, c_new;
  raw_cnt_t  n_new;
  int checks = 0, failures = 0;

  dpc_filter dut (.c_old, .n_new, .c_new);

  function automatic real model(real c, real n);
    return (1.0 - 0.03) * c + 0.03 * n;
  endfunction

  initial begin
    real c_real, exp_v, got;
    for (int i = 0; i < 2000; i++) begin
      c_old = filt_cnt_t'($urandom_range(0, (1 << FILT_W) - 1));
      n_new = raw_cnt_t'($urandom_range(0, (1 << RAW_CNT_W) - 1));
      #1;
      exp_v = model(real'(c_old) / 65536.0, real'(n_new));
      got   = real'(c_new) / 65536.0;
      checks++;
      // alpha is 1966/65536 = 0.0299988, off by at most 0.01 at the top of the range
      if (got > exp_v + 0.02 || got < exp_v - 0.02) begin
        failures++;
        $display("FAIL c=%0d n=%0d got %f exp %f", c_old, n_new, got, exp_v);
      end
    end
    // convergence: 300 periods of N = 100 starting from 0
    c_old = '0; n_new = raw_cnt_t'(100); c_real = 0.0;
    for (int p = 0; p < 300; p++) begin
      #1; c_old = c_new; c_real = model(c_real, 100.0);
    end
    checks++;
    if (real'(c_old) / 65536.0 < 99.0 || real'(c_old) / 65536.0 > 100.0) begin
      failures++; $display("FAIL convergence %f", real'(c_old) / 65536.0);
    end
    // decay to exactly zero
    n_new = '0;
    for (int p = 0; p < 2000; p++) begin #1; c_old = c_new; end
    checks++;
    if (c_old != '0) begin failures++; $display("FAIL decay %0d", c_old); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
