// tb_dpc_classifier: directed cases for each of the five page classes, then
// random counts checked against a floating-point model of the classification
// rules (lambda_d = 2.0, lambda_s = 1.3, lambda_t = 0.03 per cycle over a
// 1000-cycle period).
module tb_dpc_classifier;
  import griffin_pkg::*;
  filt_cnt_t   c_new [N_GPU];
  filt_cnt_t   c_old [N_GPU];
  page_loc_t   loc;
  page_class_e page_class;
  logic        migrate;
  gpu_id_t     dst;
  int checks = 0, failures = 0;

  dpc_classifier dut (.c_new, .c_old, .loc, .page_class, .migrate, .dst);

  function automatic filt_cnt_t fx(real v);
    return filt_cnt_t'(longint'(v * 65536.0));
  endfunction

  task automatic set(input real n0, n1, n2, n3, o0, o1, o2, o3, input int g, input bit cpu);
    c_new[0] = fx(n0); c_new[1] = fx(n1); c_new[2] = fx(n2); c_new[3] = fx(n3);
    c_old[0] = fx(o0); c_old[1] = fx(o1); c_old[2] = fx(o2); c_old[3] = fx(o3);
    loc = '{on_cpu: cpu, gpu: gpu_id_t'(g)};
    #1;
  endtask

  task automatic expect_eq(input string name, input page_class_e c, input bit m, input int d);
    checks++;
    if (page_class != c || migrate != m || (m && dst != gpu_id_t'(d))) begin
      failures++;
      $display("FAIL %s: class %s mig %0d dst %0d, expected %s %0d %0d",
               name, page_class.name(), migrate, dst, c.name(), m, d);
    end
  endtask

  // reference model
  task automatic model(output page_class_e c, output bit m, output int d);
    real v[N_GPU], o[N_GPU], mx, sc;
    int mg, h, rg; real rc; bit rf;
    for (int g = 0; g < N_GPU; g++) begin
      v[g] = real'(c_new[g]) / 65536.0; o[g] = real'(c_old[g]) / 65536.0;
    end
    mg = 0; for (int g = 1; g < N_GPU; g++) if (v[g] > v[mg]) mg = g;
    mx = v[mg]; sc = 0.0;
    for (int g = 0; g < N_GPU; g++) if (g != mg && v[g] > sc) sc = v[g];
    h = loc.gpu; m = 0; d = mg;
    rf = 0; rg = 0; rc = 0.0;
    for (int g = 0; g < N_GPU; g++)
      if (g != h && v[g] > o[g] && (!rf || v[g] > rc)) begin rf = 1; rg = g; rc = v[g]; end
    if (mx < 0.03 * 1000.0) c = PC_STREAMING;
    else if (mx >= 2.0 * sc) begin c = PC_MOSTLY_DEDICATED; m = (h != mg); end
    else if (mx < 1.3 * sc) begin c = PC_SHARED; m = (v[h] * 2.0 < mx); end
    else if (v[h] < o[h] && rf) begin c = PC_OWNER_SHIFTING; m = 1; d = rg; end
    else c = PC_OUT_OF_INTEREST;
    if (loc.on_cpu) m = 0;
  endtask

  initial begin
    page_class_e ec; bit em; int ed;
    set(20, 10, 0, 0,   20, 10, 0, 0,  1, 0); expect_eq("streaming", PC_STREAMING, 0, 0);
    set(500, 100, 0, 0, 0, 0, 0, 0,    1, 0); expect_eq("dedicated elsewhere", PC_MOSTLY_DEDICATED, 1, 0);
    set(500, 100, 0, 0, 0, 0, 0, 0,    0, 0); expect_eq("dedicated at home", PC_MOSTLY_DEDICATED, 0, 0);
    set(100, 500, 0, 0, 0, 0, 0, 0,    1, 1); expect_eq("dedicated, host page", PC_MOSTLY_DEDICATED, 0, 1);
    set(300, 250, 240, 0, 0, 0, 0, 0,  3, 0); expect_eq("shared, cold holder", PC_SHARED, 1, 0);
    set(300, 250, 240, 0, 0, 0, 0, 0,  1, 0); expect_eq("shared, warm holder", PC_SHARED, 0, 0);
    set(400, 250, 0, 0, 500, 100, 0, 0, 0, 0); expect_eq("owner shifting", PC_OWNER_SHIFTING, 1, 1);
    set(400, 250, 0, 0, 300, 100, 0, 0, 0, 0); expect_eq("out of interest", PC_OUT_OF_INTEREST, 0, 0);
    for (int i = 0; i < 3000; i++) begin
      for (int g = 0; g < N_GPU; g++) begin
        c_new[g] = filt_cnt_t'($urandom_range(0, 600 << 16));
        c_old[g] = filt_cnt_t'($urandom_range(0, 600 << 16));
      end
      loc = '{on_cpu: ($urandom_range(0, 7) == 0), gpu: gpu_id_t'($urandom_range(0, 3))};
      #1;
      model(ec, em, ed);
      expect_eq("random", ec, em, ed);
    end
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
