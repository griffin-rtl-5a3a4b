// tb_page_state_table: waits for the initialisation sweep (checking its
// length), then applies random touches and moves on both move ports and
// compares both read ports with a model of the table after every cycle.
module tb_page_state_table;
  import griffin_pkg::*;
  localparam int unsigned NP = 64;
  logic clk = 0, rst_n = 0, init_busy;
  page_id_t ra_page = '0, rb_page = '0, touch_page = '0, mv_a_page = '0, mv_b_page = '0;
  page_loc_t ra_loc, rb_loc, mv_a_loc = '0, mv_b_loc = '0;
  logic ra_touched, touch_en = 0, mv_a_en = 0, mv_b_en = 0;
  int checks = 0, failures = 0;

  page_state_table #(.NUM_PAGES(NP)) dut (.*);
  always #5 clk = ~clk;

  page_loc_t m_loc [NP];
  bit        m_t   [NP];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n;
    for (int i = 0; i < NP; i++) begin m_loc[i] = '{on_cpu: 1'b1, gpu: '0}; m_t[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    n = 0;
    while (init_busy) begin @(negedge clk); n++; end
    chk(n == NP, $sformatf("init took %0d cycles", n));
    for (int i = 0; i < 3000; i++) begin
      touch_en = ($urandom_range(0, 3) == 0); touch_page = page_id_t'($urandom_range(0, NP - 1));
      mv_a_en = ($urandom_range(0, 2) == 0); mv_a_page = page_id_t'($urandom_range(0, NP - 1));
      mv_b_en = ($urandom_range(0, 2) == 0); mv_b_page = ($urandom_range(0, 3) == 0) ? mv_a_page
                                                        : page_id_t'($urandom_range(0, NP - 1));
      mv_a_loc = '{on_cpu: 1'b0, gpu: gpu_id_t'($urandom_range(0, 3))};
      mv_b_loc = '{on_cpu: 1'b0, gpu: gpu_id_t'($urandom_range(0, 3))};
      @(negedge clk);
      if (touch_en) m_t[touch_page] = 1;
      if (mv_a_en) m_loc[mv_a_page] = mv_a_loc;
      if (mv_b_en) m_loc[mv_b_page] = mv_b_loc;   // port b wins
      touch_en = 0; mv_a_en = 0; mv_b_en = 0;
      ra_page = page_id_t'($urandom_range(0, NP - 1)) | (page_id_t'($urandom) << 6);
      rb_page = page_id_t'($urandom_range(0, NP - 1));
      #1;
      chk(ra_loc == m_loc[ra_page % NP] && ra_touched == m_t[ra_page % NP],
          $sformatf("port a page %0d", ra_page % NP));
      chk(rb_loc == m_loc[rb_page], $sformatf("port b page %0d", rb_page));
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
