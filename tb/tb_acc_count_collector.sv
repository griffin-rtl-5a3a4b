// tb_acc_count_collector: two GPUs with two Shader Engine monitors each
// (4-entry tables) and a 100-cycle period. In every period each monitor sees a
// known set of pages and counts; after the period tick the collector must
// deliver every (page, GPU, count) record exactly once, with the GPU taken from
// the monitor's position, then pulse collect_done. Ticks must come every 100
// cycles, and a consumer that stalls past the next tick must cause a missed
// period.
module tb_acc_count_collector;
  import griffin_pkg::*;
  localparam int unsigned NG = 2, NS = 2, NM = NG * NS, ENT = 4, PER = 100;
  logic clk = 0, rst_n = 0;
  logic period_tick, period_missed, rec_valid, rec_ready = 1, collect_done;
  acc_record_t rec;
  logic mon_rd_start [NM], mon_rd_valid [NM], mon_rd_ready [NM], mon_rd_done [NM];
  page_id_t mon_rd_page [NM];
  logic [ACC_CNT_W-1:0] mon_rd_count [NM];
  logic acc_valid [NM];
  page_id_t acc_page [NM];
  int checks = 0, failures = 0;

  acc_count_collector #(.NGPU(NG), .NSE(NS), .PERIOD(PER)) dut (.*);
  for (genvar m = 0; m < NM; m++) begin : g_mon
    acc_count_monitor #(.ENTRIES(ENT)) u_mon (
      .clk, .rst_n, .acc_valid(acc_valid[m]), .acc_page(acc_page[m]), .acc_dropped(),
      .rd_start(mon_rd_start[m]), .rd_busy(), .rd_valid(mon_rd_valid[m]), .rd_ready(mon_rd_ready[m]),
      .rd_page(mon_rd_page[m]), .rd_count(mon_rd_count[m]), .rd_done(mon_rd_done[m]));
  end
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int expect_cnt [string];
  int cyc = 0, last_tick = -1, ticks = 0, dones = 0, missed = 0, stall = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (period_tick) begin
      if (last_tick >= 0) chk(cyc - last_tick == PER, $sformatf("period %0d cycles", cyc - last_tick));
      last_tick <= cyc; ticks <= ticks + 1;
    end
    if (period_missed) missed <= missed + 1;
    if (collect_done) dones <= dones + 1;
    if (rec_valid && rec_ready) begin
      string k;
      k = $sformatf("%0d/%0d", rec.page, rec.gpu);
      chk(expect_cnt.exists(k) && expect_cnt[k] == int'(rec.count),
          $sformatf("record page %0d gpu %0d count %0d", rec.page, rec.gpu, rec.count));
      if (expect_cnt.exists(k)) expect_cnt.delete(k);
    end
  end
  always @(negedge clk) rec_ready = stall ? 1'b0 : ($urandom_range(0, 3) != 0);

  initial begin
    for (int m = 0; m < NM; m++) begin acc_valid[m] = 0; acc_page[m] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    // align to just after a tick so the accesses fall inside one period
    for (int p = 0; p < 4; p++) begin
      int d0;
      while (!period_tick) @(negedge clk);
      d0 = dones;
      while (dones == d0) @(negedge clk);     // previous collection finished
      chk(expect_cnt.num() == 0, "every record of the period delivered");
      expect_cnt.delete();
      // each monitor m: pages 1000*p + 10*m + k, k = 0..2, touched k+1 times
      for (int k = 0; k < 3; k++)
        for (int r = 0; r <= k; r++) begin
          @(negedge clk);
          for (int m = 0; m < NM; m++) begin acc_valid[m] = 1; acc_page[m] = page_id_t'(1000 * p + 10 * (m % NS) + k); end
        end
      @(negedge clk);
      for (int m = 0; m < NM; m++) acc_valid[m] = 0;
      // both SEs of a GPU share page numbers: separate records, same GPU
      for (int m = 0; m < NM; m++)
        for (int k = 0; k < 3; k++) expect_cnt[$sformatf("%0d/%0d", 1000 * p + 10 * (m % NS) + k, m / NS)] = k + 1;
    end
    while (!period_tick) @(negedge clk);
    while (!collect_done) @(negedge clk);
    @(negedge clk);
    chk(expect_cnt.num() == 0, "last period delivered");
    // stall the consumer across a whole period while a record is waiting
    @(negedge clk); acc_valid[0] = 1; acc_page[0] = page_id_t'(7);
    @(negedge clk); acc_valid[0] = 0;
    while (!period_tick) @(negedge clk);
    stall = 1;
    repeat (PER + 10) @(negedge clk);
    stall = 0;
    chk(missed >= 1, "period missed while collection stalled");
    chk(ticks >= 6, "ticks counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
