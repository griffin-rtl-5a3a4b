// tb_griffin_top: end-to-end run of the whole design at its default sizes
// (four GPUs of 36 CUs, 16384 pages, 1000-cycle periods).
//
// Host phase: GPU 0 faults on pages 0x10-0x12 and GPU 1 on 0x20 while walks
// complete; no GPU holds pages yet, so all four migrate in one batch behind a
// single host flush. Then GPU 0, now the most occupied GPU, touches 0x30: the
// first touch is answered with a host remote access and the second migrates
// it; GPU 3 takes 0x31. That batch closes by timeout.
// Period phase: Shader Engine traffic makes page 0x20 (on GPU 1) shift owner to
// GPU 3, page 0x10 (on GPU 0) mostly dedicated to GPU 1, page 0x12 (on GPU 0)
// shared by GPUs 2 and 3, and page 0x11 streaming. GPU 0 is drained once for
// its two leaving pages while one of its CUs still has a transaction on 0x10
// (the drain must wait for it) and another has a long transaction elsewhere
// (the drain must not).
// Every mechanism is counted and must have happened; final page homes and
// occupancies are compared with the expected ones.
module tb_griffin_top;
  import griffin_pkg::*;
  localparam int unsigned INF = 16, DP = 16, NP = 16384;

  logic clk = 0, rst_n = 0, init_busy;
  logic xlat_valid = 0, xlat_ready;
  gpu_id_t xlat_gpu = '0;
  page_id_t xlat_page = '0;
  xlat_kind_e xlat_kind;
  page_loc_t xlat_loc;
  logic [N_PTW-1:0] ptw_walk_done = '0;
  logic se_acc_valid [N_GPU][N_SE];
  page_id_t se_acc_page [N_GPU][N_SE];
  logic cu_issue_valid [N_GPU][N_CU], cu_issue_ready [N_GPU][N_CU];
  logic [ADDR_W-1:0] cu_issue_addr [N_GPU][N_CU];
  logic [$clog2(INF)-1:0] cu_issue_tag [N_GPU][N_CU], cu_complete_tag [N_GPU][N_CU];
  logic cu_complete_valid [N_GPU][N_CU], cu_wg_pause [N_GPU][N_CU];
  logic cpu_flush_req, cpu_flush_done = 0;
  logic pmc_h_req_valid, pmc_h_done = 0, pmc_g_req_valid, pmc_g_done = 0;
  migration_t pmc_h_req, pmc_g_req;
  logic tlb_shoot_req [N_GPU], tlb_shoot_done [N_GPU], l2_flush_req [N_GPU], l2_flush_done [N_GPU];
  logic [ADDR_W-1:0] shoot_addr [N_GPU][DP];
  logic [DP-1:0] shoot_mask [N_GPU];
  logic [5:0] shoot_shift [N_GPU];
  logic [$clog2(NP+1)-1:0] occupancy [N_GPU];
  logic period_tick, batch_closed, cls_valid, cand_dropped;
  page_class_e cls_class;
  logic [N_GPU-1:0] acud_continue;

  griffin_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- event counters ----------------
  int n_cls [5];
  int n_flush = 0, n_batch = 0, n_host_copy = 0, n_gpu_copy = 0, n_cont = 0, n_shoot = 0;
  int n_host_dca = 0, n_second_touch = 0, n_remote = 0, n_local = 0, n_ticks = 0;
  int n_gpu0_drains = 0, n_drain_waited = 0, n_drain_immediate = 0;
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (cls_valid) n_cls[int'(cls_class)]++;
    if (batch_closed) n_batch++;
    if (period_tick) n_ticks++;
    if (acud_continue != '0) n_cont++;
    if (pmc_g_req_valid && acud_continue != '0) begin failures++; $display("FAIL copy in the Continue cycle"); end
  end

  // ---------------- responders ----------------
  initial forever begin   // host flush: fixed 100-cycle penalty
    @(posedge clk);
    if (cpu_flush_req && !cpu_flush_done) begin
      n_flush++; repeat (100) @(posedge clk);
      cpu_flush_done <= 1; @(posedge clk); cpu_flush_done <= 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (pmc_h_req_valid && !pmc_h_done) begin
      repeat (40) @(posedge clk); n_host_copy++;
      pmc_h_done <= 1; @(posedge clk); pmc_h_done <= 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (pmc_g_req_valid && !pmc_g_done) begin
      $display("[%0d] copy page %h GPU %0d -> GPU %0d", cyc, pmc_g_req.page, pmc_g_req.src.gpu, pmc_g_req.dst);
      repeat (40) @(posedge clk); n_gpu_copy++;
      pmc_g_done <= 1; @(posedge clk); pmc_g_done <= 0;
    end
  end
  for (genvar g = 0; g < N_GPU; g++) begin : g_resp
    initial begin
      tlb_shoot_done[g] = 0; l2_flush_done[g] = 0;
      forever begin
        @(posedge clk);
        if (tlb_shoot_req[g] && l2_flush_req[g]) begin
          n_shoot++;
          chk(shoot_shift[g] == 6'd12, "shootdown for 4 KB pages");
          repeat (10) @(posedge clk); tlb_shoot_done[g] <= 1; @(posedge clk); tlb_shoot_done[g] <= 0;
          repeat (10) @(posedge clk); l2_flush_done[g] <= 1; @(posedge clk); l2_flush_done[g] <= 0;
        end
      end
    end
  end

  // ---------------- CU side ----------------
  // GPU 0: CU 5 has a transaction on page 0x10 completed 300 cycles after the
  // drain begins; CU 0 has one on page 0x99 that never completes.
  int t_drain0 = -1, t_cu5_done = -1, t_cont0 = -1;
  logic [$clog2(INF)-1:0] tag5;
  initial begin
    for (int g = 0; g < N_GPU; g++)
      for (int c = 0; c < N_CU; c++) begin
        cu_issue_valid[g][c] = 0; cu_issue_addr[g][c] = '0;
        cu_complete_valid[g][c] = 0; cu_complete_tag[g][c] = '0;
      end
    for (int g = 0; g < N_GPU; g++)
      for (int s = 0; s < N_SE; s++) begin se_acc_valid[g][s] = 0; se_acc_page[g][s] = '0; end
  end
  task automatic cu_issue(input int g, input int c, input logic [ADDR_W-1:0] a, output logic [$clog2(INF)-1:0] tag);
    @(negedge clk); cu_issue_valid[g][c] = 1; cu_issue_addr[g][c] = a; #1;
    chk(cu_issue_ready[g][c], "CU transaction accepted");
    tag = cu_issue_tag[g][c];
    @(negedge clk); cu_issue_valid[g][c] = 0;
  endtask
  always @(posedge clk) if (rst_n) begin
    if (cu_wg_pause[0][0] && t_drain0 < 0) t_drain0 = cyc;
    if (acud_continue[0] && t_cont0 < 0) t_cont0 = cyc;
    if (acud_continue[0]) n_gpu0_drains++;
  end
  initial begin
    wait (t_drain0 >= 0);
    repeat (300) @(negedge clk);
    chk(acud_continue[0] == 0 && t_cont0 < 0, "drain waits for the CU with a transaction on the page");
    cu_complete_valid[0][5] = 1; cu_complete_tag[0][5] = tag5; t_cu5_done = cyc;
    @(negedge clk); cu_complete_valid[0][5] = 0;
  end

  // ---------------- IOMMU side ----------------
  task automatic xlat(input int g, input int page, output xlat_kind_e k);
    @(negedge clk);
    xlat_valid = 1; xlat_gpu = gpu_id_t'(g); xlat_page = page_id_t'(page);
    #1;
    while (!xlat_ready) begin @(negedge clk); #1; end
    k = xlat_kind;
    if (k == XL_HOST_DCA) n_host_dca++;
    if (k == XL_REMOTE_GPU) n_remote++;
    if (k == XL_LOCAL) n_local++;
    @(negedge clk); xlat_valid = 0;
  endtask
  task automatic walks(input int n);
    @(negedge clk);
    for (int i = 0; i < N_PTW; i++) ptw_walk_done[i] = (i < n);
    @(negedge clk); ptw_walk_done = '0;
  endtask
  task automatic expect_kind(input int g, input int page, input xlat_kind_e e, input string what);
    xlat_kind_e k;
    xlat(g, page, k);
    chk(k == e, $sformatf("%s: GPU %0d page %h got %s expected %s", what, g, page, k.name(), e.name()));
  endtask

  // ---------------- Shader Engine traffic ----------------
  // one period of traffic: for every (gpu, se) a list of (page, count)
  typedef struct { int page; int count; } acc_t;
  acc_t plan [N_GPU][N_SE][$];
  task automatic run_traffic();
    int left;
    int idx [N_GPU][N_SE];
    int done_n [N_GPU][N_SE];
    for (int g = 0; g < N_GPU; g++) for (int s = 0; s < N_SE; s++) begin idx[g][s] = 0; done_n[g][s] = 0; end
    do begin
      @(negedge clk);
      left = 0;
      for (int g = 0; g < N_GPU; g++)
        for (int s = 0; s < N_SE; s++) begin
          se_acc_valid[g][s] = 0;
          if (idx[g][s] < plan[g][s].size()) begin
            se_acc_valid[g][s] = 1;
            se_acc_page[g][s] = page_id_t'(plan[g][s][idx[g][s]].page);
            done_n[g][s]++;
            if (done_n[g][s] == plan[g][s][idx[g][s]].count) begin idx[g][s]++; done_n[g][s] = 0; end
            left++;
          end
        end
    end while (left != 0);
    @(negedge clk);
    for (int g = 0; g < N_GPU; g++) for (int s = 0; s < N_SE; s++) se_acc_valid[g][s] = 0;
  endtask
  task automatic add(input int g, input int s, input int page, input int count);
    acc_t a; a.page = page; a.count = count; plan[g][s].push_back(a);
  endtask

  initial begin
    xlat_kind_e k;
    int t0;
    for (int i = 0; i < 5; i++) n_cls[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    t0 = 0;
    while (init_busy) begin @(negedge clk); t0++; end
    chk(t0 == NP, $sformatf("page table initialised in %0d cycles", t0));

    // ---- host phase 1: four first touches, one batch ----
    expect_kind(0, 'h10, XL_MIGRATE, "first touch, balanced");  walks(1);
    expect_kind(0, 'h11, XL_MIGRATE, "first touch, balanced");  walks(2);
    expect_kind(0, 'h12, XL_MIGRATE, "first touch, balanced");  walks(1);
    expect_kind(1, 'h20, XL_MIGRATE, "first touch, balanced");  walks(3);
    chk(n_batch == 0, "batch still open at 7 walks");
    walks(1);
    repeat (2) @(negedge clk);
    chk(n_batch == 1, "batch closed at the 8th walk");
    wait (n_host_copy == 4);
    repeat (3) @(negedge clk);
    chk(n_flush == 1, $sformatf("one host flush for four pages (saw %0d)", n_flush));
    chk(occupancy[0] == 3 && occupancy[1] == 1, "occupancy after batch 1");
    expect_kind(0, 'h10, XL_LOCAL, "migrated page is local");
    expect_kind(1, 'h10, XL_REMOTE_GPU, "page on another GPU");
    // ---- host phase 2: delayed first touch ----
    expect_kind(0, 'h30, XL_HOST_DCA, "most occupied GPU, first touch delayed");
    expect_kind(0, 'h30, XL_MIGRATE, "second touch migrates");
    n_second_touch++;
    expect_kind(3, 'h31, XL_MIGRATE, "least occupied GPU migrates at once");
    wait (n_host_copy == 6);
    repeat (3) @(negedge clk);
    chk(n_batch == 2 && n_flush == 2, "second batch closed by timeout");
    chk(occupancy[0] == 4 && occupancy[3] == 1, "occupancy after batch 2");

    // ---- CU transactions on GPU 0 ----
    cu_issue(0, 5, (ADDR_W'('h10) << 12) + 64'h40, tag5);
    begin logic [$clog2(INF)-1:0] t; cu_issue(0, 0, ADDR_W'('h99) << 12, t); end

    // ---- period phase ----
    for (int p = 0; p < 6; p++) begin
      while (!period_tick) @(negedge clk);
      repeat (200) @(negedge clk);     // after the collection of the last period
      for (int g = 0; g < N_GPU; g++) for (int s = 0; s < N_SE; s++) plan[g][s].delete();
      for (int s = 0; s < N_SE; s++) add(1, s, 'h10, 75);                  // 0x10: GPU 1, 300/period
      for (int s = 0; s < 2; s++) begin add(2, s, 'h12, 150); add(3, s, 'h12, 150); end  // 0x12 shared
      add(0, 1, 'h11, 20);                                                  // 0x11 streaming
      for (int s = 0; s < N_SE; s++)                                        // 0x20 owner GPU 1 -> GPU 3
        if (p < 2) add(1, s, 'h20, 250); else add(3, s, 'h20, 250);
      run_traffic();
      $display("[%0d] period %0d traffic done", cyc, p);
    end
    while (!period_tick) @(negedge clk);
    repeat (900) @(negedge clk);

    // ---- results ----
    $display("classes: out %0d dedicated %0d shared %0d streaming %0d owner-shifting %0d",
             n_cls[0], n_cls[1], n_cls[2], n_cls[3], n_cls[4]);
    $display("host flushes %0d batches %0d host copies %0d gpu copies %0d drains %0d shootdowns %0d",
             n_flush, n_batch, n_host_copy, n_gpu_copy, n_cont, n_shoot);
    chk(n_cls[int'(PC_MOSTLY_DEDICATED)] > 0, "mechanism: mostly dedicated page");
    chk(n_cls[int'(PC_SHARED)] > 0, "mechanism: shared page");
    chk(n_cls[int'(PC_STREAMING)] > 0, "mechanism: streaming page");
    chk(n_cls[int'(PC_OWNER_SHIFTING)] > 0, "mechanism: owner-shifting page");
    chk(n_host_dca > 0 && n_second_touch > 0, "mechanism: delayed first touch");
    chk(n_batch >= 2, "mechanism: batched host migration");
    chk(n_remote > 0, "mechanism: remote access to another GPU");
    chk(n_shoot >= 2 && n_cont >= 2, "mechanism: ACUD drain, shootdown and Continue");
    chk(t_cu5_done >= 0 && t_cont0 > t_cu5_done, "mechanism: drain waited for a transaction on the page");
    chk(n_gpu0_drains == 1, $sformatf("GPU 0 drained once for two pages (saw %0d)", n_gpu0_drains));
    chk(n_gpu_copy == 3, $sformatf("three GPU-to-GPU copies (saw %0d)", n_gpu_copy));
    chk(n_ticks >= 7, "periods elapsed");
    expect_kind(1, 'h10, XL_LOCAL, "0x10 now on GPU 1");
    expect_kind(2, 'h12, XL_LOCAL, "0x12 now on GPU 2");
    expect_kind(3, 'h20, XL_LOCAL, "0x20 now on GPU 3");
    expect_kind(0, 'h11, XL_LOCAL, "0x11 stays on GPU 0");
    expect_kind(3, 'h30, XL_REMOTE_GPU, "0x30 on GPU 0");
    chk(occupancy[0] == 2 && occupancy[1] == 1 && occupancy[2] == 1 && occupancy[3] == 2,
        $sformatf("final occupancy %0d %0d %0d %0d", occupancy[0], occupancy[1], occupancy[2], occupancy[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
