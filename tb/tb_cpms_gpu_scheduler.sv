// tb_cpms_gpu_scheduler: period 1 offers pages from three source GPUs while
// only two may be drained per period: the third source's page is dropped,
// each of the other two GPUs gets exactly one drain carrying all of its pages
// (addresses page << 12, shift 12), and its pages are copied only after its
// Continue. Period 2 offers 17 pages from one GPU: 16 are kept, one dropped,
// all 16 move after a single drain.
module tb_cpms_gpu_scheduler;
  import griffin_pkg::*;
  localparam int unsigned MP = 16;
  logic clk = 0, rst_n = 0;
  logic cand_valid = 0, cand_ready, phase_end = 0, cand_dropped;
  migration_t cand = '0, pmc_req, mv;
  logic [N_GPU-1:0] drain_valid, drain_ready = '1, cont = '0;
  logic [ADDR_W-1:0] drain_addr [MP];
  logic [MP-1:0] drain_mask;
  logic [5:0] drain_shift;
  logic pmc_req_valid, pmc_done = 0, mv_valid, busy;
  int checks = 0, failures = 0;
  int drains [N_GPU];
  int drops = 0;
  bit continued [N_GPU];
  page_id_t moved [$];
  page_id_t drained_pages [N_GPU][$];

  cpms_gpu_scheduler #(.MAX_PAGES(MP)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (cand_dropped) drops++;
    if (mv_valid) moved.push_back(mv.page);
    if (pmc_req_valid && !continued[pmc_req.src.gpu]) begin
      failures++; $display("FAIL copy before Continue");
    end
  end

  // ACUD model: accept the drain, answer Continue 10 cycles later
  initial forever begin
    @(posedge clk);
    for (int g = 0; g < N_GPU; g++)
      if (rst_n && drain_valid[g]) begin
        drains[g]++;
        chk(drain_shift == 6'd12, "page size shift");
        for (int j = 0; j < MP; j++)
          if (drain_mask[j]) drained_pages[g].push_back(page_id_t'(drain_addr[j] >> 12));
        repeat (10) @(posedge clk);
        continued[g] = 1;
        cont[g] <= 1'b1; @(posedge clk); cont[g] <= 1'b0;
      end
  end
  initial forever begin
    @(posedge clk);
    if (pmc_req_valid && !pmc_done) begin
      repeat (3) @(posedge clk); pmc_done <= 1; @(posedge clk); pmc_done <= 0;
    end
  end

  task automatic offer(input int page, input int src, input int dst);
    @(negedge clk);
    cand_valid = 1;
    cand = '{page: page_id_t'(page), src: '{on_cpu: 1'b0, gpu: gpu_id_t'(src)}, dst: gpu_id_t'(dst)};
    #1; chk(cand_ready, "candidate taken while collecting");
    @(negedge clk); cand_valid = 0;
  endtask

  task automatic end_period();
    int n = 0;
    @(negedge clk); phase_end = 1; @(negedge clk); phase_end = 0;
    @(negedge clk);
    while (busy && n < 2000) begin @(negedge clk); n++; end
  endtask

  initial begin
    for (int g = 0; g < N_GPU; g++) begin drains[g] = 0; continued[g] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    offer(101, 0, 1);
    offer(102, 2, 1);
    offer(103, 0, 3);
    offer(104, 1, 0);     // third source GPU: dropped
    end_period();
    chk(drops == 1, $sformatf("one drop, saw %0d", drops));
    chk(drains[0] == 1 && drains[2] == 1 && drains[1] == 0 && drains[3] == 0, "one drain per source GPU");
    chk(drained_pages[0].size() == 2 && drained_pages[2].size() == 1, "page lists per drain");
    if (drained_pages[0].size() == 2) chk(drained_pages[0][0] == 101 && drained_pages[0][1] == 103, "GPU 0 page list");
    chk(moved.size() == 3, $sformatf("three moves, saw %0d", moved.size()));
    if (moved.size() == 3) chk(moved[0] == 101 && moved[1] == 103 && moved[2] == 102, "moves grouped by source");
    moved.delete(); drops = 0;
    for (int g = 0; g < N_GPU; g++) begin continued[g] = 0; drains[g] = 0; end
    for (int p = 0; p < MP + 1; p++) offer(200 + p, 3, p % 3);
    end_period();
    chk(drops == 1 && drains[3] == 1, "page limit and a single drain");
    chk(moved.size() == MP, $sformatf("%0d moves", moved.size()));
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
