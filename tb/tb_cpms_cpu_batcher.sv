// tb_cpms_cpu_batcher: three batches against the host-to-GPU batcher.
//   1. pages arrive while walks complete: the batch must close exactly when the
//      8th walk completes, flush the host once, transfer every distinct page
//      in arrival order (a duplicate request is absorbed) and report each move;
//   2. one page and no walks: the batch closes after the timeout (20 cycles);
//   3. eight pages and no walks: the batch closes as soon as it is full.
// Flush and copy responders answer after a few cycles; requests must be
// refused while a batch is flushed or copied.
module tb_cpms_cpu_batcher;
  import griffin_pkg::*;
  localparam int unsigned WAIT = 20;
  logic clk = 0, rst_n = 0;
  logic [N_PTW-1:0] walk_done = '0;
  logic mig_valid = 0, mig_ready, cpu_flush_req, cpu_flush_done = 0;
  migration_t mig = '0, pmc_req, mv;
  logic pmc_req_valid, pmc_done = 0, mv_valid, batch_closed;
  int checks = 0, failures = 0;
  int flushes = 0, closes = 0;
  page_id_t moved [$];

  cpms_cpu_batcher #(.MAX_WAIT(WAIT)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // responders
  always @(posedge clk) begin
    if (rst_n && batch_closed) closes++;
    if (rst_n && mv_valid) moved.push_back(mv.page);
    if (rst_n && pmc_req_valid && cpu_flush_req) begin failures++; $display("FAIL copy during flush"); end
    if (rst_n && (cpu_flush_req || pmc_req_valid) && mig_ready) begin failures++; $display("FAIL accepts while busy"); end
  end
  initial forever begin
    @(posedge clk);
    if (cpu_flush_req && !cpu_flush_done) begin
      flushes++;
      repeat (3) @(posedge clk);
      cpu_flush_done <= 1; @(posedge clk); cpu_flush_done <= 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (pmc_req_valid && !pmc_done) begin
      repeat (2) @(posedge clk);
      pmc_done <= 1; @(posedge clk); pmc_done <= 0;
    end
  end

  task automatic send(input int page, input int walks);
    @(negedge clk);
    mig_valid = 1; mig = '{page: page_id_t'(page), src: '{on_cpu: 1'b1, gpu: '0}, dst: gpu_id_t'(page % 4)};
    walk_done = '0;
    for (int i = 0; i < walks; i++) walk_done[i] = 1'b1;
    #1; chk(mig_ready, "request accepted while collecting");
    @(negedge clk); mig_valid = 0; walk_done = '0;
  endtask

  task automatic walks(input int n);
    @(negedge clk); walk_done = '0;
    for (int i = 0; i < n; i++) walk_done[i] = 1'b1;
    @(negedge clk); walk_done = '0;
  endtask

  task automatic wait_idle();
    int n = 0;
    while (!(mig_ready && !cpu_flush_req && !pmc_req_valid) || n < 3) begin
      @(negedge clk); n++;
      if (mig_ready) n = n; else n = 0;
    end
  endtask

  initial begin
    int t0, t1;
    repeat (2) @(negedge clk); rst_n = 1;
    // ---- batch 1 ----
    send(10, 1);       // 1 walk
    send(11, 2);       // 3
    send(10, 0);       // duplicate
    walks(2);          // 5
    send(12, 1);       // 6
    chk(closes == 0 && !cpu_flush_req, "not closed before the 8th walk");
    walks(1);          // 7
    @(negedge clk);
    chk(closes == 0, "still open at 7 walks");
    walks(1);          // 8
    @(negedge clk);
    chk(closes == 1, "closed at the 8th walk");
    wait_idle();
    chk(flushes == 1, $sformatf("one flush per batch, saw %0d", flushes));
    chk(moved.size() == 3, $sformatf("3 moves, saw %0d", moved.size()));
    if (moved.size() == 3) chk(moved[0] == 10 && moved[1] == 11 && moved[2] == 12, "order of moves");
    moved.delete();
    // ---- batch 2: timeout ----
    send(20, 0);
    t0 = $time / 10;
    while (closes < 2) begin
      @(negedge clk);
      if ($time / 10 - t0 > 100) break;
    end
    t1 = $time / 10;
    chk(t1 - t0 >= WAIT - 1 && t1 - t0 <= WAIT + 1, $sformatf("timeout after %0d cycles", t1 - t0));
    wait_idle();
    chk(flushes == 2 && moved.size() == 1, "timeout batch flushed and moved");
    moved.delete();
    // ---- batch 3: full ----
    for (int p = 0; p < N_PTW; p++) send(30 + p, 0);
    @(negedge clk);
    chk(closes == 3, "closed when full");
    wait_idle();
    chk(flushes == 3 && moved.size() == N_PTW, $sformatf("full batch moved %0d", moved.size()));
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
