// tb_dpc_unit: an 8-entry classification table with a 100-cycle period
// (streaming below 3 filtered accesses per period).
//   Period 1: page A gets 200 + 55 accesses from GPU 0 (two Shader Engines)
//   and lives on GPU 1: filtered 7.65, Mostly Dedicated, candidate A 1->0.
//   Page B gets 150 from GPUs 0 and 1 and lives on GPU 2 (filtered 0): Shared
//   with a cold holder, candidate B 2->0. Page C gets 50 from GPU 2 (1.5):
//   Streaming. The scheduler stalls the sweep for a while.
//   Then: the sweep length without stalls, dropping when the table is full,
//   and freeing of entries once their counts have decayed to zero.
module tb_dpc_unit;
  import griffin_pkg::*;
  localparam int unsigned ENT = 8, PER = 100;
  logic clk = 0, rst_n = 0;
  logic rec_valid = 0, rec_ready, rec_dropped, collect_done = 0;
  acc_record_t rec = '0;
  page_id_t loc_page;
  page_loc_t loc;
  logic cand_valid, cand_ready = 1, cls_valid, sweep_done;
  migration_t cand;
  page_class_e cls_class;
  int checks = 0, failures = 0;

  dpc_unit #(.ENTRIES(ENT), .PERIOD(PER)) dut (.*);
  always #5 clk = ~clk;

  // page homes: A=1 on GPU 1, B=2 on GPU 2, C=3 on GPU 2, others GPU 3
  always_comb
    case (loc_page)
      page_id_t'(1): loc = '{on_cpu: 1'b0, gpu: 2'd1};
      page_id_t'(2): loc = '{on_cpu: 1'b0, gpu: 2'd2};
      page_id_t'(3): loc = '{on_cpu: 1'b0, gpu: 2'd2};
      default:       loc = '{on_cpu: 1'b0, gpu: 2'd3};
    endcase

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  page_class_e classes [page_id_t];
  migration_t  cands [$];
  int drops = 0;
  always @(posedge clk) if (rst_n) begin
    if (cls_valid) classes[loc_page] = cls_class;
    if (cand_valid && cand_ready) cands.push_back(cand);
    if (rec_dropped) drops++;
  end

  task automatic send(input int page, input int gpu, input int count);
    @(negedge clk);
    rec_valid = 1; rec = '{page: page_id_t'(page), gpu: gpu_id_t'(gpu), count: 8'(count)};
    #1; chk(rec_ready, "record accepted");
    @(negedge clk); rec_valid = 0;
  endtask

  task automatic sweep(output int cycles);
    @(negedge clk); collect_done = 1; @(negedge clk); collect_done = 0;
    cycles = 1;
    while (!sweep_done && cycles < 10000) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    // ---- period 1 ----
    send(1, 0, 200); send(1, 0, 55);
    send(2, 0, 150); send(2, 1, 150);
    send(3, 2, 50);
    fork
      begin repeat (3) @(negedge clk); cand_ready = 0; repeat (10) @(negedge clk); cand_ready = 1; end
      sweep(cyc);
    join
    chk(classes.exists(1) && classes[1] == PC_MOSTLY_DEDICATED, "A mostly dedicated");
    chk(classes.exists(2) && classes[2] == PC_SHARED, "B shared");
    chk(classes.exists(3) && classes[3] == PC_STREAMING, "C streaming");
    chk(cands.size() == 2, $sformatf("two candidates, saw %0d", cands.size()));
    if (cands.size() == 2) begin
      chk(cands[0].page == 1 && cands[0].src.gpu == 1 && cands[0].dst == 0, "candidate A 1->0");
      chk(cands[1].page == 2 && cands[1].src.gpu == 2 && cands[1].dst == 0, "candidate B 2->0");
    end
    chk(cyc > ENT + 5, "sweep waited for the scheduler");
    // ---- period 2: no stalls, sweep length ----
    cands.delete();
    sweep(cyc);
    chk(cyc == ENT + 1, $sformatf("sweep of %0d entries took %0d cycles", ENT, cyc));
    chk(cands.size() == 2 && cands[0].page == 1 && cands[1].page == 2, "A and B still candidates after decay");
    // ---- table full: 3 tracked, 9 new pages, 5 fit ----
    drops = 0;
    for (int p = 0; p < 9; p++) send(100 + p, 3, 1);
    @(negedge clk);
    chk(drops == 4, $sformatf("dropped %0d records", drops));
    // ---- decay to zero frees every entry ----
    for (int i = 0; i < 450; i++) sweep(cyc);
    drops = 0;
    for (int p = 0; p < ENT; p++) send(200 + p, 1, 1);
    @(negedge clk);
    chk(drops == 0, "entries freed after decay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
