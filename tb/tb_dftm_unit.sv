// tb_dftm_unit: drives random faults on host-resident pages against a model
// of the Delayed First-Touch Migration rule: migrate when the page was touched
// before or the requester is not strictly the most occupied GPU, otherwise
// answer with a remote access and mark the page. Occupancy is driven through
// random page moves and compared with the model's counters.
module tb_dftm_unit;
  import griffin_pkg::*;
  localparam int unsigned NP = 64;
  logic clk = 0, rst_n = 0;
  logic fault_valid = 0, fault_ready;
  gpu_id_t fault_gpu = '0;
  page_id_t fault_page = '0, pst_page, touch_page, dca_page;
  logic pst_touched, touch_en, dca_valid, mig_valid, mig_ready = 1;
  gpu_id_t dca_gpu;
  migration_t mig;
  logic mv_a_en = 0, mv_b_en = 0;
  page_loc_t mv_a_src = '0, mv_b_src = '0;
  gpu_id_t mv_a_dst = '0, mv_b_dst = '0;
  logic [$clog2(NP+1)-1:0] occupancy [N_GPU];
  int checks = 0, failures = 0;
  int n_dca = 0, n_mig = 0, n_second = 0;

  dftm_unit #(.NUM_PAGES(NP)) dut (.*);
  always #5 clk = ~clk;

  bit touched [NP];
  int occ [N_GPU];
  assign pst_touched = touched[pst_page % NP];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < NP; i++) touched[i] = 0;
    for (int g = 0; g < N_GPU; g++) occ[g] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      bit highest, exp_mig;
      int src;
      // a random move updates occupancy (page from host or another GPU)
      mv_a_en = ($urandom_range(0, 6) == 0);
      mv_a_src = '{on_cpu: 1'b1, gpu: '0};
      mv_a_dst = gpu_id_t'($urandom_range(0, 1));   // skewed towards GPUs 0 and 1
      mv_b_en = ($urandom_range(0, 3) == 0);
      src = $urandom_range(0, 3);
      mv_b_src = '{on_cpu: 1'b0, gpu: gpu_id_t'(src)};
      mv_b_dst = gpu_id_t'($urandom_range(0, 3));
      if (mv_b_en && occ[src] == 0) mv_b_en = 0;
      // a GPU can hold no more pages than exist: host-to-GPU moves stop at NP
      if (occ[0] + occ[1] + occ[2] + occ[3] >= NP - 1) mv_a_en = 0;
      fault_valid = 1;
      fault_gpu = gpu_id_t'($urandom_range(0, 3));
      fault_page = page_id_t'($urandom_range(0, NP - 1));
      mig_ready = ($urandom_range(0, 4) != 0);
      #1;
      highest = 1;
      for (int g = 0; g < N_GPU; g++) if (g != fault_gpu && occ[g] >= occ[fault_gpu]) highest = 0;
      exp_mig = touched[fault_page] || !highest;
      chk(mig_valid == exp_mig && dca_valid == !exp_mig, $sformatf("decision page %0d gpu %0d", fault_page, fault_gpu));
      chk(fault_ready == (!exp_mig || mig_ready), "fault_ready");
      if (mig_valid) chk(mig.page == fault_page && mig.dst == fault_gpu && mig.src.on_cpu, "migration order");
      if (dca_valid) begin n_dca++; touched[fault_page] = 1; end
      if (mig_valid && mig_ready) begin n_mig++; if (touched[fault_page]) n_second++; end
      @(negedge clk);
      if (mv_a_en) occ[mv_a_dst]++;
      if (mv_b_en) begin occ[mv_b_dst]++; occ[src]--; end
      mv_a_en = 0; mv_b_en = 0;
      for (int g = 0; g < N_GPU; g++) chk(int'(occupancy[g]) == occ[g], $sformatf("occupancy %0d", g));
      if (i % 500 == 0) for (int k = 0; k < NP; k++) touched[k] = 0;   // fresh pages for the next round
    end
    chk(n_dca > 50 && n_mig > 50 && n_second > 10, $sformatf("coverage dca %0d mig %0d second %0d", n_dca, n_mig, n_second));
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
