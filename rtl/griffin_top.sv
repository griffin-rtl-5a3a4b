// griffin_top: Griffin page-migration support for a four-GPU system.
//
// Griffin moves pages between host memory and four GPUs, and between GPUs, at
// run time and without programmer help. Its four mechanisms are wired here:
//   - DFTM (dftm_unit): a GPU that misses on a page still in host memory gets
//     the page only if it is not the most occupied GPU or if the page was
//     touched before; otherwise it reads the page remotely this once.
//   - CPMS (cpms_cpu_batcher, cpms_gpu_scheduler): host-to-GPU migrations are
//     batched until N_PTW page walks complete so that one host flush serves
//     many pages; GPU-to-GPU migrations are decided once per period, grouped by
//     source GPU, and each source GPU is drained once.
//   - DPC (acc_count_monitor per Shader Engine, acc_count_collector,
//     dpc_unit): page access counts are gathered every T_ac cycles, filtered
//     with a moving average and used to classify pages; pages that are mostly
//     used by another GPU, or whose main user is shifting, become candidates.
//   - ACUD (acud_controller per GPU, acud_cu_drain per CU): a source GPU is
//     drained only with respect to the migrating pages, shoots down just
//     their TLB entries and L2 blocks, and resumes before the data is copied.
//
// Outside this block, and reached through its ports, are the page-table
// walkers, the CUs' pipelines, TLBs and L2 caches, the host, and the page
// migration controller that copies the data.
//
// Ports:
//   xlat_*        translation requests that reached the IOMMU (GPU, page) and
//                 their answer kind (xlat_kind_e) with the page's location;
//                 the request is accepted when xlat_ready is high and the
//                 answer is given in the same cycle.
//   ptw_walk_done one bit per page-table walker, high when a walk completes.
//   se_acc_*      per GPU and Shader Engine, the post-coalescing transaction
//                 stream (one page ID per cycle) seen by the access monitors.
//   cu_*          per GPU and CU, the in-flight memory transactions and the
//                 workgroup-scheduler pause.
//   cpu_flush_*   host flush before a batch of host-to-GPU migrations.
//   pmc_h_*, pmc_g_* page copies host-to-GPU and GPU-to-GPU; one outstanding
//                 each, held until done.
//   tlb_shoot_*, l2_flush_*, shoot_* per GPU, the selective invalidation of the
//                 migrating pages (page-aligned addresses, mask, size shift).
//   status        occupancy, period and event pulses for observation.
// After reset, requests must wait for init_busy to fall (page-state table
// initialisation, NUM_PAGES cycles).
//
// The top answers translations from its own page-table port, so dftm_unit's
// DCA outputs and its page-table address output are left unconnected (the
// unused-signal warnings on them stand for that reason).
//
// The mechanisms and their connection follow the scheme's overview; the port
// protocols and the structure sizes not given by the scheme are this design's
// choices (see the blocks).
module griffin_top
  import griffin_pkg::*;
#(
  parameter int unsigned NUM_PAGES   = 16384,
  parameter int unsigned MON_SIZE    = MON_ENTRIES,
  parameter int unsigned DPC_ENTRIES = 256,
  parameter int unsigned PERIOD      = T_AC,
  parameter int unsigned NPTW        = N_PTW,
  parameter int unsigned BATCH_WAIT  = T_AC,
  parameter int unsigned INFLIGHT    = 16,
  parameter int unsigned DRAIN_PAGES = 16,
  parameter int unsigned MAX_GPUS    = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic                        init_busy,
  // translation requests reaching the IOMMU
  input  logic                        xlat_valid,
  output logic                        xlat_ready,
  input  gpu_id_t                     xlat_gpu,
  input  page_id_t                    xlat_page,
  output xlat_kind_e                  xlat_kind,
  output page_loc_t                   xlat_loc,
  input  logic [NPTW-1:0]             ptw_walk_done,
  // Shader Engine transaction streams
  input  logic                        se_acc_valid [N_GPU][N_SE],
  input  page_id_t                    se_acc_page  [N_GPU][N_SE],
  // CU in-flight transactions
  input  logic                        cu_issue_valid    [N_GPU][N_CU],
  output logic                        cu_issue_ready    [N_GPU][N_CU],
  input  logic [ADDR_W-1:0]           cu_issue_addr     [N_GPU][N_CU],
  output logic [$clog2(INFLIGHT)-1:0] cu_issue_tag      [N_GPU][N_CU],
  input  logic                        cu_complete_valid [N_GPU][N_CU],
  input  logic [$clog2(INFLIGHT)-1:0] cu_complete_tag   [N_GPU][N_CU],
  output logic                        cu_wg_pause       [N_GPU][N_CU],
  // host flush
  output logic                        cpu_flush_req,
  input  logic                        cpu_flush_done,
  // page migration controller
  output logic                        pmc_h_req_valid,
  output migration_t                  pmc_h_req,
  input  logic                        pmc_h_done,
  output logic                        pmc_g_req_valid,
  output migration_t                  pmc_g_req,
  input  logic                        pmc_g_done,
  // per-GPU selective shootdown
  output logic                        tlb_shoot_req [N_GPU],
  input  logic                        tlb_shoot_done [N_GPU],
  output logic                        l2_flush_req  [N_GPU],
  input  logic                        l2_flush_done [N_GPU],
  output logic [ADDR_W-1:0]           shoot_addr [N_GPU][DRAIN_PAGES],
  output logic [DRAIN_PAGES-1:0]      shoot_mask [N_GPU],
  output logic [5:0]                  shoot_shift [N_GPU],
  // status
  output logic [$clog2(NUM_PAGES+1)-1:0] occupancy [N_GPU],
  output logic                        period_tick,
  output logic                        batch_closed,
  output logic                        cls_valid,
  output page_class_e                 cls_class,
  output logic [N_GPU-1:0]            acud_continue,
  output logic                        cand_dropped
);
  localparam int unsigned NMON = N_GPU * N_SE;

  // ---------------- page state and DFTM ----------------
  page_loc_t  ra_loc, rb_loc;
  logic       ra_touched;
  page_id_t   rb_page, dftm_pst_page;
  logic       touch_en;
  page_id_t   touch_page;
  logic       mv_a_en, mv_b_en;
  migration_t mv_a, mv_b;

  page_state_table #(.NUM_PAGES(NUM_PAGES)) u_pst (
    .clk, .rst_n, .init_busy,
    .ra_page(xlat_page), .ra_loc, .ra_touched,
    .rb_page, .rb_loc,
    .touch_en, .touch_page,
    .mv_a_en, .mv_a_page(mv_a.page), .mv_a_loc('{on_cpu: 1'b0, gpu: mv_a.dst}),
    .mv_b_en, .mv_b_page(mv_b.page), .mv_b_loc('{on_cpu: 1'b0, gpu: mv_b.dst})
  );

  logic       fault_valid, fault_ready, dca_valid, dftm_mig_valid, dftm_mig_ready;
  gpu_id_t    dca_gpu;
  page_id_t   dca_page;
  migration_t dftm_mig;

  assign fault_valid = xlat_valid && !init_busy && ra_loc.on_cpu;

  dftm_unit #(.NUM_PAGES(NUM_PAGES)) u_dftm (
    .clk, .rst_n,
    .fault_valid, .fault_ready, .fault_gpu(xlat_gpu), .fault_page(xlat_page),
    .pst_page(dftm_pst_page), .pst_touched(ra_touched),
    .touch_en, .touch_page,
    .dca_valid, .dca_gpu, .dca_page,
    .mig_valid(dftm_mig_valid), .mig_ready(dftm_mig_ready), .mig(dftm_mig),
    .mv_a_en, .mv_a_src(mv_a.src), .mv_a_dst(mv_a.dst),
    .mv_b_en, .mv_b_src(mv_b.src), .mv_b_dst(mv_b.dst),
    .occupancy
  );

  // IOMMU answer: pages on a GPU are answered at once (local or remote);
  // pages in host memory go through DFTM.
  always_comb begin
    xlat_ready = !init_busy && (!ra_loc.on_cpu || fault_ready);
    xlat_loc   = ra_loc;
    if (!ra_loc.on_cpu)
      xlat_kind = (ra_loc.gpu == xlat_gpu) ? XL_LOCAL : XL_REMOTE_GPU;
    else if (dca_valid)
      xlat_kind = XL_HOST_DCA;
    else
      xlat_kind = XL_MIGRATE;
  end

  // ---------------- CPMS: host-to-GPU batching ----------------
  cpms_cpu_batcher #(.NPTW(NPTW), .DEPTH(NPTW), .MAX_WAIT(BATCH_WAIT)) u_cpu_batch (
    .clk, .rst_n,
    .walk_done(ptw_walk_done),
    .mig_valid(dftm_mig_valid), .mig_ready(dftm_mig_ready), .mig(dftm_mig),
    .cpu_flush_req, .cpu_flush_done,
    .pmc_req_valid(pmc_h_req_valid), .pmc_req(pmc_h_req), .pmc_done(pmc_h_done),
    .mv_valid(mv_a_en), .mv(mv_a),
    .batch_closed
  );

  // ---------------- DPC: monitors, collection, classification ----------------
  logic                 mon_rd_start [NMON];
  logic                 mon_rd_valid [NMON];
  logic                 mon_rd_ready [NMON];
  page_id_t             mon_rd_page  [NMON];
  logic [ACC_CNT_W-1:0] mon_rd_count [NMON];
  logic                 mon_rd_done  [NMON];

  for (genvar g = 0; g < N_GPU; g++) begin : g_gpu_mon
    for (genvar s = 0; s < N_SE; s++) begin : g_se
      localparam int unsigned M = g * N_SE + s;
      acc_count_monitor #(.ENTRIES(MON_SIZE)) u_mon (
        .clk, .rst_n,
        .acc_valid(se_acc_valid[g][s]), .acc_page(se_acc_page[g][s]),
        .acc_dropped(),
        .rd_start(mon_rd_start[M]), .rd_busy(),
        .rd_valid(mon_rd_valid[M]), .rd_ready(mon_rd_ready[M]),
        .rd_page(mon_rd_page[M]), .rd_count(mon_rd_count[M]),
        .rd_done(mon_rd_done[M])
      );
    end
  end

  logic        rec_valid, rec_ready, collect_done;
  acc_record_t rec;

  acc_count_collector #(.PERIOD(PERIOD)) u_collect (
    .clk, .rst_n, .period_tick, .period_missed(),
    .mon_rd_start, .mon_rd_valid, .mon_rd_ready, .mon_rd_page, .mon_rd_count, .mon_rd_done,
    .rec_valid, .rec_ready, .rec, .collect_done
  );

  logic       cand_valid, cand_ready, sweep_done;
  migration_t cand;

  dpc_unit #(.ENTRIES(DPC_ENTRIES), .PERIOD(PERIOD)) u_dpc (
    .clk, .rst_n,
    .rec_valid, .rec_ready, .rec, .rec_dropped(),
    .collect_done,
    .loc_page(rb_page), .loc(rb_loc),
    .cand_valid, .cand_ready, .cand,
    .cls_valid, .cls_class, .sweep_done
  );

  // ---------------- CPMS: GPU-to-GPU scheduling ----------------
  logic [N_GPU-1:0]       drain_valid, drain_ready;
  logic [ADDR_W-1:0]      drain_addr [DRAIN_PAGES];
  logic [DRAIN_PAGES-1:0] drain_mask;
  logic [5:0]             drain_shift;

  cpms_gpu_scheduler #(.MAX_PAGES(DRAIN_PAGES), .MAX_GPUS(MAX_GPUS)) u_gpu_sched (
    .clk, .rst_n,
    .cand_valid, .cand_ready, .cand, .phase_end(sweep_done), .cand_dropped,
    .drain_valid, .drain_ready, .drain_addr, .drain_mask, .drain_shift,
    .cont(acud_continue),
    .pmc_req_valid(pmc_g_req_valid), .pmc_req(pmc_g_req), .pmc_done(pmc_g_done),
    .mv_valid(mv_b_en), .mv(mv_b), .busy()
  );

  // ---------------- ACUD: one controller per GPU, one drain unit per CU ----------------
  for (genvar g = 0; g < N_GPU; g++) begin : g_gpu_acud
    logic              cu_drain, cu_resume;
    logic [ADDR_W-1:0] cu_addr [DRAIN_PAGES];
    logic [N_CU-1:0]   cu_done;

    acud_controller #(.NCU(N_CU), .DRAIN_PAGES(DRAIN_PAGES)) u_ctrl (
      .clk, .rst_n,
      .req_valid(drain_valid[g]), .req_ready(drain_ready[g]),
      .req_addr(drain_addr), .req_mask(drain_mask), .req_shift(drain_shift),
      .cont(acud_continue[g]),
      .cu_drain, .cu_addr, .cu_mask(shoot_mask[g]), .cu_shift(shoot_shift[g]),
      .cu_done, .cu_resume,
      .tlb_shoot_req(tlb_shoot_req[g]), .tlb_shoot_done(tlb_shoot_done[g]),
      .l2_flush_req(l2_flush_req[g]), .l2_flush_done(l2_flush_done[g])
    );
    assign shoot_addr[g] = cu_addr;

    for (genvar c = 0; c < N_CU; c++) begin : g_cu
      acud_cu_drain #(.INFLIGHT(INFLIGHT), .DRAIN_PAGES(DRAIN_PAGES)) u_cu (
        .clk, .rst_n,
        .issue_valid(cu_issue_valid[g][c]), .issue_ready(cu_issue_ready[g][c]),
        .issue_addr(cu_issue_addr[g][c]), .issue_tag(cu_issue_tag[g][c]),
        .complete_valid(cu_complete_valid[g][c]), .complete_tag(cu_complete_tag[g][c]),
        .drain(cu_drain), .drain_addr(cu_addr), .drain_mask(shoot_mask[g]),
        .drain_shift(shoot_shift[g]), .resume(cu_resume),
        .drain_done(cu_done[c]), .wg_pause(cu_wg_pause[g][c])
      );
    end
  end

endmodule
