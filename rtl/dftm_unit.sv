// dftm_unit: Delayed First-Touch Migration decision.
//
// A page fault reaches this block when a GPU's page walk finds the page still
// in host memory. The block keeps one occupancy counter per GPU (the number of
// pages resident in that GPU) and decides:
//   - if the page was touched before (accessed-once bit set), or the requesting
//     GPU is not the one with the highest occupancy, the page is migrated to
//     the requesting GPU: the request goes on to the migration batcher;
//   - otherwise (first touch by the most occupied GPU) the page stays in host
//     memory, the GPU is answered with the host physical address and reaches
//     the data by remote cache-line access (DCA), and the accessed-once bit is
//     set so that the next touch migrates it.
// Occupancy means share of all GPU-resident pages; comparing the raw counters
// gives the same order. Counters follow completed moves (mv_a/mv_b): the
// destination GPU gains a page and a source GPU loses one.
//
// Interface: fault_valid/fault_ready handshake. The decision is combinational
// from the page-state read (pst_page -> pst_touched): dca_valid pulses in the
// accepting cycle for a remote answer; a migration is offered on
// mig_valid/mig_ready and the fault is accepted when the batcher takes it.
//
// The decision rule follows the scheme. "Highest occupancy" is read as strictly
// higher than every other GPU, so an all-equal start migrates on first touch;
// that reading and the handshakes are this design's choices.
module dftm_unit
  import griffin_pkg::*;
#(
  parameter int unsigned NUM_PAGES = 16384
) (
  input  logic       clk,
  input  logic       rst_n,
  // faults on host-resident pages
  input  logic       fault_valid,
  output logic       fault_ready,
  input  gpu_id_t    fault_gpu,
  input  page_id_t   fault_page,
  // page-state lookup
  output page_id_t   pst_page,
  input  logic       pst_touched,
  output logic       touch_en,
  output page_id_t   touch_page,
  // answer: remote access through the host address
  output logic       dca_valid,
  output gpu_id_t    dca_gpu,
  output page_id_t   dca_page,
  // answer: migrate to the requesting GPU
  output logic       mig_valid,
  input  logic       mig_ready,
  output migration_t mig,
  // completed page moves
  input  logic       mv_a_en,
  input  page_loc_t  mv_a_src,
  input  gpu_id_t    mv_a_dst,
  input  logic       mv_b_en,
  input  page_loc_t  mv_b_src,
  input  gpu_id_t    mv_b_dst,
  output logic [$clog2(NUM_PAGES+1)-1:0] occupancy [N_GPU]
);
  localparam int unsigned OCC_W = $clog2(NUM_PAGES + 1);
  typedef logic [OCC_W-1:0] occ_t;

  occ_t occ [N_GPU];
  logic req_is_highest, do_migrate;

  always_comb begin
    req_is_highest = 1'b1;
    for (int g = 0; g < N_GPU; g++)
      if (gpu_id_t'(g) != fault_gpu && occ[g] >= occ[fault_gpu]) req_is_highest = 1'b0;
    do_migrate = pst_touched || !req_is_highest;
  end

  assign pst_page    = fault_page;
  assign fault_ready = !do_migrate || mig_ready;
  assign mig_valid   = fault_valid && do_migrate;
  assign mig         = '{page: fault_page, src: '{on_cpu: 1'b1, gpu: '0}, dst: fault_gpu};
  assign dca_valid   = fault_valid && !do_migrate;
  assign dca_gpu     = fault_gpu;
  assign dca_page    = fault_page;
  assign touch_en    = fault_valid && !do_migrate;
  assign touch_page  = fault_page;

  for (genvar g = 0; g < N_GPU; g++) begin : g_occ
    assign occupancy[g] = occ[g];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) occ[g] <= '0;
      else begin
        occ[g] <= occ[g]
                  + occ_t'(mv_a_en && mv_a_dst == gpu_id_t'(g))
                  + occ_t'(mv_b_en && mv_b_dst == gpu_id_t'(g))
                  - occ_t'(mv_a_en && !mv_a_src.on_cpu && mv_a_src.gpu == gpu_id_t'(g))
                  - occ_t'(mv_b_en && !mv_b_src.on_cpu && mv_b_src.gpu == gpu_id_t'(g));
      end
    end
  end

endmodule
