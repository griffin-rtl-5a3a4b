// griffin_pkg: types and constants shared by the Griffin page-migration blocks.
//
// The system sizes (4 GPUs, 4 Shader Engines of 9 CUs per GPU, 36-bit page IDs,
// 8-bit saturating access counts, 100-entry monitor tables, 8 page-table walkers)
// and the hyperparameters (N_PTW = 8, T_ac = 1000 cycles, alpha = 0.03,
// lambda_d = 2.0, lambda_s = 1.3, lambda_t = 0.03 accesses/cycle) are the
// evaluated configuration. The fixed-point encodings (alpha in Q0.16, the
// lambdas scaled by 1000, filtered counts with 16 fraction bits) are this
// design's choice, made so that every ratio test is a pair of constant
// multiplications instead of a division.
package griffin_pkg;

  // ---- system configuration ----
  localparam int unsigned N_GPU      = 4;
  localparam int unsigned GPU_W      = $clog2(N_GPU);
  localparam int unsigned N_SE       = 4;    // Shader Engines per GPU
  localparam int unsigned CU_PER_SE  = 9;
  localparam int unsigned N_CU       = N_SE * CU_PER_SE;   // 36 CUs per GPU
  localparam int unsigned PAGE_ID_W  = 36;   // 48-bit address minus 12-bit offset
  localparam int unsigned ADDR_W     = 64;   // ACUD comparator width
  localparam int unsigned ACC_CNT_W  = 8;    // saturating counter, sticks at 0xff
  localparam int unsigned MON_ENTRIES = 100; // entries per SE monitor table

  // ---- hyperparameters (Table I) ----
  localparam int unsigned N_PTW          = 8;
  localparam int unsigned T_AC           = 1000;
  localparam int unsigned ALPHA_Q16      = 1966;  // round(0.03 * 65536)
  localparam int unsigned LAMBDA_D_X1000 = 2000;  // 2.0
  localparam int unsigned LAMBDA_S_X1000 = 1300;  // 1.3
  localparam int unsigned LAMBDA_T_X1000 = 30;    // 0.03 accesses per cycle

  // Per-GPU raw count of one period: sum of N_SE saturating 8-bit counts.
  localparam int unsigned RAW_CNT_W  = ACC_CNT_W + $clog2(N_SE);   // 10
  // Filtered count: RAW_CNT_W integer bits and FILT_FRAC fraction bits.
  localparam int unsigned FILT_FRAC  = 16;
  localparam int unsigned FILT_W     = RAW_CNT_W + FILT_FRAC;      // 26

  typedef logic [PAGE_ID_W-1:0] page_id_t;
  typedef logic [GPU_W-1:0]     gpu_id_t;
  typedef logic [RAW_CNT_W-1:0] raw_cnt_t;
  typedef logic [FILT_W-1:0]    filt_cnt_t;

  // Where a page lives: host memory or one GPU's memory.
  typedef struct packed {
    logic    on_cpu;
    gpu_id_t gpu;
  } page_loc_t;

  typedef enum logic [2:0] {
    PC_OUT_OF_INTEREST  = 3'd0,
    PC_MOSTLY_DEDICATED = 3'd1,
    PC_SHARED           = 3'd2,
    PC_STREAMING        = 3'd3,
    PC_OWNER_SHIFTING   = 3'd4
  } page_class_e;

  // One access-count record as the driver forwards it to the IOMMU.
  typedef struct packed {
    page_id_t                page;
    gpu_id_t                 gpu;
    logic [ACC_CNT_W-1:0]    count;
  } acc_record_t;

  // A page migration order.
  typedef struct packed {
    page_id_t  page;
    page_loc_t src;
    gpu_id_t   dst;
  } migration_t;

  // Answer to an address-translation request that missed the GPU's TLBs.
  typedef enum logic [1:0] {
    XL_LOCAL      = 2'd0,  // page is in the requesting GPU's memory
    XL_REMOTE_GPU = 2'd1,  // page is in another GPU: remote access (DCA)
    XL_HOST_DCA   = 2'd2,  // first touch delayed: remote access to host memory
    XL_MIGRATE    = 2'd3   // page fault: the page is queued for migration here
  } xlat_kind_e;

endpackage
