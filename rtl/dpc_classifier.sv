// dpc_classifier: page classification and migration decision of Dynamic Page
// Classification (DPC).
//
// Inputs are one page's filtered access counts per GPU for the period just
// closed (c_new) and for the period before (c_old), and where the page lives.
// The block sorts out the GPU with the highest count (max) and the value of the
// second highest (second), then classifies the page, in this order of priority:
//   Streaming        max < lambda_t * T_ac  (fewer than lambda_t accesses per
//                    cycle from every GPU): never migrated.
//   Mostly Dedicated max >= lambda_d * second: migrated to the max GPU unless
//                    it already lives there.
//   Shared           max < lambda_s * second: migrated to the max GPU only when
//                    the holder's own count is very low, taken here as
//                    holder * lambda_d < max.
//   Owner-Shifting   the holder's count fell since the last period while
//                    another GPU's rose: migrated to the rising GPU with the
//                    highest count.
//   Out-of-interest  anything else: not migrated.
// Pages that still live in host memory are classified but never yield an
// inter-GPU migration (the first migration out of the host is DFTM's job).
//
// The block is purely combinational. Ties for the highest count go to the
// lowest GPU number. Ratios are tested as products with the lambdas scaled by
// 1000, so no divider is needed.
//
// The five classes, their thresholds and the migration rules for dedicated and
// owner-shifting pages follow the scheme. The priority order (streaming tested
// first), the meaning of "very low" for shared pages and the tie rule are this
// design's choices.
module dpc_classifier
  import griffin_pkg::*;
#(
  parameter int unsigned LAMBDA_D = LAMBDA_D_X1000,
  parameter int unsigned LAMBDA_S = LAMBDA_S_X1000,
  parameter int unsigned LAMBDA_T = LAMBDA_T_X1000,
  parameter int unsigned PERIOD   = T_AC
) (
  input  filt_cnt_t   c_new [N_GPU],
  input  filt_cnt_t   c_old [N_GPU],
  input  page_loc_t   loc,
  output page_class_e page_class,
  output logic        migrate,
  output gpu_id_t     dst
);
  localparam int unsigned MW = 64;
  // lambda_t * T_ac accesses per period, in filtered fixed point, times 1000
  localparam logic [MW-1:0] STREAM_LIMIT =
      MW'(LAMBDA_T) * MW'(PERIOD) * (MW'(1) << FILT_FRAC);

  gpu_id_t       max_gpu, rise_gpu;
  filt_cnt_t     max_cnt, second_cnt, holder_cnt, rise_cnt;
  logic          rise_found, holder_falling;
  logic [MW-1:0] max_x1000;

  always_comb begin
    max_gpu = '0; max_cnt = c_new[0];
    for (int g = 1; g < N_GPU; g++)
      if (c_new[g] > max_cnt) begin
        max_cnt = c_new[g]; max_gpu = gpu_id_t'(g);
      end
    second_cnt = '0;
    for (int g = 0; g < N_GPU; g++)
      if (gpu_id_t'(g) != max_gpu && c_new[g] > second_cnt) second_cnt = c_new[g];

    holder_cnt     = c_new[loc.gpu];
    holder_falling = c_new[loc.gpu] < c_old[loc.gpu];
    rise_found = 1'b0; rise_gpu = '0; rise_cnt = '0;
    for (int g = 0; g < N_GPU; g++)
      if (gpu_id_t'(g) != loc.gpu && c_new[g] > c_old[g] &&
          (!rise_found || c_new[g] > rise_cnt)) begin
        rise_found = 1'b1; rise_gpu = gpu_id_t'(g); rise_cnt = c_new[g];
      end

    max_x1000 = MW'(max_cnt) * MW'(1000);
    migrate   = 1'b0;
    dst       = max_gpu;
    if (max_x1000 < STREAM_LIMIT) begin
      page_class = PC_STREAMING;
    end else if (max_x1000 >= MW'(second_cnt) * MW'(LAMBDA_D)) begin
      page_class = PC_MOSTLY_DEDICATED;
      migrate    = (loc.gpu != max_gpu);
    end else if (max_x1000 < MW'(second_cnt) * MW'(LAMBDA_S)) begin
      page_class = PC_SHARED;
      migrate    = (MW'(holder_cnt) * MW'(LAMBDA_D) < max_x1000);
    end else if (holder_falling && rise_found) begin
      page_class = PC_OWNER_SHIFTING;
      migrate    = 1'b1;
      dst        = rise_gpu;
    end else begin
      page_class = PC_OUT_OF_INTEREST;
    end
    if (loc.on_cpu) migrate = 1'b0;
  end

endmodule
