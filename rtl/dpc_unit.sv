// dpc_unit: Dynamic Page Classification table in the IOMMU.
//
// The unit tracks up to ENTRIES pages. For each it holds, per GPU, the raw
// access count gathered in the current period and the filtered (moving-average)
// count up to the previous period.
//
// Collection: during the read-out at the end of a period the driver forwards
// (page, GPU, 8-bit count) records (rec_valid/rec_ready, one per cycle). A
// record adds its count into the page's raw count for that GPU (the sum of the
// GPU's Shader Engines, saturating); a page not yet tracked gets a free entry,
// and with no free entry the record is dropped (rec_dropped pulses).
//
// Sweep: collect_done starts a pass over the table, one entry per cycle. For a
// tracked page it runs the filter for every GPU, reads the page's current home
// (loc_page -> loc, combinational), classifies it and, when migration is
// worthwhile, offers the candidate (cand_valid/cand_ready; the sweep waits for
// the scheduler). The new filtered counts replace the old, the raw counts are
// cleared, and an entry whose filtered counts have all decayed to zero is
// freed. cls_valid/cls_class report each classification. sweep_done pulses at
// the end; it is the scheduler's phase_end. Records are refused during a
// sweep. A full sweep takes ENTRIES cycles plus scheduler stalls.
//
// Filtering and classification in the IOMMU follow the scheme. The table size,
// entry allocation and freeing, and summing the SE records per GPU are this
// design's choices.
module dpc_unit
  import griffin_pkg::*;
#(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned PERIOD  = T_AC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rec_valid,
  output logic        rec_ready,
  input  acc_record_t rec,
  output logic        rec_dropped,
  input  logic        collect_done,
  output page_id_t    loc_page,
  input  page_loc_t   loc,
  output logic        cand_valid,
  input  logic        cand_ready,
  output migration_t  cand,
  output logic        cls_valid,
  output page_class_e cls_class,
  output logic        sweep_done
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic      vld  [ENTRIES];
  page_id_t  page [ENTRIES];
  raw_cnt_t  raw  [ENTRIES][N_GPU];
  filt_cnt_t filt [ENTRIES][N_GPU];

  logic             sweeping;
  logic [IDX_W-1:0] sw_idx;

  // record lookup
  logic             hit, free_found;
  logic [IDX_W-1:0] hit_idx, free_idx;
  always_comb begin
    hit = 1'b0; hit_idx = '0; free_found = 1'b0; free_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (vld[i] && page[i] == rec.page) begin hit = 1'b1; hit_idx = IDX_W'(i); end
      if (!vld[i]) begin free_found = 1'b1; free_idx = IDX_W'(i); end
    end
  end
  assign rec_ready = !sweeping;

  // filter and classify the entry under the sweep pointer
  filt_cnt_t   c_new [N_GPU];
  filt_cnt_t   c_old [N_GPU];
  page_class_e pclass;
  logic        mig;
  gpu_id_t     mig_dst;

  for (genvar g = 0; g < N_GPU; g++) begin : g_filt
    assign c_old[g] = filt[sw_idx][g];
    dpc_filter u_filter (.c_old(filt[sw_idx][g]), .n_new(raw[sw_idx][g]), .c_new(c_new[g]));
  end

  dpc_classifier #(.PERIOD(PERIOD)) u_classifier (
    .c_new(c_new), .c_old(c_old), .loc(loc),
    .page_class(pclass), .migrate(mig), .dst(mig_dst)
  );

  logic cur_vld, advance, all_zero;
  always_comb begin
    all_zero = 1'b1;
    for (int g = 0; g < N_GPU; g++) if (c_new[g] != '0) all_zero = 1'b0;
  end
  assign cur_vld    = sweeping && vld[sw_idx];
  assign loc_page   = page[sw_idx];
  assign cand_valid = cur_vld && mig;
  assign cand       = '{page: page[sw_idx], src: loc, dst: mig_dst};
  assign advance    = sweeping && (!cand_valid || cand_ready);
  assign cls_valid  = cur_vld && advance;
  assign cls_class  = pclass;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        vld[i]  <= 1'b0;
        page[i] <= '0;
        for (int g = 0; g < N_GPU; g++) begin
          raw[i][g]  <= '0;
          filt[i][g] <= '0;
        end
      end
      sweeping    <= 1'b0;
      sw_idx      <= '0;
      sweep_done  <= 1'b0;
      rec_dropped <= 1'b0;
    end else begin
      sweep_done  <= 1'b0;
      rec_dropped <= 1'b0;
      if (sweeping) begin
        if (advance) begin
          if (vld[sw_idx]) begin
            for (int g = 0; g < N_GPU; g++) begin
              filt[sw_idx][g] <= c_new[g];
              raw[sw_idx][g]  <= '0;
            end
            if (all_zero) vld[sw_idx] <= 1'b0;
          end
          if (sw_idx == IDX_W'(ENTRIES - 1)) begin
            sweeping   <= 1'b0;
            sweep_done <= 1'b1;
          end else begin
            sw_idx <= sw_idx + 1'b1;
          end
        end
      end else begin
        if (collect_done) begin
          sweeping <= 1'b1;
          sw_idx   <= '0;
        end
        if (rec_valid) begin
          if (hit) begin
            logic [RAW_CNT_W:0] s;
            s = {1'b0, raw[hit_idx][rec.gpu]} + (RAW_CNT_W+1)'(rec.count);
            raw[hit_idx][rec.gpu] <= s[RAW_CNT_W] ? '1 : s[RAW_CNT_W-1:0];
          end else if (free_found) begin
            vld[free_idx]  <= 1'b1;
            page[free_idx] <= rec.page;
            for (int g = 0; g < N_GPU; g++) begin
              raw[free_idx][g]  <= (gpu_id_t'(g) == rec.gpu) ? raw_cnt_t'(rec.count) : '0;
              filt[free_idx][g] <= '0;
            end
          end else begin
            rec_dropped <= 1'b1;
          end
        end
      end
    end
  end

endmodule
