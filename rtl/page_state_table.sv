// page_state_table: per-page state the IOMMU keeps for Griffin.
//
// For every page of the unified address space it holds where the page lives
// (host memory or one GPU) and the DFTM "accessed once" bit. The bit is set by
// the first GPU touch that was answered with a remote (DCA) access and stays
// set while the page is resident; migrating the page does not clear it.
//
// The table is a plain memory indexed by the low IDX_W bits of the page ID. It
// has no reset: after rst_n is released it spends NUM_PAGES cycles writing
// "in host memory, not touched" into every entry and holds init_busy high
// meanwhile; no access may be made until init_busy falls.
//
// Two combinational read ports serve the DFTM decision (port a) and the DPC
// classifier (port b). Three write ports are applied at the clock edge: the
// DFTM touch bit, and page moves from the host-to-GPU batcher (mv_a) and the
// GPU-to-GPU scheduler (mv_b); mv_b wins if both move the same page.
//
// The extra page-table bit is the scheme's. The table size (16384 pages, 64 MB
// of 4 KB pages, the largest evaluated footprint), the index taken from the low
// page-ID bits and the initialisation sweep are this design's choices.
module page_state_table
  import griffin_pkg::*;
#(
  parameter int unsigned NUM_PAGES = 16384
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       init_busy,
  // read port a (DFTM)
  input  page_id_t   ra_page,
  output page_loc_t  ra_loc,
  output logic       ra_touched,
  // read port b (DPC)
  input  page_id_t   rb_page,
  output page_loc_t  rb_loc,
  // DFTM accessed-once bit
  input  logic       touch_en,
  input  page_id_t   touch_page,
  // page moves
  input  logic       mv_a_en,
  input  page_id_t   mv_a_page,
  input  page_loc_t  mv_a_loc,
  input  logic       mv_b_en,
  input  page_id_t   mv_b_page,
  input  page_loc_t  mv_b_loc
);
  localparam int unsigned IDX_W = $clog2(NUM_PAGES);
  typedef logic [IDX_W-1:0] idx_t;

  page_loc_t loc_mem     [NUM_PAGES];
  logic      touched_mem [NUM_PAGES];

  logic init_run;
  idx_t init_idx;

  function automatic idx_t idx_of(page_id_t p);
    return p[IDX_W-1:0];
  endfunction

  assign init_busy  = init_run;
  assign ra_loc     = loc_mem[idx_of(ra_page)];
  assign ra_touched = touched_mem[idx_of(ra_page)];
  assign rb_loc     = loc_mem[idx_of(rb_page)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_run <= 1'b1;
      init_idx <= '0;
    end else if (init_run) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == idx_t'(NUM_PAGES - 1)) init_run <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (init_run) begin
      loc_mem[init_idx]     <= '{on_cpu: 1'b1, gpu: '0};
      touched_mem[init_idx] <= 1'b0;
    end else begin
      if (touch_en) touched_mem[idx_of(touch_page)] <= 1'b1;
      if (mv_a_en && !(mv_b_en && idx_of(mv_b_page) == idx_of(mv_a_page)))
        loc_mem[idx_of(mv_a_page)] <= mv_a_loc;
      if (mv_b_en) loc_mem[idx_of(mv_b_page)] <= mv_b_loc;
    end
  end

endmodule
