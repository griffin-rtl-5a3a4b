// cpms_gpu_scheduler: Cooperative Page Migration Scheduling for GPU-to-GPU
// migrations.
//
// On-demand migration between GPUs is off: execution is cut into periods and,
// between periods, GPUs reach remote pages only by remote access. At the end of
// a period the page classifier offers its migration candidates
// (cand_valid/cand_ready, each a page with its source and destination GPU) and
// then pulses phase_end. The scheduler keeps at most MAX_PAGES candidates from
// at most MAX_GPUS distinct source GPUs per period, dropping the rest
// (cand_dropped pulses), and then works through the source GPUs in the order
// they first appeared:
//   1. one ACUD drain request to the source GPU carrying all of its pages
//      (drain_valid[g] until drain_ready[g]; page addresses are page ID << 12
//      with drain_shift = 12 for 4 KB pages);
//   2. wait for that GPU's Continue (cont[g]);
//   3. transfer each of its pages through the page migration controller
//      (pmc_req_valid until pmc_done); mv_valid reports each completed move.
// So every source GPU is drained once per period however many pages leave it.
// Candidates are not accepted while a schedule is being carried out.
//
// Grouping by source GPU, one drain per source, limits on pages and GPUs per
// period and Continue before the page data follow the scheme. The limit values
// and the service order are this design's choices.
module cpms_gpu_scheduler
  import griffin_pkg::*;
#(
  parameter int unsigned MAX_PAGES  = 16,
  parameter int unsigned MAX_GPUS   = 2,
  parameter int unsigned PAGE_SHIFT = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cand_valid,
  output logic                  cand_ready,
  input  migration_t            cand,
  input  logic                  phase_end,
  output logic                  cand_dropped,
  // ACUD, one request line per GPU
  output logic [N_GPU-1:0]      drain_valid,
  input  logic [N_GPU-1:0]      drain_ready,
  output logic [ADDR_W-1:0]     drain_addr [MAX_PAGES],
  output logic [MAX_PAGES-1:0]  drain_mask,
  output logic [5:0]            drain_shift,
  input  logic [N_GPU-1:0]      cont,
  // page migration controller
  output logic                  pmc_req_valid,
  output migration_t            pmc_req,
  input  logic                  pmc_done,
  output logic                  mv_valid,
  output migration_t            mv,
  output logic                  busy
);
  localparam int unsigned IDX_W = $clog2(MAX_PAGES + 1);
  localparam int unsigned PI_W  = $clog2(MAX_PAGES);
  localparam int unsigned SI_W  = $clog2(MAX_GPUS + 1);

  typedef enum logic [2:0] {G_COLLECT, G_NEXT, G_DRAIN, G_WAIT, G_XFER} gstate_e;
  gstate_e state;

  migration_t       buf_q [MAX_PAGES];
  logic [IDX_W-1:0] n_q;
  gpu_id_t          srcs [MAX_GPUS];
  logic [SI_W-1:0]  n_srcs, src_idx;
  logic [PI_W-1:0]  x_idx;
  gpu_id_t          cur;

  // is the candidate's source already listed?
  logic known_src;
  always_comb begin
    known_src = 1'b0;
    for (int s = 0; s < MAX_GPUS; s++)
      if (SI_W'(s) < n_srcs && srcs[s] == cand.src.gpu) known_src = 1'b1;
  end

  logic take;
  assign cand_ready = (state == G_COLLECT);
  assign take = cand_valid && cand_ready && n_q < IDX_W'(MAX_PAGES) &&
                (known_src || n_srcs < SI_W'(MAX_GPUS));

  always_comb begin
    for (int j = 0; j < MAX_PAGES; j++) begin
      drain_addr[j] = ADDR_W'(buf_q[j].page) << PAGE_SHIFT;
      drain_mask[j] = (IDX_W'(j) < n_q) && (buf_q[j].src.gpu == cur);
    end
    drain_shift = 6'(PAGE_SHIFT);
    drain_valid = '0;
    if (state == G_DRAIN) drain_valid[cur] = 1'b1;
  end

  logic x_mine;
  assign x_mine        = buf_q[x_idx].src.gpu == cur;
  assign pmc_req_valid = (state == G_XFER) && x_mine;
  assign pmc_req       = buf_q[x_idx];
  assign busy          = (state != G_COLLECT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= G_COLLECT;
      n_q          <= '0;
      n_srcs       <= '0;
      src_idx      <= '0;
      x_idx        <= '0;
      cur          <= '0;
      mv_valid     <= 1'b0;
      mv           <= '0;
      cand_dropped <= 1'b0;
      for (int j = 0; j < MAX_PAGES; j++) buf_q[j] <= '0;
      for (int s = 0; s < MAX_GPUS; s++) srcs[s] <= '0;
    end else begin
      mv_valid     <= 1'b0;
      cand_dropped <= 1'b0;
      unique case (state)
        G_COLLECT: begin
          if (take) begin
            buf_q[n_q[PI_W-1:0]] <= cand;
            n_q <= n_q + 1'b1;
            if (!known_src) begin
              srcs[n_srcs[$clog2(MAX_GPUS)-1:0]] <= cand.src.gpu;
              n_srcs <= n_srcs + 1'b1;
            end
          end else if (cand_valid) begin
            cand_dropped <= 1'b1;
          end
          if (phase_end && (n_q != '0 || take)) begin
            state   <= G_NEXT;
            src_idx <= '0;
          end
        end
        G_NEXT: begin
          if (src_idx == n_srcs) begin
            state  <= G_COLLECT;
            n_q    <= '0;
            n_srcs <= '0;
          end else begin
            cur   <= srcs[src_idx[$clog2(MAX_GPUS)-1:0]];
            state <= G_DRAIN;
          end
        end
        G_DRAIN: if (drain_ready[cur]) state <= G_WAIT;
        G_WAIT: if (cont[cur]) begin
          state <= G_XFER;
          x_idx <= '0;
        end
        G_XFER: begin
          if (!x_mine || pmc_done) begin
            if (x_mine) begin
              mv_valid <= 1'b1;
              mv       <= buf_q[x_idx];
            end
            if (IDX_W'(x_idx) == n_q - 1'b1) begin
              state   <= G_NEXT;
              src_idx <= src_idx + 1'b1;
            end else begin
              x_idx <= x_idx + 1'b1;
            end
          end
        end
        default: state <= G_COLLECT;
      endcase
    end
  end

endmodule
