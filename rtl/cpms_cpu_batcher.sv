// cpms_cpu_batcher: Cooperative Page Migration Scheduling for host-to-GPU
// migrations.
//
// Instead of migrating a page out of host memory as soon as its fault is
// decided, the batcher opens a batch with the first migration request and keeps
// collecting requests while the IOMMU's page-table walkers go on working. Once
// NPTW walks have completed since the batch opened (walks that finish in the
// same cycle all count), the batch closes: the host is flushed once
// (cpu_flush_req until cpu_flush_done) and then every page of the batch is
// transferred in turn by the page migration controller (pmc_req_valid until
// pmc_done). After each transfer mv_valid reports the page's new home for one
// cycle. One flush thus serves the whole batch.
//
// A batch also closes when it holds DEPTH pages or when MAX_WAIT cycles pass
// without enough walks, so a quiet IOMMU cannot hold a page back for ever.
// A request for a page that is already in the open batch is absorbed (the
// first requester keeps it). Requests are refused (mig_ready low) while a
// batch is being flushed or transferred.
//
// Batching until N_PTW = 8 walks complete follows the scheme. The depth, the
// timeout, duplicate absorption and refusing requests during transfer are this
// design's choices.
module cpms_cpu_batcher
  import griffin_pkg::*;
#(
  parameter int unsigned NPTW     = N_PTW,
  parameter int unsigned DEPTH    = N_PTW,
  parameter int unsigned MAX_WAIT = T_AC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPTW-1:0]   walk_done,      // one bit per page-table walker
  input  logic              mig_valid,
  output logic              mig_ready,
  input  migration_t        mig,
  output logic              cpu_flush_req,
  input  logic              cpu_flush_done,
  output logic              pmc_req_valid,
  output migration_t        pmc_req,
  input  logic              pmc_done,
  output logic              mv_valid,
  output migration_t        mv,
  output logic              batch_closed    // pulses when a batch starts its flush
);
  localparam int unsigned IDX_W  = $clog2(DEPTH + 1);
  localparam int unsigned WALK_W = $clog2(NPTW + 1) + 1;
  localparam int unsigned WAIT_W = $clog2(MAX_WAIT + 1);

  typedef enum logic [1:0] {S_IDLE, S_COLLECT, S_FLUSH, S_XFER} state_e;
  state_e state;

  migration_t        buf_q [DEPTH];
  logic [IDX_W-1:0]  n_q, xfer_idx;
  logic [WALK_W-1:0] walks;
  logic [WAIT_W-1:0] waited;

  logic [WALK_W-1:0] walks_now, walks_next;
  logic              dup;
  always_comb begin
    walks_now = '0;
    for (int i = 0; i < NPTW; i++) walks_now += WALK_W'(walk_done[i]);
    walks_next = walks + walks_now;
    dup = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (IDX_W'(i) < n_q && buf_q[i].page == mig.page) dup = 1'b1;
  end

  assign mig_ready     = (state == S_IDLE) || (state == S_COLLECT && n_q < IDX_W'(DEPTH));
  assign cpu_flush_req = (state == S_FLUSH);
  assign pmc_req_valid = (state == S_XFER);
  assign pmc_req       = buf_q[xfer_idx[$clog2(DEPTH)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      n_q          <= '0;
      xfer_idx     <= '0;
      walks        <= '0;
      waited       <= '0;
      mv_valid     <= 1'b0;
      mv           <= '0;
      batch_closed <= 1'b0;
      for (int i = 0; i < DEPTH; i++) buf_q[i] <= '0;
    end else begin
      mv_valid     <= 1'b0;
      batch_closed <= 1'b0;
      unique case (state)
        S_IDLE: if (mig_valid) begin
          buf_q[0] <= mig;
          n_q      <= IDX_W'(1);
          walks    <= walks_now;
          waited   <= '0;
          state    <= S_COLLECT;
        end
        S_COLLECT: begin
          logic [IDX_W-1:0] n_new;
          n_new = n_q;
          if (mig_valid && mig_ready && !dup) begin
            buf_q[n_q[$clog2(DEPTH)-1:0]] <= mig;
            n_new = n_q + 1'b1;
          end
          n_q    <= n_new;
          walks  <= (walks_next > WALK_W'(NPTW)) ? WALK_W'(NPTW) : walks_next;
          waited <= waited + 1'b1;
          if (walks_next >= WALK_W'(NPTW) || n_new == IDX_W'(DEPTH) ||
              waited == WAIT_W'(MAX_WAIT - 1)) begin
            state        <= S_FLUSH;
            batch_closed <= 1'b1;
          end
        end
        S_FLUSH: if (cpu_flush_done) begin
          state    <= S_XFER;
          xfer_idx <= '0;
        end
        S_XFER: if (pmc_done) begin
          mv_valid <= 1'b1;
          mv       <= buf_q[xfer_idx[$clog2(DEPTH)-1:0]];
          if (xfer_idx == n_q - 1'b1) begin
            state <= S_IDLE;
            n_q   <= '0;
          end else begin
            xfer_idx <= xfer_idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_flush_before_xfer: assert property (@(posedge clk) disable iff (!rst_n)
    pmc_req_valid |-> !cpu_flush_req);

endmodule
