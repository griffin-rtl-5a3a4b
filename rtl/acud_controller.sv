// acud_controller: command-processor side of Asynchronous Compute Unit
// Draining (ACUD) for one GPU.
//
// When the migration scheduler picks pages to move out of this GPU it sends a
// drain request carrying the pages' addresses (req_addr, req_mask) and the page
// size as a shift (req_shift). The controller then
//   1. broadcasts the drain to every CU (cu_drain held high, with the page
//      list) and waits until each CU reports Drain Completion (cu_done all
//      high); CUs without transactions on those pages answer at once, others
//      after their last such transaction completes;
//   2. performs the shootdown: it asks the TLBs to invalidate only the entries
//      of the migrating pages and the L2 cache to flush only their blocks
//      (tlb_shoot_req and l2_flush_req, held until each done pulse; both run in
//      parallel, and other memory traffic continues meanwhile);
//   3. sends Continue: one cycle of cu_resume and cont, and drops cu_drain.
//      The CUs resume issuing while the scheduler starts the page data
//      transfers, so computation overlaps the copy.
// req_ready is high only while idle.
//
// The sequence (drain, completion from every CU, TLB shootdown and L2 flush,
// Continue before the page data) follows the ACUD timeline. Running the TLB
// and L2 requests in parallel and the request/done handshakes are this
// design's choices.
module acud_controller
  import griffin_pkg::*;
#(
  parameter int unsigned NCU         = N_CU,
  parameter int unsigned DRAIN_PAGES = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // drain request from the migration scheduler
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic [ADDR_W-1:0]      req_addr [DRAIN_PAGES],
  input  logic [DRAIN_PAGES-1:0] req_mask,
  input  logic [5:0]             req_shift,
  output logic                   cont,
  // CUs
  output logic                   cu_drain,
  output logic [ADDR_W-1:0]      cu_addr [DRAIN_PAGES],
  output logic [DRAIN_PAGES-1:0] cu_mask,
  output logic [5:0]             cu_shift,
  input  logic [NCU-1:0]         cu_done,
  output logic                   cu_resume,
  // selective TLB shootdown and L2 flush of the listed pages
  output logic                   tlb_shoot_req,
  input  logic                   tlb_shoot_done,
  output logic                   l2_flush_req,
  input  logic                   l2_flush_done
);
  typedef enum logic [1:0] {A_IDLE, A_DRAIN, A_FLUSH} astate_e;
  astate_e state;
  logic    tlb_ok, l2_ok;

  assign req_ready     = (state == A_IDLE);
  assign cu_drain      = (state == A_DRAIN) || (state == A_FLUSH);
  assign tlb_shoot_req = (state == A_FLUSH) && !tlb_ok;
  assign l2_flush_req  = (state == A_FLUSH) && !l2_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= A_IDLE;
      tlb_ok    <= 1'b0;
      l2_ok     <= 1'b0;
      cont      <= 1'b0;
      cu_resume <= 1'b0;
      cu_mask   <= '0;
      cu_shift  <= '0;
      for (int j = 0; j < DRAIN_PAGES; j++) cu_addr[j] <= '0;
    end else begin
      cont      <= 1'b0;
      cu_resume <= 1'b0;
      unique case (state)
        A_IDLE: if (req_valid) begin
          cu_addr  <= req_addr;
          cu_mask  <= req_mask;
          cu_shift <= req_shift;
          tlb_ok   <= 1'b0;
          l2_ok    <= 1'b0;
          state    <= A_DRAIN;
        end
        A_DRAIN: if (&cu_done) state <= A_FLUSH;
        A_FLUSH: begin
          logic t, l;
          t = tlb_ok || tlb_shoot_done;
          l = l2_ok || l2_flush_done;
          tlb_ok <= t;
          l2_ok  <= l;
          if (t && l) begin
            state     <= A_IDLE;
            cont      <= 1'b1;
            cu_resume <= 1'b1;
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

endmodule
