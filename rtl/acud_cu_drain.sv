// acud_cu_drain: the per-CU part of Asynchronous Compute Unit Draining (ACUD).
//
// A CU already keeps a buffer of its in-flight memory transactions; this block
// holds that buffer (INFLIGHT entries of a 64-bit address) and adds the drain
// logic. Transactions are entered on issue (issue_valid/issue_ready, the entry
// number is returned on issue_tag) and removed on completion (complete_valid,
// complete_tag).
//
// While drain is high the workgroup scheduler is paused (wg_pause) and no new
// transaction is accepted. The CU latches the list of migrating pages
// (drain_addr, drain_mask) and the page size as a shift (drain_shift, e.g. 12
// for 4 KB), and scans its buffer with a single 64-bit comparator: one cycle
// compares one valid in-flight address with one migrating page after shifting
// both right by drain_shift (invalid entries are stepped over in one cycle).
// A full pass that finds no match raises drain_done: the CU has no pending
// transaction on a migrating page, so it reports Drain Completion at once,
// without waiting for its other transactions, which keep completing. A pass
// that finds a match starts over, so the CU reports only after its last
// transaction on a migrating page has completed. drain_done stays high, and
// the pause with it, until resume (the Continue message) arrives.
//
// Timing: a pass takes at most INFLIGHT * (number of pages) cycles; with an
// empty buffer drain_done rises INFLIGHT cycles after drain.
//
// The pause, the scan with one comparator and shift logic, and the immediate
// completion follow the scheme. The buffer depth, the tag interface and the
// scan order (entries outer, pages inner) are this design's choices.
module acud_cu_drain
  import griffin_pkg::*;
#(
  parameter int unsigned INFLIGHT    = 16,
  parameter int unsigned DRAIN_PAGES = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // the CU's memory transactions
  input  logic                        issue_valid,
  output logic                        issue_ready,
  input  logic [ADDR_W-1:0]           issue_addr,
  output logic [$clog2(INFLIGHT)-1:0] issue_tag,
  input  logic                        complete_valid,
  input  logic [$clog2(INFLIGHT)-1:0] complete_tag,
  // drain request from the command processor
  input  logic                        drain,
  input  logic [ADDR_W-1:0]           drain_addr [DRAIN_PAGES],
  input  logic [DRAIN_PAGES-1:0]      drain_mask,
  input  logic [5:0]                  drain_shift,
  input  logic                        resume,
  output logic                        drain_done,
  output logic                        wg_pause
);
  localparam int unsigned TAG_W = $clog2(INFLIGHT);
  localparam int unsigned PG_W  = $clog2(DRAIN_PAGES);

  logic              ent_vld  [INFLIGHT];
  logic [ADDR_W-1:0] ent_addr [INFLIGHT];

  typedef enum logic [1:0] {D_IDLE, D_SCAN, D_DONE} dstate_e;
  dstate_e dstate;

  logic [ADDR_W-1:0]      pg_addr [DRAIN_PAGES];
  logic [DRAIN_PAGES-1:0] pg_mask;
  logic [5:0]             pg_shift;
  logic [TAG_W-1:0]       scan_e;
  logic [PG_W-1:0]        scan_p;
  logic                   pass_hit;

  // free-entry search
  logic             free_found;
  logic [TAG_W-1:0] free_idx;
  always_comb begin
    free_found = 1'b0; free_idx = '0;
    for (int i = INFLIGHT - 1; i >= 0; i--)
      if (!ent_vld[i]) begin free_found = 1'b1; free_idx = TAG_W'(i); end
  end

  assign wg_pause    = drain || (dstate != D_IDLE);
  assign issue_ready = free_found && !wg_pause;
  assign issue_tag   = free_idx;
  assign drain_done  = (dstate == D_DONE);

  // the one comparator: page numbers of entry scan_e and page scan_p
  logic cmp_hit, last_page, last_entry;
  always_comb begin
    cmp_hit    = ent_vld[scan_e] && pg_mask[scan_p] &&
                 ((ent_addr[scan_e] >> pg_shift) == (pg_addr[scan_p] >> pg_shift));
    last_page  = !ent_vld[scan_e] || scan_p == PG_W'(DRAIN_PAGES - 1) ||
                 !(|(pg_mask >> (scan_p + 1'b1)));
    last_entry = scan_e == TAG_W'(INFLIGHT - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < INFLIGHT; i++) begin
        ent_vld[i]  <= 1'b0;
        ent_addr[i] <= '0;
      end
      for (int j = 0; j < DRAIN_PAGES; j++) pg_addr[j] <= '0;
      dstate   <= D_IDLE;
      pg_mask  <= '0;
      pg_shift <= '0;
      scan_e   <= '0;
      scan_p   <= '0;
      pass_hit <= 1'b0;
    end else begin
      if (complete_valid) ent_vld[complete_tag] <= 1'b0;
      if (issue_valid && issue_ready) begin
        ent_vld[free_idx]  <= 1'b1;
        ent_addr[free_idx] <= issue_addr;
      end
      unique case (dstate)
        D_IDLE: if (drain) begin
          pg_addr  <= drain_addr;
          pg_mask  <= drain_mask;
          pg_shift <= drain_shift;
          scan_e   <= '0;
          scan_p   <= '0;
          pass_hit <= 1'b0;
          dstate   <= D_SCAN;
        end
        D_SCAN: begin
          if (last_page) begin
            scan_p <= '0;
            if (last_entry) begin
              scan_e   <= '0;
              pass_hit <= 1'b0;
              if (!(pass_hit || cmp_hit)) dstate <= D_DONE;
            end else begin
              scan_e   <= scan_e + 1'b1;
              pass_hit <= pass_hit || cmp_hit;
            end
          end else begin
            scan_p   <= scan_p + 1'b1;
            pass_hit <= pass_hit || cmp_hit;
          end
        end
        D_DONE: if (resume) dstate <= D_IDLE;
        default: dstate <= D_IDLE;
      endcase
    end
  end

  a_no_issue_when_paused: assert property (@(posedge clk) disable iff (!rst_n)
    wg_pause |-> !issue_ready);

endmodule
