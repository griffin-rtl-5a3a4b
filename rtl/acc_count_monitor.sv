// acc_count_monitor: page access counter of one Shader Engine (SE).
//
// Every post-coalescing memory transaction the SE issues carries the page ID it
// touches. The monitor keeps a small fully associative table (ENTRIES entries
// of a 36-bit page ID and an 8-bit count). A transaction that hits an entry
// increments its count, which saturates at 0xff; a miss allocates the lowest
// free entry with a count of 1. When the table is full a miss is not recorded
// and acc_dropped pulses.
//
// At the end of every collection period the driver reads the table out:
// rd_start begins a read-out that presents each valid entry, lowest first, on
// rd_valid/rd_page/rd_count (a valid/ready handshake), clears it once taken,
// and ends with a one-cycle rd_done when no valid entry is left. The table is therefore empty again after the read-out,
// which is the "reset to 0 after the count is transferred" of the scheme.
//
// Timing: one transaction per cycle is accepted while idle and counted in the
// next cycle. The read-out spends one cycle per valid entry, one for every
// handshake stall and one to finish, so a nearly empty table is read quickly
// and all sixteen monitors of a four-GPU system fit in one period. Transactions that arrive during the read-out are
// dropped (acc_dropped pulses).
//
// Table size, counter width and saturation follow the evaluated design. One
// transaction per cycle, lowest-free allocation, dropping on a full table and
// during read-out are this design's choices.
module acc_count_monitor
  import griffin_pkg::*;
#(
  parameter int unsigned ENTRIES = MON_ENTRIES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // transactions from the SE
  input  logic                 acc_valid,
  input  page_id_t             acc_page,
  output logic                 acc_dropped,
  // read-out towards the driver
  input  logic                 rd_start,
  output logic                 rd_busy,
  output logic                 rd_valid,
  input  logic                 rd_ready,
  output page_id_t             rd_page,
  output logic [ACC_CNT_W-1:0] rd_count,
  output logic                 rd_done
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic                 vld   [ENTRIES];
  page_id_t             page  [ENTRIES];
  logic [ACC_CNT_W-1:0] count [ENTRIES];

  logic             reading;
  logic [IDX_W-1:0] rd_idx;
  logic             any_vld;

  // associative lookup and free-slot search
  // associative lookup, free-slot search and lowest valid entry
  logic             hit, free_found;
  logic [IDX_W-1:0] hit_idx, free_idx;
  always_comb begin
    hit = 1'b0; hit_idx = '0;
    free_found = 1'b0; free_idx = '0;
    any_vld = 1'b0; rd_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (vld[i] && page[i] == acc_page) begin
        hit = 1'b1; hit_idx = IDX_W'(i);
      end
      if (!vld[i]) begin
        free_found = 1'b1; free_idx = IDX_W'(i);
      end else begin
        any_vld = 1'b1; rd_idx = IDX_W'(i);
      end
    end
  end

  assign rd_busy  = reading;
  assign rd_valid = reading && any_vld;
  assign rd_page  = page[rd_idx];
  assign rd_count = count[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        vld[i]   <= 1'b0;
        page[i]  <= '0;
        count[i] <= '0;
      end
      reading     <= 1'b0;
      rd_done     <= 1'b0;
      acc_dropped <= 1'b0;
    end else begin
      rd_done     <= 1'b0;
      acc_dropped <= 1'b0;
      if (reading) begin
        acc_dropped <= acc_valid;
        if (!any_vld) begin
          reading <= 1'b0;
          rd_done <= 1'b1;
        end else if (rd_ready) begin
          vld[rd_idx]   <= 1'b0;
          count[rd_idx] <= '0;
        end
      end else begin
        if (rd_start) reading <= 1'b1;
        if (acc_valid) begin
          if (hit) begin
            if (count[hit_idx] != '1) count[hit_idx] <= count[hit_idx] + 1'b1;
          end else if (free_found) begin
            vld[free_idx]   <= 1'b1;
            page[free_idx]  <= acc_page;
            count[free_idx] <= ACC_CNT_W'(1);
          end else begin
            acc_dropped <= 1'b1;
          end
        end
      end
    end
  end

  // a read-out must not be started while one is running
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) reading |-> !rd_start);

endmodule
