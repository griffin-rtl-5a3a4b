// acc_count_collector: period timer and access-count collection.
//
// Execution is divided into periods of PERIOD cycles (T_ac). At the end of each
// period (period_tick) the collector reads out every Shader Engine monitor in
// turn, GPU by GPU (monitor m belongs to GPU m / NSE), and forwards each
// (page, count) entry, tagged with its GPU, to the IOMMU's classification
// table (rec_valid/rec_ready). The monitors clear themselves as they are read.
// When the last monitor is done, collect_done pulses for one cycle and the
// classification sweep may start. A period that ends while the previous
// collection is still running is skipped and counted by period_missed.
//
// Timing: the timer runs freely from reset; a collection takes about ENTRIES
// cycles per monitor plus one cycle per monitor for the hand-over.
//
// Periodic collection by the driver and forwarding to the IOMMU follow the
// scheme. Reading the monitors one after another, one record per cycle, is
// this design's choice (the scheme packs up to 20 pages into a 110-byte
// message; the packing is left out because it does not change which counts
// arrive).
module acc_count_collector
  import griffin_pkg::*;
#(
  parameter int unsigned NGPU   = N_GPU,
  parameter int unsigned NSE    = N_SE,
  parameter int unsigned PERIOD = T_AC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 period_tick,
  output logic                 period_missed,
  // monitors, index = gpu * NSE + se
  output logic                 mon_rd_start [NGPU*NSE],
  input  logic                 mon_rd_valid [NGPU*NSE],
  output logic                 mon_rd_ready [NGPU*NSE],
  input  page_id_t             mon_rd_page  [NGPU*NSE],
  input  logic [ACC_CNT_W-1:0] mon_rd_count [NGPU*NSE],
  input  logic                 mon_rd_done  [NGPU*NSE],
  // records to the classification table
  output logic                 rec_valid,
  input  logic                 rec_ready,
  output acc_record_t          rec,
  output logic                 collect_done
);
  localparam int unsigned NMON  = NGPU * NSE;
  localparam int unsigned MON_W = $clog2(NMON);
  localparam int unsigned TMR_W = $clog2(PERIOD);

  logic [TMR_W-1:0] timer;
  logic             active, start_q;
  logic [MON_W-1:0] cur;

  always_comb begin
    for (int m = 0; m < NMON; m++) begin
      mon_rd_start[m] = start_q && (MON_W'(m) == cur);
      mon_rd_ready[m] = active && (MON_W'(m) == cur) && rec_ready;
    end
    rec_valid = active && mon_rd_valid[cur];
    rec.page  = mon_rd_page[cur];
    rec.gpu   = gpu_id_t'(cur / MON_W'(NSE));
    rec.count = mon_rd_count[cur];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer         <= '0;
      period_tick   <= 1'b0;
      period_missed <= 1'b0;
      active        <= 1'b0;
      start_q       <= 1'b0;
      cur           <= '0;
      collect_done  <= 1'b0;
    end else begin
      period_tick   <= 1'b0;
      period_missed <= 1'b0;
      start_q       <= 1'b0;
      collect_done  <= 1'b0;
      if (timer == TMR_W'(PERIOD - 1)) begin
        timer       <= '0;
        period_tick <= 1'b1;
        if (active) period_missed <= 1'b1;
        else begin
          active  <= 1'b1;
          cur     <= '0;
          start_q <= 1'b1;
        end
      end else begin
        timer <= timer + 1'b1;
      end
      if (active && mon_rd_done[cur]) begin
        if (cur == MON_W'(NMON - 1)) begin
          active       <= 1'b0;
          collect_done <= 1'b1;
        end else begin
          cur     <= cur + 1'b1;
          start_q <= 1'b1;
        end
      end
    end
  end

endmodule
