// tb_acc_count_monitor: drives random page accesses into an 8-entry monitor,
// keeps its own count per page (saturating at 255, new pages only while the
// table has room), then reads the table out with a stalling consumer and
// compares every record, checks the read-out length and that the table is
// empty afterwards. Repeated over several periods.
module tb_acc_count_monitor;
  import griffin_pkg::*;
  localparam int unsigned ENT = 8;
  logic clk = 0, rst_n = 0;
  logic acc_valid = 0;
  page_id_t acc_page = '0;
  logic acc_dropped, rd_start = 0, rd_busy, rd_valid, rd_ready = 0, rd_done;
  page_id_t rd_page;
  logic [ACC_CNT_W-1:0] rd_count;
  int checks = 0, failures = 0;

  acc_count_monitor #(.ENTRIES(ENT)) dut (.*);
  always #5 clk = ~clk;

  int model [page_id_t];
  int drops_seen, drops_exp;

  always @(posedge clk) if (acc_dropped) drops_seen++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int period = 0; period < 4; period++) begin
      int cycles, nrec;
      @(negedge clk);
      model.delete(); drops_seen = 0; drops_exp = 0;
      // accesses: few hot pages (to saturate) and more distinct pages than entries
      for (int i = 0; i < 900; i++) begin
        page_id_t p;
        p = (i % 3 == 0) ? page_id_t'(36'h1_0000_0000) : page_id_t'(100 + $urandom_range(0, 9 + period));
        @(negedge clk); acc_valid = 1; acc_page = p;
        if (model.exists(p)) begin
          if (model[p] < 255) model[p]++;
        end else if (model.num() < ENT) model[p] = 1;
        else drops_exp++;
      end
      @(negedge clk); acc_valid = 0;
      @(negedge clk);
      chk(drops_seen == drops_exp, $sformatf("drops %0d expected %0d", drops_seen, drops_exp));
      // read-out with a consumer that stalls every other cycle
      rd_start = 1; @(negedge clk); rd_start = 0;
      cycles = 0; nrec = 0;
      while (!rd_done) begin
        rd_ready = cycles[0];
        #1;
        if (rd_valid && rd_ready) begin
          nrec++;
          chk(model.exists(rd_page), $sformatf("unknown page %h", rd_page));
          if (model.exists(rd_page)) begin
            chk(model[rd_page] == int'(rd_count),
                $sformatf("page %h count %0d expected %0d", rd_page, rd_count, model[rd_page]));
            model.delete(rd_page);
          end
        end
        @(negedge clk); cycles++;
        if (cycles > 1000) break;
      end
      rd_ready = 0;
      chk(model.num() == 0 && nrec > 0, "all records read");
      // one cycle per record plus one stall each (consumer ready every other cycle)
      chk(cycles <= 2 * nrec + 2, $sformatf("read-out took %0d cycles for %0d records", cycles, nrec));
      // an access during the read-out is dropped: start one and poke it
      rd_start = 1; @(negedge clk); rd_start = 0; acc_valid = 1; acc_page = 5;
      @(negedge clk); acc_valid = 0;
      chk(acc_dropped, "access during read-out dropped");
      rd_ready = 1;
      while (!rd_done) begin
        chk(!rd_valid, "table empty after read-out");
        @(negedge clk);
      end
      rd_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
