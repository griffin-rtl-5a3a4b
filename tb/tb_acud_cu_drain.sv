// tb_acud_cu_drain: one CU with a 4-entry in-flight buffer.
//   - no pending transaction on the migrating page: Drain Completion within
//     one scan pass (INFLIGHT * pages cycles), with other transactions pending;
//   - pending transactions on two migrating pages: no completion until both
//     have completed, completion within one pass after the last;
//   - page size: a transaction in the same 2 MB page but another 4 KB page
//     blocks the drain only when the request gives the 2 MB shift;
//   - the workgroup scheduler stays paused and no transaction is accepted from
//     the drain request until Continue.
module tb_acud_cu_drain;
  import griffin_pkg::*;
  localparam int unsigned INF = 4, DP = 4;
  logic clk = 0, rst_n = 0;
  logic issue_valid = 0, issue_ready;
  logic [ADDR_W-1:0] issue_addr = '0;
  logic [1:0] issue_tag, complete_tag = '0;
  logic complete_valid = 0, drain = 0, resume = 0, drain_done, wg_pause;
  logic [ADDR_W-1:0] drain_addr [DP];
  logic [DP-1:0] drain_mask = '0;
  logic [5:0] drain_shift = 6'd12;
  int checks = 0, failures = 0;

  acud_cu_drain #(.INFLIGHT(INF), .DRAIN_PAGES(DP)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic issue(input logic [ADDR_W-1:0] a, output logic [1:0] tag);
    @(negedge clk); issue_valid = 1; issue_addr = a; #1;
    chk(issue_ready, "issue accepted when idle");
    tag = issue_tag;
    @(negedge clk); issue_valid = 0;
  endtask

  task automatic complete(input logic [1:0] tag);
    @(negedge clk); complete_valid = 1; complete_tag = tag;
    @(negedge clk); complete_valid = 0;
  endtask

  task automatic start_drain(input logic [ADDR_W-1:0] p0, p1, input logic [DP-1:0] m, input int sh);
    @(negedge clk);
    drain_addr[0] = p0; drain_addr[1] = p1; drain_addr[2] = '0; drain_addr[3] = '0;
    drain_mask = m; drain_shift = 6'(sh); drain = 1;
  endtask

  task automatic finish_drain();
    @(negedge clk); drain = 0; resume = 1;
    @(negedge clk); resume = 0;
    @(negedge clk);
    chk(!wg_pause && !drain_done, "running again after Continue");
  endtask

  // wait up to n cycles for drain_done, return cycles waited (-1: none)
  task automatic wait_done(input int n, output int waited);
    waited = -1;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (drain_done) begin waited = i + 1; break; end
    end
  endtask

  initial begin
    logic [1:0] ta, tb, tc;
    int w;
    for (int j = 0; j < DP; j++) drain_addr[j] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    issue(64'h0000_0000_1000_0040, ta);
    issue(64'h0000_0000_2000_0080, tb);
    issue(64'h0000_0000_3000_0000, tc);
    // 1. unrelated page: immediate completion
    start_drain(64'h0000_0000_5000_0000, '0, 4'b0001, 12);
    #1; chk(wg_pause && !issue_ready, "paused on drain");
    issue_valid = 1; issue_addr = 64'h7000; #1;
    chk(!issue_ready, "no issue while draining");
    issue_valid = 0;
    wait_done(INF * 1 + 4, w);
    chk(w > 0 && w <= INF + 2, $sformatf("immediate completion after %0d cycles", w));
    finish_drain();
    // 2. two migrating pages with pending transactions
    start_drain(64'h0000_0000_1000_0000, 64'h0000_0000_2000_0000, 4'b0011, 12);
    wait_done(30, w);
    chk(w < 0, "waits for pending transactions");
    complete(ta);
    wait_done(30, w);
    chk(w < 0, "still waits for the second page");
    complete(tb);
    wait_done(INF * 2 * 2 + 4, w);
    chk(w > 0, $sformatf("completes once both are done (%0d cycles)", w));
    chk(wg_pause, "still paused until Continue");
    finish_drain();
    // 3. page size given as a shift
    start_drain(64'h0000_0000_3010_0000, '0, 4'b0001, 12);
    wait_done(INF + 4, w);
    chk(w > 0, "4 KB page: other page, completes");
    finish_drain();
    start_drain(64'h0000_0000_3010_0000, '0, 4'b0001, 21);
    wait_done(30, w);
    chk(w < 0, "2 MB page: same page, waits");
    complete(tc);
    wait_done(INF + 4, w);
    chk(w > 0, "2 MB page: completes after the transaction");
    finish_drain();
    issue(64'h0000_0000_4000_0000, ta);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
