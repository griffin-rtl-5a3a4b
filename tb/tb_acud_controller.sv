// tb_acud_controller: three CUs answer a drain after 0, 20 and 40 cycles; the
// shootdown must start only when all three have answered, issue the TLB and L2
// requests together, and send Continue (with the CU resume) one cycle after
// the later of the two done pulses. The page list must reach the CUs, the CUs
// must see the drain until Continue, and a new request must wait until idle.
module tb_acud_controller;
  import griffin_pkg::*;
  localparam int unsigned NC = 3, DP = 2;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, cont;
  logic [ADDR_W-1:0] req_addr [DP];
  logic [DP-1:0] req_mask = '0;
  logic [5:0] req_shift = '0;
  logic cu_drain, cu_resume;
  logic [ADDR_W-1:0] cu_addr [DP];
  logic [DP-1:0] cu_mask;
  logic [5:0] cu_shift;
  logic [NC-1:0] cu_done = '0;
  logic tlb_shoot_req, tlb_shoot_done = 0, l2_flush_req, l2_flush_done = 0;
  int checks = 0, failures = 0;
  int cyc = 0, t_all_done = -1, t_tlb_req = -1, t_l2_req = -1, t_cont = -1, t_l2_done = -1;

  acud_controller #(.NCU(NC), .DRAIN_PAGES(DP)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (tlb_shoot_req && t_tlb_req < 0) t_tlb_req <= cyc;
    if (l2_flush_req && t_l2_req < 0) t_l2_req <= cyc;
    if (cont && t_cont < 0) t_cont <= cyc;
    if (cont && !cu_resume) begin failures++; $display("FAIL resume with Continue"); end
    if ((tlb_shoot_req || l2_flush_req) && !(&cu_done)) begin failures++; $display("FAIL shootdown before drain"); end
  end

  // CU model: each answers some cycles after it sees the drain
  for (genvar c = 0; c < NC; c++) begin : g_cu
    initial forever begin
      @(posedge clk);
      if (cu_drain && !cu_done[c]) begin
        repeat (c * 20) @(posedge clk);
        cu_done[c] <= 1'b1;
        if (c == NC - 1) t_all_done = cyc;
        while (!cu_resume) @(posedge clk);
        cu_done[c] <= 1'b0;
      end
    end
  end

  initial forever begin
    @(posedge clk);
    if (tlb_shoot_req) begin
      repeat (4) @(posedge clk); tlb_shoot_done <= 1; @(posedge clk); tlb_shoot_done <= 0;
      while (tlb_shoot_req) @(posedge clk);
    end
  end
  initial forever begin
    @(posedge clk);
    if (l2_flush_req) begin
      repeat (11) @(posedge clk); l2_flush_done <= 1; t_l2_done = cyc; @(posedge clk); l2_flush_done <= 0;
      while (l2_flush_req) @(posedge clk);
    end
  end

  initial begin
    req_addr[0] = 64'hA000; req_addr[1] = 64'hB000;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      t_all_done = -1; t_tlb_req = -1; t_l2_req = -1; t_cont = -1;
      @(negedge clk); req_valid = 1; req_mask = 2'b11; req_shift = 6'd12;
      #1; chk(req_ready, "ready when idle");
      @(negedge clk); req_valid = 0;
      #1; chk(!req_ready && cu_drain, "busy and draining");
      chk(cu_addr[0] == 64'hA000 && cu_addr[1] == 64'hB000 && cu_mask == 2'b11 && cu_shift == 6'd12,
          "page list to the CUs");
      while (t_cont < 0 && cyc < 500) begin
        @(negedge clk);
        if (t_cont < 0 && !cont) chk(cu_drain || t_cont >= 0, "drain held until Continue");
      end
      chk(t_tlb_req >= 0 && t_tlb_req == t_l2_req, "TLB and L2 requests together");
      chk(t_tlb_req >= t_all_done, "shootdown after all CUs");
      chk(t_cont - t_l2_done >= 1 && t_cont - t_l2_done <= 2, $sformatf("Continue %0d cycles after the last done", t_cont - t_l2_done));
      @(negedge clk);
      chk(!cu_drain && req_ready, "idle after Continue");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
