// tb_slice_tracker: self-checking test of SST write selection.
// Checks, per cycle: the stalling-load PC always takes write port 0; the
// number of writes is min(ports, requests); every written PC is an offered
// candidate and no candidate is written twice; the drop counter grows by
// the requests not written. Then fairness: with the same full set of 8
// producer PCs offered every cycle, every one of them must be written
// within 4 cycles (8 candidates over 2 ports).
module tb_slice_tracker;
  localparam int W = 4, N_WR = 2, PC_W = 32, CNT_W = 32;
  logic clk = 0, rst_n = 0, stall_valid;
  logic [PC_W-1:0] stall_pc;
  logic [W-1:0] slice_fire;
  logic [W-1:0][1:0] prod_valid;
  logic [W-1:0][1:0][PC_W-1:0] prod_pc;
  logic [N_WR-1:0] wr_valid;
  logic [N_WR-1:0][PC_W-1:0] wr_pc;
  logic [CNT_W-1:0] n_dropped;
  int checks = 0, failures = 0;

  slice_tracker #(.W(W), .N_WR(N_WR), .PC_W(PC_W), .CNT_W(CNT_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nreq, nwr, exp_drop;
    bit seen[8];
    stall_valid = 0; stall_pc = '0; slice_fire = '0; prod_valid = '0; prod_pc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    exp_drop = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int cands[$];
      @(negedge clk);
      cands.delete();
      stall_valid = ($urandom_range(0, 9) == 0);
      stall_pc    = 32'hdead0000 + cyc;
      for (int i = 0; i < W; i++) begin
        slice_fire[i] = $urandom_range(0, 1);
        for (int s = 0; s < 2; s++) begin
          prod_valid[i][s] = $urandom_range(0, 1);
          prod_pc[i][s]    = 32'h1000 + 16 * i + 4 * s;   // distinct per candidate
        end
      end
      #1;
      check(n_dropped == CNT_W'(exp_drop), "drop counter");
      for (int i = 0; i < W; i++) for (int s = 0; s < 2; s++)
        if (slice_fire[i] && prod_valid[i][s]) cands.push_back(int'(prod_pc[i][s]));
      nreq = cands.size() + stall_valid;
      nwr  = 0;
      for (int p = 0; p < N_WR; p++) if (wr_valid[p]) nwr++;
      check(nwr == ((nreq < N_WR) ? nreq : N_WR), "number of writes");
      if (stall_valid) check(wr_valid[0] && wr_pc[0] == stall_pc, "stalling load on port 0");
      for (int p = (stall_valid ? 1 : 0); p < N_WR; p++)
        if (wr_valid[p]) begin
          int hit[$];
          hit = cands.find_index with (item == int'(wr_pc[p]));
          check(hit.size() == 1, "written PC is a candidate");
          if (p > 0 && wr_valid[p-1]) check(wr_pc[p] != wr_pc[p-1], "no duplicate write");
        end
      exp_drop += nreq - nwr;
    end
    // fairness
    @(negedge clk);
    stall_valid = 0; slice_fire = '1; prod_valid = '1;
    foreach (seen[i]) seen[i] = 0;
    for (int c = 0; c < 4; c++) begin
      #1;
      for (int p = 0; p < N_WR; p++)
        if (wr_valid[p]) seen[(int'(wr_pc[p]) - 32'h1000) / 16 * 2 + ((int'(wr_pc[p]) / 4) % 2)] = 1;
      @(negedge clk);
    end
    foreach (seen[i]) check(seen[i], "every candidate written within 4 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
