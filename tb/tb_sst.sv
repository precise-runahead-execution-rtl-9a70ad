// tb_sst: self-checking test of the stalling slice table.
// A reference model keeps the valid PCs in a queue ordered from least to
// most recently used. Random lookups and inserts over a small PC pool (larger
// than the table, so replacement happens) are applied to both; every cycle
// the hit vector and the occupancy are compared. Lookups see the table as it
// was at the start of the cycle, so an insert shows up one cycle later.
module tb_sst;
  localparam int ENTRIES = 8;
  localparam int N_RD    = 4;
  localparam int N_WR    = 2;
  localparam int PC_W    = 32;

  logic clk = 0, rst_n = 0;
  logic [N_RD-1:0]           rd_valid;
  logic [N_RD-1:0][PC_W-1:0] rd_pc;
  logic [N_RD-1:0]           rd_hit;
  logic [N_WR-1:0]           wr_valid;
  logic [N_WR-1:0][PC_W-1:0] wr_pc;
  logic [$clog2(ENTRIES+1)-1:0] occupancy;
  int checks = 0, failures = 0, replacements = 0, hits = 0;

  sst #(.ENTRIES(ENTRIES), .N_RD(N_RD), .N_WR(N_WR), .PC_W(PC_W)) dut (.*);

  always #5 clk = ~clk;

  logic [PC_W-1:0] lru[$];   // front = least recently used

  function automatic int find(logic [PC_W-1:0] pc);
    foreach (lru[i]) if (lru[i] == pc) return i;
    return -1;
  endfunction

  task automatic touch(logic [PC_W-1:0] pc);
    int i;
    i = find(pc);
    if (i >= 0) lru.delete(i);
    else begin
      if (lru.size() == ENTRIES) begin lru.pop_front(); replacements++; end
    end
    lru.push_back(pc);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_valid = '0; rd_pc = '0; wr_valid = '0; wr_pc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(occupancy == 0, "empty after reset");
    // Directed: insert one PC, not visible in the same cycle, visible next.
    wr_valid = 2'b01; wr_pc[0] = 32'h402ed2;
    rd_valid = 4'b0001; rd_pc[0] = 32'h402ed2;
    #1 check(rd_hit[0] == 1'b0, "insert not visible same cycle");
    @(negedge clk);
    touch(32'h402ed2);
    wr_valid = '0;
    #1 check(rd_hit[0] == 1'b1, "insert visible next cycle");
    check(occupancy == 1, "occupancy 1");
    // Random traffic.
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < N_RD; p++) begin
        rd_valid[p] = ($urandom_range(0, 3) != 0);
        rd_pc[p]    = 32'h400000 + 4 * $urandom_range(0, 13);
      end
      for (int p = 0; p < N_WR; p++) begin
        wr_valid[p] = ($urandom_range(0, 2) == 0);
        wr_pc[p]    = 32'h400000 + 4 * $urandom_range(0, 13);
      end
      #1;
      for (int p = 0; p < N_RD; p++) begin
        check(rd_hit[p] == (rd_valid[p] && find(rd_pc[p]) >= 0), "hit vector");
        if (rd_hit[p]) hits++;
      end
      check(occupancy == lru.size(), "occupancy");
      // Model update in the documented order: read hits, then inserts.
      for (int p = 0; p < N_RD; p++)
        if (rd_valid[p] && find(rd_pc[p]) >= 0) touch(rd_pc[p]);
      for (int p = 0; p < N_WR; p++)
        if (wr_valid[p]) touch(wr_pc[p]);
    end
    check(replacements > 0 && hits > 0, "replacement and hits exercised");
    $display("replacements=%0d hits=%0d", replacements, hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
