// tb_emq: self-checking test of the extended micro-op queue.
// A reference queue holds the pushed words; in runahead mode a separate
// offset plays the runahead pointer. Random pushes, random consumption and
// random mode changes are applied; each cycle the W words at the read
// pointer, their valid bits, in_ready (normal-mode capacity NORMAL_CAP,
// runahead capacity DEPTH) and full are compared. The check that
// matters most: words consumed in runahead mode are read again, in order,
// once normal mode returns.
module tb_emq;
  localparam int DEPTH = 16, W = 4, DATA_W = 16, NORMAL_CAP = 8;
  logic clk = 0, rst_n = 0, ra_mode;
  logic [W-1:0] in_valid, out_valid;
  logic [W-1:0][DATA_W-1:0] in_data, out_data;
  logic in_ready, full;
  logic [$clog2(W+1)-1:0] out_take;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0, n_replayed = 0;

  emq #(.DEPTH(DEPTH), .W(W), .DATA_W(DATA_W), .NORMAL_CAP(NORMAL_CAP)) dut (.*);
  always #5 clk = ~clk;

  logic [DATA_W-1:0] q[$];
  int ra_off = 0;
  int next_word = 1;

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
    int avail, rd, npush, take;
    bit acc;
    ra_mode = 0; in_valid = '0; in_data = '0; out_take = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      if ($urandom_range(0, 39) == 0) ra_mode = !ra_mode;
      if (!ra_mode) ra_off = 0;
      npush = $urandom_range(0, W);
      in_valid = '0;
      for (int i = 0; i < W; i++) begin
        in_valid[i] = (i < npush);
        in_data[i]  = DATA_W'(next_word + i);
      end
      rd    = ra_mode ? ra_off : 0;
      avail = q.size() - rd;
      take  = $urandom_range(0, (avail < W) ? avail : W);
      if (ra_mode && $urandom_range(0, 1) == 0) take = 0;   // runahead lingers
      out_take = ($clog2(W+1))'(take);
      #1;
      check(count == q.size(), "count");
      check(in_ready == (q.size() <= (ra_mode ? DEPTH : NORMAL_CAP) - W), "in_ready");
      check(full == (q.size() > DEPTH - W), "full");
      if (full) n_full++;
      for (int i = 0; i < W; i++) begin
        check(out_valid[i] == (i < avail), "out_valid");
        if (i < avail) check(out_data[i] == q[rd + i], "out_data");
      end
      if (!ra_mode && take > 0 && q.size() > 0) n_replayed++;
      // model update (in_ready is decided on the occupancy before this edge)
      acc = (q.size() <= (ra_mode ? DEPTH : NORMAL_CAP) - W);
      if (ra_mode) ra_off += take;
      else for (int i = 0; i < take; i++) void'(q.pop_front());
      if (acc) begin
        for (int i = 0; i < npush; i++) q.push_back(DATA_W'(next_word + i));
        next_word += npush;
      end
    end
    check(n_full > 0, "queue filled at least once");
    $display("full_cycles=%0d", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
