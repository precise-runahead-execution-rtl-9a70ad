// tb_prdq: self-checking test of the register deallocation queue.
// A reference queue of {id, has_reg, tag, executed} entries mirrors the
// PRDQ. Random allocation groups (ids in program order), random
// out-of-order execute reports and occasional flushes are applied; each
// cycle the freed registers must be exactly the leading executed entries of
// the reference queue (at most W, in order, only those carrying a register),
// and an entry executed in cycle t may leave no earlier than cycle t+1.
module tb_prdq;
  localparam int DEPTH = 12, W = 4, ID_W = 8, TAG_W = 9;
  logic clk = 0, rst_n = 0, flush;
  logic [W-1:0] alloc_valid, alloc_has_reg, exec_valid, free_valid;
  logic alloc_ready;
  logic [W-1:0][ID_W-1:0] alloc_id, exec_id;
  logic [W-1:0][TAG_W-1:0] alloc_tag, free_tag;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, n_freed = 0, n_flush = 0;

  prdq #(.DEPTH(DEPTH), .W(W), .ID_W(ID_W), .TAG_W(TAG_W)) dut (
    .clk, .rst_n, .flush, .alloc_valid, .alloc_id, .alloc_has_reg, .alloc_tag,
    .alloc_ready, .exec_valid, .exec_id, .free_valid, .free_tag, .count);

  always #5 clk = ~clk;

  typedef struct { int id; bit has_reg; int tag; bit ex; } ent_t;
  ent_t q[$];
  int next_id = 0;

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
    flush = 0; alloc_valid = '0; alloc_id = '0; alloc_has_reg = '0; alloc_tag = '0;
    exec_valid = '0; exec_id = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int exp_n;
      int cand[$];
      @(negedge clk);
      cand.delete();
      flush = ($urandom_range(0, 199) == 0);
      // allocation
      alloc_valid = '0;
      if (q.size() <= DEPTH - W) begin
        for (int i = 0; i < W; i++) begin
          alloc_valid[i]   = ($urandom_range(0, 1) == 1);
          alloc_id[i]      = ID_W'(next_id + i);
          alloc_has_reg[i] = ($urandom_range(0, 3) != 0);
          alloc_tag[i]     = TAG_W'($urandom);
        end
      end
      // execute reports for unexecuted entries
      exec_valid = '0;
      foreach (q[i]) if (!q[i].ex) cand.push_back(i);
      cand.shuffle();
      for (int j = 0; j < W && j < cand.size(); j++) begin
        exec_valid[j] = ($urandom_range(0, 2) != 0);
        exec_id[j]    = ID_W'(q[cand[j]].id);
      end
      #1;
      check(count == q.size(), "count");
      check(alloc_ready == (q.size() <= DEPTH - W), "alloc_ready");
      // expected releases
      exp_n = 0;
      while (!flush && exp_n < W && exp_n < q.size() && q[exp_n].ex) exp_n++;
      for (int i = 0; i < W; i++) begin
        if (i < exp_n) begin
          check(free_valid[i] == q[i].has_reg, "free_valid");
          if (q[i].has_reg) begin
            check(free_tag[i] == TAG_W'(q[i].tag), "free_tag");
            n_freed++;
          end
        end else begin
          check(free_valid[i] == 1'b0, "no free beyond executed prefix");
        end
      end
      // model update at the edge
      if (flush) begin
        q.delete();
        n_flush++;
      end else begin
        for (int i = 0; i < exp_n; i++) void'(q.pop_front());
        for (int j = 0; j < W; j++)
          if (exec_valid[j]) foreach (q[i]) if (q[i].id == int'(exec_id[j])) q[i].ex = 1;
        for (int i = 0; i < W; i++)
          if (alloc_valid[i]) q.push_back('{int'(alloc_id[i]), alloc_has_reg[i], int'(alloc_tag[i]), 0});
      end
      next_id = (next_id + W) % 256;
    end
    check(n_freed > 100 && n_flush > 0, "frees and flushes exercised");
    $display("freed=%0d flushes=%0d", n_freed, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
