// tb_free_list: self-checking test of the physical register free list.
// A reference bitmap mirrors the list. Each cycle the offered registers must
// be the lowest free ones in order; random prefixes are taken, allocated
// registers are released at random, and checkpoints are saved and restored.
// After a restore the list must equal the bitmap saved at the checkpoint.
module tb_free_list;
  localparam int N = 12, W = 4, NFREE = 4, INIT_USED = 4;
  logic clk = 0, rst_n = 0, ckpt_save, ckpt_restore;
  logic [W-1:0] alloc_ok;
  logic [W-1:0][$clog2(N)-1:0] alloc_idx;
  logic [$clog2(W+1)-1:0] alloc_take;
  logic [NFREE-1:0] free_valid;
  logic [NFREE-1:0][$clog2(N)-1:0] free_idx;
  logic [$clog2(N+1)-1:0] num_free;
  int checks = 0, failures = 0, n_restore = 0, n_empty = 0;

  free_list #(.N(N), .W(W), .NFREE(NFREE), .INIT_USED(INIT_USED)) dut (.*);
  always #5 clk = ~clk;

  bit fr[N], ck[N];

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
    int k, nf, take, lst[$];
    for (int e = 0; e < N; e++) fr[e] = (e >= INIT_USED);
    alloc_take = '0; free_valid = '0; free_idx = '0; ckpt_save = 0; ckpt_restore = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      #1;
      k = 0; nf = 0;
      for (int e = 0; e < N; e++) if (fr[e]) begin
        if (k < W) begin
          check(alloc_ok[k] == 1'b1 && int'(alloc_idx[k]) == e, "lowest free offered");
          k++;
        end
        nf++;
      end
      for (int i = k; i < W; i++) check(alloc_ok[i] == 1'b0, "no offer past free count");
      check(int'(num_free) == nf, "num_free");
      if (nf == 0) n_empty++;
      take = $urandom_range(0, k);
      alloc_take = ($clog2(W+1))'(take);
      // release up to NFREE distinct allocated registers not taken now
      lst.delete();
      for (int e = 0; e < N; e++) if (!fr[e]) lst.push_back(e);
      lst.shuffle();
      free_valid = '0;
      for (int j = 0; j < NFREE && j < lst.size(); j++) begin
        free_valid[j] = ($urandom_range(0, 2) == 0);
        free_idx[j]   = ($clog2(N))'(lst[j]);
      end
      ckpt_save    = ($urandom_range(0, 49) == 0);
      ckpt_restore = !ckpt_save && ($urandom_range(0, 59) == 0);
      // model
      if (ckpt_save) ck = fr;
      if (ckpt_restore) begin
        fr = ck;
        n_restore++;
      end else begin
        for (int i = 0; i < take; i++) fr[alloc_idx[i]] = 0;
        for (int j = 0; j < NFREE; j++) if (free_valid[j]) fr[free_idx[j]] = 1;
      end
    end
    check(n_restore > 0 && n_empty > 0, "restore and empty list exercised");
    $display("restores=%0d empty_cycles=%0d", n_restore, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
