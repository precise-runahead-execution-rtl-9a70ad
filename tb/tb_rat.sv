// tb_rat: self-checking test of the extended register allocation table.
// The reference renames a group one micro-op at a time against a working
// copy of the table (physical tag, producer PC, runahead bit per register),
// so same-group forwarding falls out of the sequential order rather than
// from the block's slot-by-slot comparison. Random groups are renamed with
// random fire, mode, checkpoint and restore; every lookup output is
// compared each cycle.
module tb_rat;
  localparam int NREG = 8, W = 4, PTAG_W = 9, PC_W = 32;
  localparam int AW = $clog2(NREG);
  logic clk = 0, rst_n = 0, ra_mode, ren_fire, ckpt_save, ckpt_restore;
  logic [W-1:0] ren_valid, ren_dst_valid, old_is_ra;
  logic [W-1:0][PC_W-1:0] ren_pc;
  logic [W-1:0][1:0] ren_src_valid, prod_pc_valid;
  logic [W-1:0][1:0][AW-1:0] ren_src;
  logic [W-1:0][AW-1:0] ren_dst;
  logic [W-1:0][PTAG_W-1:0] ren_new_ptag, old_pdst;
  logic [W-1:0][1:0][PTAG_W-1:0] psrc;
  logic [W-1:0][1:0][PC_W-1:0] prod_pc;
  int checks = 0, failures = 0, n_bypass = 0, n_restore = 0;

  rat #(.NREG(NREG), .W(W), .PTAG_W(PTAG_W), .PC_W(PC_W)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { int tag; bit pcv; int pc; bit ra; } m_t;
  m_t m[NREG], ck[NREG], wk[NREG];

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
    for (int r = 0; r < NREG; r++) begin
      m[r] = '{(r >= NREG/2 ? 256 : 0) + (r % (NREG/2)), 0, 0, 0};
      ck[r] = '{0, 0, 0, 0};
    end
    ra_mode = 0; ren_fire = 0; ckpt_save = 0; ckpt_restore = 0;
    ren_valid = '0; ren_dst_valid = '0; ren_pc = '0; ren_src_valid = '0; ren_src = '0;
    ren_dst = '0; ren_new_ptag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      if ($urandom_range(0, 29) == 0) ra_mode = !ra_mode;
      ckpt_save    = ($urandom_range(0, 39) == 0);
      ckpt_restore = !ckpt_save && ($urandom_range(0, 49) == 0);
      ren_fire     = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < W; i++) begin
        ren_valid[i]     = ($urandom_range(0, 4) != 0);
        ren_pc[i]        = 32'h1000 + 4 * $urandom_range(0, 255);
        ren_src_valid[i] = 2'($urandom);
        ren_src[i][0]    = AW'($urandom);
        ren_src[i][1]    = AW'($urandom);
        ren_dst_valid[i] = ($urandom_range(0, 3) != 0);
        ren_dst[i]       = AW'($urandom);
        ren_new_ptag[i]  = PTAG_W'($urandom);
      end
      #1;
      wk = m;
      for (int i = 0; i < W; i++) begin
        for (int s = 0; s < 2; s++) begin
          check(int'(psrc[i][s]) == wk[ren_src[i][s]].tag, "psrc");
          check(prod_pc_valid[i][s] == (wk[ren_src[i][s]].pcv && ren_src_valid[i][s]), "producer pc valid");
          if (prod_pc_valid[i][s]) check(int'(prod_pc[i][s]) == wk[ren_src[i][s]].pc, "producer pc");
          if (wk[ren_src[i][s]].tag != m[ren_src[i][s]].tag) n_bypass++;
        end
        check(int'(old_pdst[i]) == wk[ren_dst[i]].tag, "old_pdst");
        check(old_is_ra[i] == wk[ren_dst[i]].ra, "old_is_ra");
        if (ren_valid[i] && ren_dst_valid[i])
          wk[ren_dst[i]] = '{int'(ren_new_ptag[i]), 1, int'(ren_pc[i]), ra_mode};
      end
      if (ckpt_save) ck = m;
      if (ckpt_restore) begin m = ck; n_restore++; end
      else if (ren_fire) m = wk;
    end
    check(n_bypass > 0 && n_restore > 0, "bypass and restore exercised");
    $display("bypasses=%0d restores=%0d", n_bypass, n_restore);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
