// tb_runahead_ctrl: self-checking test of the runahead mode controller.
// Directed sequences: a full ROB whose head is not a missing load must not
// start runahead; a full-window stall must pulse ra_enter once, present the
// stalling PC, block commit and hold ra_mode until the load returns; the
// return must pulse ra_exit and re-enable commit in the next cycle. Then a
// random ROB-head stream is checked against a two-state reference.
module tb_runahead_ctrl;
  localparam int CNT_W = 32;
  logic clk = 0, rst_n = 0;
  logic rob_full, rob_head_valid, rob_head_is_load, rob_head_llc_miss, rob_head_done;
  logic ra_mode, ra_enter, ra_exit, commit_en, rename_block, stall_pc_valid;
  logic [CNT_W-1:0] n_enter, n_exit;
  int checks = 0, failures = 0;

  runahead_ctrl #(.CNT_W(CNT_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic head(bit full, bit ld, bit miss, bit done);
    rob_full = full; rob_head_valid = 1; rob_head_is_load = ld;
    rob_head_llc_miss = miss; rob_head_done = done;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit mode;
    int ent;
    head(0, 0, 0, 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!ra_mode && commit_en && !ra_enter, "normal after reset");
    head(1, 0, 0, 0); #1 check(!ra_enter, "full ROB, head not a load");
    head(1, 1, 0, 0); #1 check(!ra_enter, "full ROB, load hits in LLC");
    head(0, 1, 1, 0); #1 check(!ra_enter, "ROB not full");
    head(1, 1, 1, 0); #1;
    check(ra_enter && stall_pc_valid, "entry pulse with SST write request");
    check(!commit_en && rename_block, "commit and rename blocked on entry");
    @(negedge clk);
    check(ra_mode && !ra_enter && !stall_pc_valid, "runahead, single pulse");
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      check(ra_mode && !commit_en && !ra_exit, "held in runahead, no commit");
    end
    head(1, 1, 1, 1); #1;
    check(ra_exit && rename_block, "exit pulse on load return");
    @(negedge clk);
    check(!ra_mode && commit_en, "normal mode, commit resumes next cycle");
    check(n_enter == 1 && n_exit == 1, "interval counters");
    // random stream
    mode = 0; ent = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (mode) head($urandom_range(0, 3) != 0, 1, 1, $urandom_range(0, 15) == 0);
      else      head($urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 3) == 0);
      #1;
      check(ra_mode == mode, "mode");
      check(ra_enter == (!mode && rob_full && rob_head_is_load && rob_head_llc_miss && !rob_head_done), "enter");
      check(ra_exit == (mode && rob_head_done), "exit");
      check(commit_en == (!mode && !ra_enter), "commit enable");
      if (ra_enter) begin mode = 1; ent++; end
      else if (ra_exit) mode = 0;
    end
    check(int'(n_enter) == ent, "entry count");
    $display("intervals=%0d", ent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
