// tb_pre_core_chase: end-to-end test of pre_core on a pointer-chasing loop,
// at the default sizes.
//
// Same back-end model as tb_pre_core (192-entry ROB, register values,
// 400-cycle misses, prefetch by runahead loads), different program:
//   A  r1 = load[r1]   (each address comes from the previous load)
//   C  r3 = r3 + r1    E  r5 = r5 + 96    F  r6 = load[r5]
//   G  f0 = f0 + 1     H  r4 = r4 + r6    S1..S4: no destination
// The chase load's slice is itself: in runahead mode its copy waits on the
// stalling load and never executes, so its PRDQ entry blocks releases until
// the exit. The test checks that this costs nothing in correctness: every
// committed value matches a sequential execution, the free lists are
// restored at every exit, nothing commits in runahead mode, and the loop
// completes. The independent stream (E, F) never stalls the ROB here (its
// misses overlap the chase misses), so it is not learned; runahead mode
// gains nothing on this loop, as expected for a pure pointer chase.
module tb_pre_core_chase;
  import pre_pkg::*;

  localparam int ROB_N   = 192;
  localparam int MEM_LAT = 400;
  localparam int ITER    = 300;
  localparam int BODY    = 10;
  localparam int NINST   = ITER * BODY;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] dec_valid, disp_valid, exec_valid, commit_valid;
  uop_t [W-1:0] dec_uop;
  ren_uop_t [W-1:0] disp_uop;
  ra_id_t [W-1:0] exec_ra_id;
  ptag_t [W-1:0] commit_old_ptag;
  logic dec_ready, disp_ready, rob_full, rob_head_valid, rob_head_is_load;
  logic rob_head_llc_miss, rob_head_done, commit_en, ra_mode, ra_enter, ra_exit, emq_full;
  pc_t rob_head_pc;
  logic [31:0] n_ra_intervals, n_ra_exits, n_slice_dropped;
  logic [$clog2(SST_ENTRIES+1)-1:0] sst_occupancy;
  logic [$clog2(PRDQ_DEPTH+1)-1:0] prdq_count;
  logic [$clog2(EMQ_DEPTH+1)-1:0] emq_count;
  logic [$clog2(NUM_PREGS+1)-1:0] int_free, fp_free;

  pre_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0t", what, $time / 10);
      if (failures >= 50) begin   // broken design: no point running on
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  // ---------------- program and golden model ----------------
  localparam pc_t PC0 = 32'h0040_0000;
  uop_t body[BODY];
  logic [31:0] gold[NINST];

  function automatic uop_t mk(int k, logic [7:0] op, bit ld, logic [1:0] sv, int s0, int s1, bit dv, int d);
    uop_t u;
    u.pc = PC0 + 4 * k; u.op = op; u.is_load = ld; u.src_valid = sv;
    u.src0 = areg_t'(s0); u.src1 = areg_t'(s1); u.dst_valid = dv; u.dst = areg_t'(d);
    return u;
  endfunction

  function automatic logic [31:0] load_val(logic [31:0] a);
    return a * 5 + 3;
  endfunction

  // op[7] = 1: dst = src0 + src1; otherwise dst = src0 + op (loads: mem[src0]).
  function automatic logic [31:0] exec_op(uop_t u, logic [31:0] a, logic [31:0] b);
    if (u.is_load) return load_val(a);
    if (u.op[7])   return a + b;
    return a + 32'(u.op);
  endfunction

  // ---------------- back-end model ----------------
  typedef struct {
    ren_uop_t r; int seq; bit issued; bit done; bit miss; longint t_done; logic [31:0] val;
  } ent_t;
  ent_t rob[$];
  ent_t ra[$];
  ra_id_t ra_done[$];
  logic [31:0] prf_val[2*256];
  bit          prf_rdy[2*256];
  longint      pf[logic [31:0]];   // prefetched line -> ready time
  longint cyc = 0;
  int fe_n = 0, disp_seq = 0, n_commit = 0;

  // mechanism counters
  int m_enter = 0, m_exit = 0, m_ra_disp = 0, m_prdq_free = 0, m_emq_full = 0;
  int m_dec_stall_full = 0, m_pf_use = 0, m_short = 0, m_blocked = 0;
  bit seen_ra_pc[BODY];
  int free_at_enter_i, free_at_enter_f;
  longint t_exit = -1, t_enter = 0;
  int prev_int_free;
  bit first_commit_pending = 0;

  task automatic issue_and_complete(ref ent_t q[$], input bit runahead);
    foreach (q[i]) begin
      if (!q[i].issued) begin
        bit ok;
        ok = 1;
        if (q[i].r.uop.src_valid[0] && !prf_rdy[q[i].r.psrc0]) ok = 0;
        if (q[i].r.uop.src_valid[1] && !prf_rdy[q[i].r.psrc1]) ok = 0;
        if (ok) begin
          logic [31:0] a, b;
          int lat;
          a = prf_val[q[i].r.psrc0]; b = prf_val[q[i].r.psrc1];
          lat = 1;
          if (q[i].r.uop.is_load) begin
            if (runahead) begin
              if (!pf.exists(a)) pf[a] = cyc + MEM_LAT;
              lat = 2;
            end else if (pf.exists(a)) begin
              lat = (pf[a] > cyc + 2) ? int'(pf[a] - cyc) : 2;
              m_pf_use++;
            end else begin
              lat = MEM_LAT;
            end
            q[i].miss = (lat > 30);
          end
          q[i].issued = 1;
          q[i].val = exec_op(q[i].r.uop, a, b);
          q[i].t_done = cyc + lat;
        end
      end
      if (q[i].issued && !q[i].done && cyc >= q[i].t_done) begin
        q[i].done = 1;
        if (q[i].r.uop.dst_valid) begin
          prf_val[q[i].r.pdst] = q[i].val;
          prf_rdy[q[i].r.pdst] = 1;
        end
        if (runahead) ra_done.push_back(q[i].r.ra_id);
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: committed %0d of %0d", n_commit, NINST);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] arch[NUM_AREGS];
    body[0] = mk(0, 8'd0,  1, 2'b01, 1, 0, 1, 1);     // A  chase
    body[1] = mk(1, 8'h80, 0, 2'b11, 3, 1, 1, 3);     // C
    body[2] = mk(2, 8'd96, 0, 2'b01, 5, 0, 1, 5);     // E
    body[3] = mk(3, 8'd0,  1, 2'b01, 5, 0, 1, 6);     // F
    body[4] = mk(4, 8'd1,  0, 2'b01, 32, 0, 1, 32);   // G (fp)
    body[5] = mk(5, 8'h80, 0, 2'b11, 4, 6, 1, 4);     // H
    body[6] = mk(6, 8'd0,  0, 2'b11, 3, 1, 0, 0);     // S1
    body[7] = mk(7, 8'd0,  0, 2'b01, 4, 0, 0, 0);     // S2
    body[8] = mk(8, 8'd0,  0, 2'b00, 0, 0, 0, 0);     // S3
    body[9] = mk(9, 8'd0,  0, 2'b01, 5, 0, 0, 0);     // S4
    foreach (arch[r]) arch[r] = 0;
    for (int n = 0; n < NINST; n++) begin
      uop_t u;
      u = body[n % BODY];
      gold[n] = exec_op(u, arch[u.src0], arch[u.src1]);
      if (u.dst_valid) arch[u.dst] = gold[n];
    end
    foreach (prf_val[i]) begin prf_val[i] = 0; prf_rdy[i] = 1; end

    dec_valid = '0; dec_uop = '0; disp_ready = 0; exec_valid = '0; exec_ra_id = '0;
    commit_valid = '0; commit_old_ptag = '0;
    rob_full = 0; rob_head_valid = 0; rob_head_is_load = 0; rob_head_llc_miss = 0;
    rob_head_done = 0; rob_head_pc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    while (n_commit < NINST) begin
      int ncommit;
      @(negedge clk);
      cyc++;
      // front end
      dec_valid = '0;
      begin
        int ng;
        ng = $urandom_range(1, W);
        for (int i = 0; i < W; i++) begin
          if (i < ng && fe_n + i < NINST) begin
            dec_valid[i] = 1;
            dec_uop[i]   = body[(fe_n + i) % BODY];
          end
        end
      end
      // ROB head
      rob_full       = rob.size() > ROB_N - W;
      rob_head_valid = rob.size() > 0;
      if (rob.size() > 0) begin
        rob_head_is_load  = rob[0].r.uop.is_load;
        rob_head_llc_miss = rob[0].miss;
        rob_head_done     = rob[0].done;
        rob_head_pc       = rob[0].r.uop.pc;
      end else begin
        rob_head_is_load = 0; rob_head_llc_miss = 0; rob_head_done = 0; rob_head_pc = '0;
      end
      disp_ready = ra_mode ? 1'b1 : (rob.size() <= ROB_N - W);
      // runahead completions, up to W per cycle
      exec_valid = '0;
      for (int i = 0; i < W; i++)
        if (ra_done.size() > 0) begin exec_valid[i] = 1; exec_ra_id[i] = ra_done.pop_front(); end
      #1;
      // commit (needs commit_en, which depends on the head inputs)
      commit_valid = '0;
      ncommit = 0;
      if (commit_en)
        while (ncommit < W && ncommit < rob.size() && rob[ncommit].done) begin
          commit_valid[ncommit]    = rob[ncommit].r.uop.dst_valid;
          commit_old_ptag[ncommit] = rob[ncommit].r.old_pdst;
          ncommit++;
        end
      #1;
      // ---- sample ----
      check(!(ra_mode && ncommit > 0), "no commit in runahead mode");
      if (ra_enter) begin
        m_enter++; t_enter = cyc;
        free_at_enter_i = int'(int_free); free_at_enter_f = int'(fp_free);
        check(rob_head_is_load && rob_full, "entry on a full-window stall");
      end
      if (t_exit >= 0 && cyc == t_exit + 1) begin
        check(int'(int_free) == free_at_enter_i && int'(fp_free) == free_at_enter_f,
              "free lists restored on exit");
      end
      if (ra_exit) begin
        m_exit++; t_exit = cyc; first_commit_pending = 1;
        if (cyc - t_enter < 20) m_short++;
        foreach (ra[k]) if (!ra[k].issued && ra[k].r.uop.pc == PC0) m_blocked++;
        ra.delete(); ra_done.delete();
      end
      if (ra_mode && !ra_exit && int'(int_free) > prev_int_free) m_prdq_free++;
      if (emq_full) m_emq_full++;
      if (ra_mode && dec_valid[0] && !dec_ready) m_dec_stall_full++;
      // commit
      for (int i = 0; i < ncommit; i++) begin
        ent_t e;
        e = rob.pop_front();
        if (e.r.uop.dst_valid) check(prf_val[e.r.pdst] == gold[e.seq], "committed value");
        if (first_commit_pending) begin
          check(cyc - t_exit <= 2, "commit resumes within 2 cycles of the exit");
          first_commit_pending = 0;
        end
        n_commit++;
      end
      // decode accepted
      if (dec_ready) for (int i = 0; i < W; i++) if (dec_valid[i]) fe_n++;
      // dispatch
      for (int i = 0; i < W; i++) if (disp_valid[i]) begin
        ent_t e;
        e = '{r: disp_uop[i], seq: 0, issued: 0, done: 0, miss: 0, t_done: 0, val: 0};
        if (disp_uop[i].uop.dst_valid) prf_rdy[disp_uop[i].pdst] = 0;
        if (disp_uop[i].runahead) begin
          check(ra_mode && disp_uop[i].in_slice, "runahead dispatch only of slice micro-ops");
          seen_ra_pc[(disp_uop[i].uop.pc - PC0) / 4] = 1;
          m_ra_disp++;
          ra.push_back(e);
        end else begin
          check(disp_uop[i].uop.pc == body[disp_seq % BODY].pc, "normal dispatch in program order");
          e.seq = disp_seq++;
          rob.push_back(e);
        end
      end
      prev_int_free = int'(int_free);
      issue_and_complete(rob, 0);
      issue_and_complete(ra, 1);
    end
    check(m_enter > 0 && m_exit == m_enter - (ra_mode ? 1 : 0), "runahead intervals entered and left");
    check(int'(n_ra_intervals) == m_enter && int'(n_ra_exits) == m_exit, "interval counters");
    check(m_ra_disp > 0, "slice micro-ops executed in runahead mode");
    check(seen_ra_pc[0], "chase load run in runahead mode");
    check(!seen_ra_pc[1] && !seen_ra_pc[4] && !seen_ra_pc[5], "non-slice micro-ops filtered out");
    check(m_blocked > 0, "runahead copy of the chase load waited on the stalling load");
    check(n_commit == NINST, "all micro-ops committed");
    $display("blocked_chase=%0d", m_blocked);
    $display("cycles=%0d commits=%0d intervals=%0d short_intervals=%0d ra_dispatched=%0d prdq_release_cycles=%0d emq_full_cycles=%0d decode_stall_cycles=%0d prefetch_uses=%0d sst=%0d dropped=%0d",
             cyc, n_commit, m_enter, m_short, m_ra_disp, m_prdq_free, m_emq_full, m_dec_stall_full, m_pf_use, sst_occupancy, n_slice_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
