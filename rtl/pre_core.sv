// pre_core: precise runahead execution (PRE) around the rename stage of an
// out-of-order core.
//
// When a load that missed in the last-level cache sits at the head of a full
// ROB, the core would stall for the whole memory latency. PRE uses that time
// to run ahead without giving up the instruction window: the ROB is kept
// intact, the register allocation table (RAT) is checkpointed, and only the
// micro-ops that belong to a stalling slice (the chain of instructions that
// computes a missing load's address) are renamed and executed, using the
// physical registers and issue slots that are still free. They never commit;
// their only effect is to start the future misses early. When the stalling
// load returns, the RAT is restored and commit resumes at once with the
// stalling load. Nothing has to be flushed or fetched again.
//
// Structures wired here (decode side to dispatch side):
//  * sst           Stalling Slice Table, looked up with each decoded PC; the
//                  hit bit travels with the micro-op.
//  * emq           Extended Micro-Op Queue; keeps the micro-ops seen in
//                  runahead mode so normal mode dispatches them from the queue.
//  * rat           RAT with the producer PC of every register, checkpointed.
//  * free_list     one per register class (integer, floating point).
//  * prdq          Precise Register Deallocation Queue; frees registers in
//                  runahead mode once a micro-op has executed and every older
//                  runahead micro-op has left the queue.
//  * slice_tracker picks the PCs written to the SST: the stalling load on
//                  entry and the producers of renamed slice micro-ops.
//  * runahead_ctrl enters on a full-window stall, exits when the load returns.
//
// Rename (this design's organisation): each cycle the up to W micro-ops at
// the EMQ read pointer form a group, renamed all together or not at all. In
// normal mode every micro-op is renamed and dispatched. In runahead mode the
// micro-ops that hit in the SST are renamed, get a PRDQ entry and a runahead
// id, and are dispatched with the runahead flag; the others are passed over
// (they stay in the EMQ for normal mode). A group waits for enough free
// registers of each class, for the back end (disp_ready) when it dispatches
// anything, and in runahead mode for PRDQ room. Renaming pauses in the
// cycles of runahead entry and exit.
//
// Back-end interface: the ROB, issue queues, register file, execution units
// and caches are not part of this block. The ROB reports its head and
// fullness on rob_*; normal-mode commit returns the replaced registers on
// commit_valid/commit_old_ptag while commit_en is high; runahead micro-ops
// report completion by id on exec_valid/exec_ra_id; ra_exit tells the back
// end to drop the runahead micro-ops still in flight.
//
// The SST has the 8 read ports and 2 write ports of the evaluated
// configuration: 4 read ports look up the decode slots (the hit bit is stored
// in the EMQ with the micro-op, as the pipeline drawing places the table
// after decode) and 4 look up the micro-ops again as rename reads them from
// the EMQ, so that a micro-op queued before its PC entered the table is still
// recognised (this second lookup is this design's addition). The decode
// width is set to the EMQ's 4 write ports. The EMQ admits EMQ_NORMAL
// micro-ops in normal mode (an ordinary micro-op queue, size assumed) and
// EMQ_N while running ahead.
module pre_core
  import pre_pkg::*;
#(
  parameter int SST_N  = SST_ENTRIES,
  parameter int PRDQ_N = PRDQ_DEPTH,
  parameter int EMQ_N  = EMQ_DEPTH,
  parameter int EMQ_NORMAL = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // decode
  input  logic     [W-1:0]      dec_valid,
  input  uop_t     [W-1:0]      dec_uop,
  output logic                  dec_ready,
  // dispatch
  output logic     [W-1:0]      disp_valid,
  output ren_uop_t [W-1:0]      disp_uop,
  input  logic                  disp_ready,
  // completion of runahead micro-ops
  input  logic     [W-1:0]      exec_valid,
  input  ra_id_t   [W-1:0]      exec_ra_id,
  // ROB head
  input  logic                  rob_full,
  input  logic                  rob_head_valid,
  input  logic                  rob_head_is_load,
  input  logic                  rob_head_llc_miss,
  input  logic                  rob_head_done,
  input  pc_t                   rob_head_pc,
  // normal-mode commit
  input  logic     [W-1:0]      commit_valid,
  input  ptag_t    [W-1:0]      commit_old_ptag,
  output logic                  commit_en,
  // mode and status
  output logic                  ra_mode,
  output logic                  ra_enter,
  output logic                  ra_exit,
  output logic [31:0]           n_ra_intervals,
  output logic [31:0]           n_ra_exits,
  output logic [31:0]           n_slice_dropped,
  output logic [$clog2(SST_N+1)-1:0]  sst_occupancy,
  output logic [$clog2(PRDQ_N+1)-1:0] prdq_count,
  output logic [$clog2(EMQ_N+1)-1:0]  emq_count,
  output logic                  emq_full,
  output logic [$clog2(NUM_PREGS+1)-1:0] int_free,
  output logic [$clog2(NUM_PREGS+1)-1:0] fp_free
);
  localparam int EW = $bits(emq_entry_t);

  // ---------------- runahead controller ----------------
  logic rename_block, stall_pc_valid;
  runahead_ctrl #(.CNT_W(32)) u_ctrl (
    .clk, .rst_n, .rob_full, .rob_head_valid, .rob_head_is_load,
    .rob_head_llc_miss, .rob_head_done,
    .ra_mode, .ra_enter, .ra_exit, .commit_en, .rename_block,
    .stall_pc_valid, .n_enter(n_ra_intervals), .n_exit(n_ra_exits));

  // ---------------- SST: lookups after decode and at the EMQ output ----------------
  logic [2*W-1:0]            sst_rd_valid, sst_hit_all;
  logic [2*W-1:0][PC_W-1:0]  sst_rd_pc;
  logic [W-1:0]              sst_hit, sst_hit_late;
  logic [SST_WR-1:0]            sst_wr_valid;
  logic [SST_WR-1:0][PC_W-1:0]  sst_wr_pc;
  logic [W-1:0][EW-1:0] emq_in, emq_out;
  logic [W-1:0]         emq_out_valid;
  emq_entry_t [W-1:0]   grp;
  always_comb
    for (int i = 0; i < W; i++) begin
      sst_rd_valid[i]   = dec_valid[i];
      sst_rd_pc[i]      = dec_uop[i].pc;
      sst_rd_valid[W+i] = emq_out_valid[i];
      sst_rd_pc[W+i]    = grp[i].uop.pc;
    end
  assign sst_hit      = sst_hit_all[W-1:0];
  assign sst_hit_late = sst_hit_all[2*W-1:W];

  sst #(.ENTRIES(SST_N), .N_RD(2*W), .N_WR(SST_WR), .PC_W(PC_W)) u_sst (
    .clk, .rst_n, .rd_valid(sst_rd_valid), .rd_pc(sst_rd_pc), .rd_hit(sst_hit_all),
    .wr_valid(sst_wr_valid), .wr_pc(sst_wr_pc), .occupancy(sst_occupancy));

  // ---------------- EMQ ----------------
  logic [$clog2(W+1)-1:0] emq_take;
  always_comb
    for (int i = 0; i < W; i++) emq_in[i] = EW'(emq_entry_t'{uop: dec_uop[i], in_slice: sst_hit[i]});

  emq #(.DEPTH(EMQ_N), .W(W), .DATA_W(EW), .NORMAL_CAP(EMQ_NORMAL)) u_emq (
    .clk, .rst_n, .ra_mode, .in_valid(dec_valid), .in_data(emq_in), .in_ready(dec_ready),
    .out_valid(emq_out_valid), .out_data(emq_out), .out_take(emq_take),
    .count(emq_count), .full(emq_full));

  // A micro-op is in a slice if it hit at decode or hits now: PCs added to
  // the SST after the micro-op was decoded are still honoured.
  logic [W-1:0] in_slice;
  always_comb
    for (int i = 0; i < W; i++) begin
      grp[i]      = emq_entry_t'(emq_out[i]);
      in_slice[i] = grp[i].in_slice || sst_hit_late[i];
    end

  // ---------------- rename group ----------------
  logic [W-1:0] act;          // renamed in this group
  logic [W-1:0] needs_reg;
  logic [W-1:0] reg_cls;
  logic [W-1:0][1:0] slot_rank; // index of the slot's grant in its class
  logic [2:0]   need_int, need_fp;
  logic [$clog2(W+1)-1:0] n_valid;
  always_comb begin
    need_int = '0;
    need_fp  = '0;
    n_valid  = '0;
    for (int i = 0; i < W; i++) begin
      act[i]       = emq_out_valid[i] && (!ra_mode || in_slice[i]);
      needs_reg[i] = act[i] && grp[i].uop.dst_valid;
      reg_cls[i]   = areg_class(grp[i].uop.dst);
      slot_rank[i] = reg_cls[i] ? need_fp[1:0] : need_int[1:0];
      if (needs_reg[i]) begin
        if (reg_cls[i]) need_fp  = need_fp + 1'b1;
        else            need_int = need_int + 1'b1;
      end
      if (emq_out_valid[i]) n_valid = n_valid + 1'b1;
    end
  end

  // free lists
  logic [W-1:0]              fli_ok, flf_ok;
  logic [W-1:0][PIDX_W-1:0]  fli_idx, flf_idx;
  logic [2*W-1:0]            fli_free_v, flf_free_v;
  logic [2*W-1:0][PIDX_W-1:0] fl_free_idx;
  logic [W-1:0]              prdq_free_v;
  ptag_t [W-1:0]             prdq_free_tag;
  logic                      fire;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      fli_free_v[i]      = commit_en && commit_valid[i] && !commit_old_ptag[i][PTAG_W-1];
      flf_free_v[i]      = commit_en && commit_valid[i] &&  commit_old_ptag[i][PTAG_W-1];
      fl_free_idx[i]     = commit_old_ptag[i][PIDX_W-1:0];
      fli_free_v[W+i]    = prdq_free_v[i] && !prdq_free_tag[i][PTAG_W-1];
      flf_free_v[W+i]    = prdq_free_v[i] &&  prdq_free_tag[i][PTAG_W-1];
      fl_free_idx[W+i]   = prdq_free_tag[i][PIDX_W-1:0];
    end
  end

  free_list #(.N(NUM_PREGS), .W(W), .NFREE(2*W), .INIT_USED(ARCH_PER_CLASS)) u_fl_int (
    .clk, .rst_n, .alloc_ok(fli_ok), .alloc_idx(fli_idx),
    .alloc_take(fire ? need_int : '0), .free_valid(fli_free_v), .free_idx(fl_free_idx),
    .ckpt_save(ra_enter), .ckpt_restore(ra_exit), .num_free(int_free));
  free_list #(.N(NUM_PREGS), .W(W), .NFREE(2*W), .INIT_USED(ARCH_PER_CLASS)) u_fl_fp (
    .clk, .rst_n, .alloc_ok(flf_ok), .alloc_idx(flf_idx),
    .alloc_take(fire ? need_fp : '0), .free_valid(flf_free_v), .free_idx(fl_free_idx),
    .ckpt_save(ra_enter), .ckpt_restore(ra_exit), .num_free(fp_free));

  ptag_t [W-1:0] new_ptag;
  always_comb
    for (int i = 0; i < W; i++)
      new_ptag[i] = reg_cls[i] ? {1'b1, flf_idx[slot_rank[i]]} : {1'b0, fli_idx[slot_rank[i]]};

  logic regs_ok, prdq_ready, disp_ok;
  assign regs_ok = (need_int == 0 || fli_ok[need_int-1]) && (need_fp == 0 || flf_ok[need_fp-1]);
  assign disp_ok = (act == '0) || disp_ready;
  assign fire    = emq_out_valid[0] && !rename_block && regs_ok && disp_ok &&
                   (!ra_mode || prdq_ready);
  assign emq_take = fire ? n_valid : '0;

  // RAT
  logic [W-1:0][PC_W-1:0]         r_pc;
  logic [W-1:0][1:0]              r_src_valid;
  logic [W-1:0][1:0][AREG_W-1:0]  r_src;
  logic [W-1:0]                   r_dst_valid;
  logic [W-1:0][AREG_W-1:0]       r_dst;
  logic [W-1:0][1:0][PTAG_W-1:0]  psrc;
  logic [W-1:0][1:0]              prod_valid;
  logic [W-1:0][1:0][PC_W-1:0]    prod_pc;
  logic [W-1:0][PTAG_W-1:0]       old_pdst;
  logic [W-1:0]                   old_is_ra;
  always_comb
    for (int i = 0; i < W; i++) begin
      r_pc[i]        = grp[i].uop.pc;
      r_src_valid[i] = grp[i].uop.src_valid;
      r_src[i][0]    = grp[i].uop.src0;
      r_src[i][1]    = grp[i].uop.src1;
      r_dst_valid[i] = grp[i].uop.dst_valid;
      r_dst[i]       = grp[i].uop.dst;
    end

  rat #(.NREG(NUM_AREGS), .W(W), .PTAG_W(PTAG_W), .PC_W(PC_W)) u_rat (
    .clk, .rst_n, .ra_mode, .ren_fire(fire), .ren_valid(act), .ren_pc(r_pc),
    .ren_src_valid(r_src_valid), .ren_src(r_src), .ren_dst_valid(r_dst_valid),
    .ren_dst(r_dst), .ren_new_ptag(new_ptag), .psrc, .prod_pc_valid(prod_valid),
    .prod_pc, .old_pdst, .old_is_ra, .ckpt_save(ra_enter), .ckpt_restore(ra_exit));

  // runahead ids and PRDQ
  ra_id_t ra_id_next;
  ra_id_t [W-1:0] slot_id;
  logic [2:0] n_act;
  always_comb begin
    n_act = '0;
    for (int i = 0; i < W; i++) begin
      slot_id[i] = ra_id_next + ra_id_t'(n_act);
      if (act[i]) n_act = n_act + 1'b1;
    end
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                ra_id_next <= '0;
    else if (fire && ra_mode)  ra_id_next <= ra_id_next + ra_id_t'(n_act);

  logic [W-1:0] prdq_alloc_v, prdq_has_reg, prdq_exec_v;
  always_comb
    for (int i = 0; i < W; i++) begin
      prdq_alloc_v[i] = fire && ra_mode && act[i];
      prdq_has_reg[i] = grp[i].uop.dst_valid && old_is_ra[i];
      prdq_exec_v[i]  = exec_valid[i] && ra_mode;
    end

  prdq #(.DEPTH(PRDQ_N), .W(W), .ID_W(RA_ID_W), .TAG_W(PTAG_W)) u_prdq (
    .clk, .rst_n, .flush(ra_exit), .alloc_valid(prdq_alloc_v), .alloc_id(slot_id),
    .alloc_has_reg(prdq_has_reg), .alloc_tag(old_pdst), .alloc_ready(prdq_ready),
    .exec_valid(prdq_exec_v), .exec_id(exec_ra_id), .free_valid(prdq_free_v),
    .free_tag(prdq_free_tag), .count(prdq_count));

  // slice tracking into the SST
  logic [W-1:0] slice_fire;
  always_comb for (int i = 0; i < W; i++) slice_fire[i] = fire && act[i] && in_slice[i];

  slice_tracker #(.W(W), .N_WR(SST_WR), .PC_W(PC_W), .CNT_W(32)) u_track (
    .clk, .rst_n, .stall_valid(stall_pc_valid), .stall_pc(rob_head_pc), .slice_fire,
    .prod_valid, .prod_pc, .wr_valid(sst_wr_valid), .wr_pc(sst_wr_pc),
    .n_dropped(n_slice_dropped));

  // dispatch
  always_comb
    for (int i = 0; i < W; i++) begin
      disp_valid[i] = fire && act[i];
      disp_uop[i]   = '{uop: grp[i].uop, in_slice: in_slice[i],
                        psrc1: psrc[i][1], psrc0: psrc[i][0],
                        pdst: grp[i].uop.dst_valid ? new_ptag[i] : '0,
                        old_pdst: old_pdst[i], runahead: ra_mode, ra_id: slot_id[i]};
    end

endmodule
