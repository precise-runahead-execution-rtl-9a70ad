// runahead_ctrl: mode controller for precise runahead.
//
// Normal mode until a full-window stall: the ROB is full and its oldest
// micro-op is a load that missed in the last-level cache and has not
// returned. The controller then enters runahead mode for one interval:
// it pulses ra_enter (checkpoint the RAT and free lists, store the stalling
// load's PC in the SST) and holds ra_mode, during which nothing commits.
// The ROB is left intact. When the stalling load returns (rob_head_done)
// it pulses ra_exit (restore the checkpoints, drop runahead micro-ops and
// the PRDQ) and returns to normal mode, where commit resumes at once with
// the stalling load.
//
// Interface and timing: ra_enter and ra_exit are combinational one-cycle
// pulses in the cycle the condition is seen; ra_mode changes at the
// following clock edge. rename_block is high in both pulse cycles so that
// no renaming overlaps a checkpoint or a restore (this design's choice).
// stall_pc_valid asks for the ROB head PC to be written into the SST on
// entry. Counters n_enter and n_exit count intervals. The entry and exit
// conditions and the blocking of commit are those of the PRE scheme; there
// is deliberately no filter for short intervals, since entering costs no
// flush.
module runahead_ctrl #(
  parameter int CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rob_full,
  input  logic             rob_head_valid,
  input  logic             rob_head_is_load,
  input  logic             rob_head_llc_miss,
  input  logic             rob_head_done,
  output logic             ra_mode,
  output logic             ra_enter,
  output logic             ra_exit,
  output logic             commit_en,
  output logic             rename_block,
  output logic             stall_pc_valid,
  output logic [CNT_W-1:0] n_enter,
  output logic [CNT_W-1:0] n_exit
);
  typedef enum logic {NORMAL, RUNAHEAD} mode_e;
  mode_e mode;

  logic full_window_stall;
  assign full_window_stall = rob_full && rob_head_valid && rob_head_is_load &&
                             rob_head_llc_miss && !rob_head_done;

  assign ra_mode        = (mode == RUNAHEAD);
  assign ra_enter       = (mode == NORMAL) && full_window_stall;
  assign ra_exit        = (mode == RUNAHEAD) && rob_head_done;
  assign commit_en      = (mode == NORMAL) && !ra_enter;
  assign rename_block   = ra_enter || ra_exit;
  assign stall_pc_valid = ra_enter;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode    <= NORMAL;
      n_enter <= '0;
      n_exit  <= '0;
    end else begin
      if (ra_enter) begin
        mode    <= RUNAHEAD;
        n_enter <= n_enter + 1'b1;
      end else if (ra_exit) begin
        mode    <= NORMAL;
        n_exit  <= n_exit + 1'b1;
      end
    end
  end

  // The stalling load stays at the ROB head for the whole interval.
  a_head_kept: assert property (@(posedge clk) disable iff (!rst_n)
    ra_mode |-> rob_head_valid);

endmodule
