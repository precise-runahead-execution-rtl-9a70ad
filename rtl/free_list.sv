// free_list: free physical registers of one register class.
//
// A bit per physical register, set while it is free. Each cycle the W
// lowest-numbered free registers are offered (alloc_idx, alloc_ok); the
// caller takes a prefix of them with alloc_take. Released registers come
// back through NFREE ports (normal-mode commit and the runahead PRDQ).
// ckpt_save copies the bitmap on runahead entry and ckpt_restore puts it
// back on exit: no register is released by commit during runahead mode, so
// the restore returns exactly the registers that runahead micro-ops took,
// including those still held by PRDQ entries that are then discarded.
//
// Reset: registers 0..INIT_USED-1 hold the initial architectural mappings,
// the rest are free. Timing: offers are combinational; takes, releases and
// checkpoints act at the clock edge; a restore overrides the other updates
// of that cycle.
// The source only says that renaming maps a free physical register; the
// bitmap organisation and the checkpoint are this design's.
module free_list #(
  parameter int N         = 168,
  parameter int W         = 4,
  parameter int NFREE     = 8,
  parameter int INIT_USED = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  output logic [W-1:0]                  alloc_ok,
  output logic [W-1:0][$clog2(N)-1:0]   alloc_idx,
  input  logic [$clog2(W+1)-1:0]        alloc_take,
  input  logic [NFREE-1:0]              free_valid,
  input  logic [NFREE-1:0][$clog2(N)-1:0] free_idx,
  input  logic                          ckpt_save,
  input  logic                          ckpt_restore,
  output logic [$clog2(N+1)-1:0]        num_free
);
  localparam int IDX_W = $clog2(N);
  localparam int CNT_W = $clog2(N+1);

  logic [N-1:0] free_q, ckpt_q;

  always_comb begin
    int unsigned k;
    k = 0;
    alloc_ok  = '0;
    alloc_idx = '0;
    for (int e = 0; e < N; e++) begin
      if (free_q[e] && k < W) begin
        alloc_ok[k]  = 1'b1;
        alloc_idx[k] = IDX_W'(e);
        k = k + 1;
      end
    end
  end

  always_comb begin
    num_free = '0;
    for (int e = 0; e < N; e++) num_free = num_free + CNT_W'(free_q[e]);
  end

  logic [N-1:0] free_d;
  always_comb begin
    free_d = free_q;
    for (int i = 0; i < W; i++)
      if (i < int'(alloc_take)) free_d[alloc_idx[i]] = 1'b0;
    for (int j = 0; j < NFREE; j++)
      if (free_valid[j]) free_d[free_idx[j]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N; e++) free_q[e] <= (e >= INIT_USED);
      ckpt_q <= '0;
    end else begin
      if (ckpt_save) ckpt_q <= free_q;
      free_q <= ckpt_restore ? ckpt_q : free_d;
    end
  end

  a_take_offered: assert property (@(posedge clk) disable iff (!rst_n)
    (alloc_take == 0) || alloc_ok[alloc_take-1]);

endmodule
