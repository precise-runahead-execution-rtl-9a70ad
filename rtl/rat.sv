// rat: register allocation table extended for precise runahead.
//
// Maps each architectural register to its current physical register and,
// as the runahead scheme requires, also to the PC of the instruction that
// last wrote it. Slice tracking reads those PCs: when a micro-op that is
// part of a stalling slice is renamed, the PCs of the producers of its
// sources are the next instructions to add to the slice. A third field per
// entry records whether the current mapping was created in runahead mode;
// the PRDQ only releases a replaced register if it was (a mapping made
// before runahead entry is still needed after exit).
//
// A group of up to W micro-ops is renamed per cycle. Sources see the
// destinations of older micro-ops in the same group (the producer PC is then
// that micro-op's PC). ckpt_save copies the table on runahead entry and
// ckpt_restore puts it back on exit.
//
// Interface and timing: lookups (psrc, prod_pc, old_pdst, old_is_ra) are
// combinational; the table is written at the clock edge when ren_fire is
// high, for every slot with ren_valid and dst_valid. Reset maps
// architectural register r to physical index r of its class (r[MSB] picks
// the class) with no known producer. A restore overrides a rename in the
// same cycle. The table size (64 entries, +4 bytes of PC each) and the
// checkpoint follow the source; the rest is this design's.
module rat #(
  parameter int NREG   = 64,
  parameter int W      = 4,
  parameter int PTAG_W = 9,
  parameter int PC_W   = 32
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 ra_mode,
  input  logic                                 ren_fire,
  input  logic [W-1:0]                         ren_valid,
  input  logic [W-1:0][PC_W-1:0]               ren_pc,
  input  logic [W-1:0][1:0]                    ren_src_valid,
  input  logic [W-1:0][1:0][$clog2(NREG)-1:0]  ren_src,
  input  logic [W-1:0]                         ren_dst_valid,
  input  logic [W-1:0][$clog2(NREG)-1:0]       ren_dst,
  input  logic [W-1:0][PTAG_W-1:0]             ren_new_ptag,
  output logic [W-1:0][1:0][PTAG_W-1:0]        psrc,
  output logic [W-1:0][1:0]                    prod_pc_valid,
  output logic [W-1:0][1:0][PC_W-1:0]          prod_pc,
  output logic [W-1:0][PTAG_W-1:0]             old_pdst,
  output logic [W-1:0]                         old_is_ra,
  input  logic                                 ckpt_save,
  input  logic                                 ckpt_restore
);
  localparam int AREG_W = $clog2(NREG);

  typedef struct packed {
    logic [PTAG_W-1:0] ptag;
    logic              pc_valid;
    logic [PC_W-1:0]   pc;
    logic              ra;
  } map_t;

  map_t [NREG-1:0] map_q, ckpt_q;

  // Lookups with same-group bypass from older slots.
  always_comb begin
    for (int i = 0; i < W; i++) begin
      for (int s = 0; s < 2; s++) begin
        psrc[i][s]          = map_q[ren_src[i][s]].ptag;
        prod_pc_valid[i][s] = map_q[ren_src[i][s]].pc_valid & ren_src_valid[i][s];
        prod_pc[i][s]       = map_q[ren_src[i][s]].pc;
        for (int j = 0; j < i; j++) begin
          if (ren_valid[j] && ren_dst_valid[j] && ren_dst[j] == ren_src[i][s]) begin
            psrc[i][s]          = ren_new_ptag[j];
            prod_pc_valid[i][s] = ren_src_valid[i][s];
            prod_pc[i][s]       = ren_pc[j];
          end
        end
      end
      old_pdst[i]  = map_q[ren_dst[i]].ptag;
      old_is_ra[i] = map_q[ren_dst[i]].ra;
      for (int j = 0; j < i; j++) begin
        if (ren_valid[j] && ren_dst_valid[j] && ren_dst[j] == ren_dst[i]) begin
          old_pdst[i]  = ren_new_ptag[j];
          old_is_ra[i] = ra_mode;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) begin
        map_q[r] <= '{ptag: PTAG_W'({r[AREG_W-1], (PTAG_W-1)'(r[AREG_W-2:0])}),
                      pc_valid: 1'b0, pc: '0, ra: 1'b0};
      end
      ckpt_q <= '0;
    end else begin
      if (ckpt_save) ckpt_q <= map_q;
      if (ckpt_restore) begin
        map_q <= ckpt_q;
      end else if (ren_fire) begin
        for (int i = 0; i < W; i++)
          if (ren_valid[i] && ren_dst_valid[i])
            map_q[ren_dst[i]] <= '{ptag: ren_new_ptag[i], pc_valid: 1'b1, pc: ren_pc[i], ra: ra_mode};
      end
    end
  end

endmodule
