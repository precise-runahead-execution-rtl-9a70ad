// sst: Stalling Slice Table.
//
// A fully associative cache of instruction addresses. A PC that is present
// belongs to a stalling slice: the chain of instructions that computes the
// address of a load that once blocked the ROB. The table holds only tags
// (4-byte PCs), with true LRU replacement, as the evaluated configuration
// specifies (256 entries, 8 read ports, 2 write ports).
//
// Interface and timing:
//  * Lookups (rd_valid/rd_pc -> rd_hit) are combinational against the table
//    as it stands at the start of the cycle. A hit makes the entry most
//    recently used at the clock edge.
//  * Inserts (wr_valid/wr_pc) take effect at the clock edge. A PC already
//    present is only refreshed; otherwise the least recently used entry is
//    replaced. Two inserts of the same PC in one cycle use one entry. An
//    insert is not visible to lookups in the same cycle.
//  * occupancy counts valid entries.
//
// LRU is kept as a rank per entry (0 = least, ENTRIES-1 = most recently
// used); the ranks always form a permutation. Touching an entry moves it to
// the top and shifts every entry above its old rank down by one. Reset gives
// entry i rank i with all entries invalid; invalid entries are never touched,
// so they always sit below every valid entry and are replaced first. Read
// hits are applied before inserts, read ports and write ports in index order.
// The LRU policy and this ordering are this design's choice of how to
// realise "fully assoc, LRU"; the source gives no circuit.
module sst #(
  parameter int ENTRIES = 256,
  parameter int N_RD    = 8,
  parameter int N_WR    = 2,
  parameter int PC_W    = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_RD-1:0]              rd_valid,
  input  logic [N_RD-1:0][PC_W-1:0]    rd_pc,
  output logic [N_RD-1:0]              rd_hit,
  input  logic [N_WR-1:0]              wr_valid,
  input  logic [N_WR-1:0][PC_W-1:0]    wr_pc,
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);
  localparam int IDX_W = $clog2(ENTRIES);
  localparam int CNT_W = $clog2(ENTRIES+1);

  logic [ENTRIES-1:0]            valid_q, valid_d;
  logic [ENTRIES-1:0][PC_W-1:0]  tag_q,   tag_d;
  logic [ENTRIES-1:0][IDX_W-1:0] rank_q,  rank_d;
  logic [N_RD-1:0][IDX_W-1:0]    rd_idx;

  // Lookup against the registered table.
  always_comb begin
    for (int p = 0; p < N_RD; p++) begin
      rd_hit[p] = 1'b0;
      rd_idx[p] = '0;
      for (int e = 0; e < ENTRIES; e++) begin
        if (rd_valid[p] && valid_q[e] && tag_q[e] == rd_pc[p]) begin
          rd_hit[p] = 1'b1;
          rd_idx[p] = IDX_W'(e);
        end
      end
    end
  end

  // Next state: read-hit touches, then inserts, applied in order.
  always_comb begin
    logic [IDX_W-1:0] r;
    logic [IDX_W-1:0] sel;
    logic             found;
    r       = '0;
    sel     = '0;
    found   = 1'b0;
    valid_d = valid_q;
    tag_d   = tag_q;
    rank_d  = rank_q;
    for (int p = 0; p < N_RD; p++) begin
      if (rd_hit[p]) begin
        r = rank_d[rd_idx[p]];
        for (int e = 0; e < ENTRIES; e++)
          if (rank_d[e] > r) rank_d[e] = rank_d[e] - 1'b1;
        rank_d[rd_idx[p]] = IDX_W'(ENTRIES-1);
      end
    end
    for (int p = 0; p < N_WR; p++) begin
      if (wr_valid[p]) begin
        found = 1'b0;
        sel   = '0;
        for (int e = 0; e < ENTRIES; e++) begin
          if (valid_d[e] && tag_d[e] == wr_pc[p]) begin
            found = 1'b1;
            sel   = IDX_W'(e);
          end
        end
        if (!found) begin
          for (int e = 0; e < ENTRIES; e++)
            if (rank_d[e] == '0) sel = IDX_W'(e);
          valid_d[sel] = 1'b1;
          tag_d[sel]   = wr_pc[p];
        end
        r = rank_d[sel];
        for (int e = 0; e < ENTRIES; e++)
          if (rank_d[e] > r) rank_d[e] = rank_d[e] - 1'b1;
        rank_d[sel] = IDX_W'(ENTRIES-1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      tag_q   <= '0;
      for (int e = 0; e < ENTRIES; e++) rank_q[e] <= IDX_W'(e);
    end else begin
      valid_q <= valid_d;
      tag_q   <= tag_d;
      rank_q  <= rank_d;
    end
  end

  always_comb begin
    occupancy = '0;
    for (int e = 0; e < ENTRIES; e++) occupancy = occupancy + CNT_W'(valid_q[e]);
  end

endmodule
