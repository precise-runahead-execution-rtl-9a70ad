// prdq: Precise Register Deallocation Queue.
//
// Frees physical registers in runahead mode, where micro-ops never commit.
// Each runahead micro-op that is renamed gets an entry, in program order at
// the tail, holding its instruction id, the physical register that its
// destination mapping replaced, and an 'execute' bit. Finishing execution
// sets the execute bit (out of order, found by id). Entries leave from the
// head, in order, once their execute bit is set; the register they hold is
// then returned to the free list. Because a register is only released after
// every older runahead micro-op has executed, no micro-op still in flight
// can read it. An entry may carry no register (alloc_has_reg = 0), for a
// micro-op without a destination or whose replaced mapping must survive
// runahead mode. flush discards every entry (runahead exit).
//
// Interface and timing:
//  * alloc: up to W entries per cycle, valid slots taken in slot order;
//    the caller must allocate only while alloc_ready (room for W entries).
//  * exec: up to W ids per cycle; the bit is set at the clock edge, so the
//    entry can leave one cycle later at the earliest.
//  * free: up to W registers per cycle (combinational from the head of the
//    queue; entries leave at the clock edge). free_valid is low on flush.
// Queue structure, fields and port counts follow the source; id width,
// register tag width, same-cycle ordering and the flush behaviour are this
// design's choices.
module prdq #(
  parameter int DEPTH = 192,
  parameter int W     = 4,
  parameter int ID_W  = 8,
  parameter int TAG_W = 9
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      flush,
  input  logic [W-1:0]              alloc_valid,
  input  logic [W-1:0][ID_W-1:0]    alloc_id,
  input  logic [W-1:0]              alloc_has_reg,
  input  logic [W-1:0][TAG_W-1:0]   alloc_tag,
  output logic                      alloc_ready,
  input  logic [W-1:0]              exec_valid,
  input  logic [W-1:0][ID_W-1:0]    exec_id,
  output logic [W-1:0]              free_valid,
  output logic [W-1:0][TAG_W-1:0]   free_tag,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PTR_W = $clog2(DEPTH);
  localparam int CNT_W = $clog2(DEPTH+1);

  typedef struct packed {
    logic [ID_W-1:0]  id;
    logic             has_reg;
    logic [TAG_W-1:0] tag;
  } entry_t;

  entry_t [DEPTH-1:0] mem;
  logic   [DEPTH-1:0] live;   // entry allocated and not yet released
  logic   [DEPTH-1:0] execd;  // the 'execute' bit
  logic [PTR_W-1:0] head, tail;

  function automatic logic [PTR_W-1:0] wrap_add(logic [PTR_W-1:0] p, int unsigned n);
    int unsigned s;
    s = int'(p) + n;
    if (s >= DEPTH) s = s - DEPTH;
    return PTR_W'(s);
  endfunction

  // In-order release from the head.
  logic [$clog2(W+1)-1:0] n_rel;
  always_comb begin
    logic stop;
    logic [PTR_W-1:0] p;
    stop  = 1'b0;
    n_rel = '0;
    free_valid = '0;
    free_tag   = '0;
    for (int i = 0; i < W; i++) begin
      p = wrap_add(head, i);
      if (!stop && CNT_W'(i) < count && execd[p] && !flush) begin
        n_rel = n_rel + 1'b1;
        free_valid[i] = mem[p].has_reg;
        free_tag[i]   = mem[p].tag;
      end else begin
        stop = 1'b1;
      end
    end
  end

  logic [$clog2(W+1)-1:0] n_alloc;
  always_comb begin
    n_alloc = '0;
    for (int i = 0; i < W; i++) n_alloc = n_alloc + alloc_valid[i];
  end

  assign alloc_ready = (count <= CNT_W'(DEPTH - W));

  // Slot of each allocating input (valid slots compacted in slot order).
  logic [W-1:0][PTR_W-1:0] alloc_slot;
  always_comb begin
    logic [$clog2(W+1)-1:0] k;
    k = '0;
    for (int i = 0; i < W; i++) begin
      alloc_slot[i] = wrap_add(tail, 32'(k));
      if (alloc_valid[i]) k = k + 1'b1;
    end
  end

  // Entry payload: no reset needed, read only while the entry is live.
  always_ff @(posedge clk)
    for (int i = 0; i < W; i++)
      if (alloc_valid[i] && !flush)
        mem[alloc_slot[i]] <= '{id: alloc_id[i], has_reg: alloc_has_reg[i], tag: alloc_tag[i]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      live  <= '0;
      execd <= '0;
    end else if (flush) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      live  <= '0;
      execd <= '0;
    end else begin
      // Set execute bits of live entries whose id matches.
      for (int e = 0; e < DEPTH; e++)
        for (int j = 0; j < W; j++)
          if (exec_valid[j] && live[e] && mem[e].id == exec_id[j]) execd[e] <= 1'b1;
      // Release.
      for (int i = 0; i < W; i++)
        if (i < int'(n_rel)) begin
          live[wrap_add(head, i)]  <= 1'b0;
          execd[wrap_add(head, i)] <= 1'b0;
        end
      // Allocate.
      for (int i = 0; i < W; i++)
        if (alloc_valid[i]) begin
          live[alloc_slot[i]]  <= 1'b1;
          execd[alloc_slot[i]] <= 1'b0;
        end
      head  <= wrap_add(head, 32'(n_rel));
      tail  <= wrap_add(tail, 32'(n_alloc));
      count <= count + CNT_W'(n_alloc) - CNT_W'(n_rel);
    end
  end

  // The caller never allocates past the end of the queue.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (|alloc_valid && !flush) |-> alloc_ready);

endmodule
