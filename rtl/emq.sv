// emq: Extended Micro-Op Queue.
//
// The micro-op queue between decode and rename, enlarged so that it can keep
// every micro-op decoded while the core runs ahead. In normal mode it is a
// plain in-order queue: rename reads from the head and consumed entries are
// freed. In runahead mode rename reads through a second pointer, the
// runahead pointer, which starts at the head and moves ahead of it; the
// entries it passes are kept. When the core returns to normal mode the head
// has not moved, so the micro-ops seen in runahead mode are dispatched again
// from the queue without being fetched and decoded a second time. In normal
// mode the queue only admits up to NORMAL_CAP entries, the size of an
// ordinary micro-op queue; the extra capacity is used only while running
// ahead. When the queue is full, decode stalls until runahead mode ends.
//
// Interface and timing:
//  * in_valid/in_data: up to W entries per cycle, slots filled from 0,
//    accepted only while in_ready (room for W entries within NORMAL_CAP in
//    normal mode, within DEPTH in runahead mode).
//  * out_valid/out_data: the W entries at the read pointer (the head in
//    normal mode, the runahead pointer in runahead mode), asynchronous read.
//  * out_take: how many of them, from slot 0, are consumed at the clock edge.
//  * ra_mode is sampled each cycle; while it is low the runahead pointer
//    follows the head.
//  * full: the whole queue (DEPTH) has no room for another group of W.
// 768 entries and 4 read and 4 write ports are the evaluated configuration;
// the two-pointer organisation and the normal-mode capacity (64) are this
// design's choices.
module emq #(
  parameter int DEPTH  = 768,
  parameter int W      = 4,
  parameter int DATA_W = 64,
  parameter int NORMAL_CAP = 64
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ra_mode,
  input  logic [W-1:0]                in_valid,
  input  logic [W-1:0][DATA_W-1:0]    in_data,
  output logic                        in_ready,
  output logic [W-1:0]                out_valid,
  output logic [W-1:0][DATA_W-1:0]    out_data,
  input  logic [$clog2(W+1)-1:0]      out_take,
  output logic [$clog2(DEPTH+1)-1:0]  count,
  output logic                        full
);
  localparam int PTR_W = $clog2(DEPTH);
  localparam int CNT_W = $clog2(DEPTH+1);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  head, tail, ra_ptr;
  logic [CNT_W-1:0]  ra_count;   // entries between the runahead pointer and the tail

  function automatic logic [PTR_W-1:0] wrap_add(logic [PTR_W-1:0] p, int unsigned n);
    int unsigned s;
    s = int'(p) + n;
    if (s >= DEPTH) s = s - DEPTH;
    return PTR_W'(s);
  endfunction

  logic [$clog2(W+1)-1:0] n_in;
  always_comb begin
    n_in = '0;
    for (int i = 0; i < W; i++) n_in = n_in + in_valid[i];
  end

  assign in_ready = (count <= CNT_W'((ra_mode ? DEPTH : NORMAL_CAP) - W));
  assign full     = (count > CNT_W'(DEPTH - W));

  logic [PTR_W-1:0] rd_ptr;
  logic [CNT_W-1:0] rd_avail;
  assign rd_ptr   = ra_mode ? ra_ptr   : head;
  assign rd_avail = ra_mode ? ra_count : count;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      out_valid[i] = CNT_W'(i) < rd_avail;
      out_data[i]  = mem[wrap_add(rd_ptr, i)];
    end
  end

  logic [CNT_W-1:0] n_push;
  assign n_push = (in_ready ? CNT_W'(n_in) : '0);

  always_ff @(posedge clk) begin
    logic [PTR_W-1:0] k;
    k = '0;
    for (int i = 0; i < W; i++) begin
      if (in_valid[i] && in_ready) begin
        mem[wrap_add(tail, 32'(k))] <= in_data[i];
        k = k + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head     <= '0;
      tail     <= '0;
      ra_ptr   <= '0;
      count    <= '0;
      ra_count <= '0;
    end else begin
      tail <= wrap_add(tail, 32'(n_push));
      if (ra_mode) begin
        count    <= count + n_push;
        ra_ptr   <= wrap_add(ra_ptr, 32'(out_take));
        ra_count <= ra_count + n_push - CNT_W'(out_take);
      end else begin
        head     <= wrap_add(head, 32'(out_take));
        ra_ptr   <= wrap_add(head, 32'(out_take));
        count    <= count + n_push - CNT_W'(out_take);
        ra_count <= count + n_push - CNT_W'(out_take);
      end
    end
  end

  a_take_le_avail: assert property (@(posedge clk) disable iff (!rst_n)
    CNT_W'(out_take) <= rd_avail);

endmodule
