// slice_tracker: selects the PCs written into the stalling slice table.
//
// Stalling slices are learned one step per loop iteration. The stalling
// load itself is inserted when it blocks the ROB (stall_valid, from the
// runahead controller at entry). Afterwards, each renamed micro-op that hit
// in the SST offers the PCs of the last producers of its source registers,
// read from the extended RAT; adding them grows the slice backwards by one
// instruction per iteration.
//
// A rename group of W micro-ops can offer 2*W producer PCs, but the table
// has N_WR write ports. The stalling load PC always gets a port; the
// producer PCs share the rest, scanned from a rotating start so that a
// candidate dropped in one iteration is taken in a later one. Dropping is
// harmless: slice tracking is a hint and the next iteration offers the same
// PCs again. The write-port count is the source's; the selection rule is
// this design's. Combinational select; the rotating start and the drop
// counter update at the clock edge.
module slice_tracker #(
  parameter int W     = 4,
  parameter int N_WR  = 2,
  parameter int PC_W  = 32,
  parameter int CNT_W = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        stall_valid,
  input  logic [PC_W-1:0]             stall_pc,
  input  logic [W-1:0]                slice_fire,    // renamed and hit in the SST
  input  logic [W-1:0][1:0]           prod_valid,
  input  logic [W-1:0][1:0][PC_W-1:0] prod_pc,
  output logic [N_WR-1:0]             wr_valid,
  output logic [N_WR-1:0][PC_W-1:0]   wr_pc,
  output logic [CNT_W-1:0]            n_dropped
);
  localparam int NC    = 2 * W;
  localparam int RR_W  = $clog2(NC);

  logic [RR_W-1:0] rr;
  logic [RR_W-1:0] rr_next;
  logic [$clog2(NC+1)-1:0] n_drop;

  always_comb begin
    logic [$clog2(N_WR+1)-1:0] port;
    logic [RR_W:0]             c;
    port     = '0;
    wr_valid = '0;
    wr_pc    = '0;
    n_drop   = '0;
    rr_next  = rr;
    if (stall_valid) begin
      wr_valid[0] = 1'b1;
      wr_pc[0]    = stall_pc;
      port        = ($clog2(N_WR+1))'(1);
    end
    for (int k = 0; k < NC; k++) begin
      c = (RR_W+1)'(rr) + (RR_W+1)'(k);
      if (c >= (RR_W+1)'(NC)) c = c - (RR_W+1)'(NC);
      if (slice_fire[c[RR_W-1:1]] && prod_valid[c[RR_W-1:1]][c[0]]) begin
        if (port < ($clog2(N_WR+1))'(N_WR)) begin
          for (int q = 0; q < N_WR; q++)
            if (port == ($clog2(N_WR+1))'(q)) begin
              wr_valid[q] = 1'b1;
              wr_pc[q]    = prod_pc[c[RR_W-1:1]][c[0]];
            end
          port           = port + 1'b1;
          rr_next        = (c == (RR_W+1)'(NC-1)) ? '0 : RR_W'(c + 1'b1);
        end else begin
          n_drop = n_drop + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr        <= '0;
      n_dropped <= '0;
    end else begin
      if (n_drop != 0) rr <= rr_next;
      n_dropped <= n_dropped + CNT_W'(n_drop);
    end
  end

endmodule
