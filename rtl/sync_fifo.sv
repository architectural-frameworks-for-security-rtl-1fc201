// sync_fifo: the FIFO queue between one application processor and the MONITOR.
//
// A single-clock circular buffer of DEPTH words of WIDTH bits with Full and
// Empty flags. The writer (a checkpoint instruction) must stall while full is
// high and the reader (the MONITOR loop) only pops while empty is low; the
// assertions below state both rules. The head word is visible on rdata while
// empty is low (first-word fall-through). Push and pop in the same cycle are
// allowed. Depth and width are this design's choices.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  assign full  = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty = (cnt == '0);
  assign level = cnt;
  assign rdata = mem[rp];

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push && !full) wp <= nxt(wp);
      if (pop && !empty) rp <= nxt(rp);
      cnt <= cnt + ($clog2(DEPTH+1))'(push && !full) - ($clog2(DEPTH+1))'(pop && !empty);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("sync_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("sync_fifo: pop while empty");

endmodule
