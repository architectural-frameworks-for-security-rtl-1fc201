// bb_table: the MONITOR's hardware storage table for one application
// processor.
//
// One bb_entry_t per basic block, indexed by block ID: its valid successors
// (the control-flow graph from static analysis) and its limits, Tmin/Tmax
// cycles for tCUFFS or the exact instruction count for iCUFFS. The tables are
// fixed for a given program; here they are filled through a write port before
// the program starts, which plays the part of the loader. A block ID outside
// 0..DEPTH-1 or never written reads as not valid, so a SID that decrypts to an
// unknown block fails the control-flow check. Valid bits are reset; the entry
// array is not.
//
// Two asynchronous read ports (current block and previous block), one
// synchronous write port.
module bb_table
  import cuffs_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      wr_en,
  input  bid_t      wr_bid,
  input  bb_entry_t wr_entry,
  input  bid_t      ra_bid,
  output bb_entry_t ra_entry,
  output logic      ra_valid,
  input  bid_t      rb_bid,
  output bb_entry_t rb_entry,
  output logic      rb_valid
);

  localparam int AW = $clog2(DEPTH);

  bb_entry_t       mem [DEPTH];
  logic [DEPTH-1:0] vld;

  wire wr_in = (32'(wr_bid) < DEPTH);
  wire a_in  = (32'(ra_bid) < DEPTH);
  wire b_in  = (32'(rb_bid) < DEPTH);

  always_ff @(posedge clk) begin
    if (wr_en && wr_in) mem[wr_bid[AW-1:0]] <= wr_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (wr_en && wr_in) vld[wr_bid[AW-1:0]] <= 1'b1;
  end

  assign ra_entry = mem[ra_bid[AW-1:0]];
  assign ra_valid = a_in && vld[ra_bid[AW-1:0]];
  assign rb_entry = mem[rb_bid[AW-1:0]];
  assign rb_valid = b_in && vld[rb_bid[AW-1:0]];

endmodule
