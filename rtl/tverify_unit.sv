// tverify_unit: one lane of the SIMD tVERIFY instruction (tCUFFS), serving
// one application processor.
//
// For each checkpoint message of its processor the lane decrypts the SID with
// the hardware key and splits it into pId and bId. It then
//  * checks control flow: pId must be this lane's processor, bId a known
//    block, and either a valid successor of the previous block or, for the
//    first message, a block marked as entry; otherwise tcuffs_cfe;
//  * checks timing: the cycles since the previous checkpoint (the execution
//    time of the previous block) must lie in [Tmin, Tmax] of that block;
//    otherwise tcuffs_tie;
//  * sets done when the processor reaches a block marked as exit.
// The per-processor state (previous block, previous cycle count) is the
// MONITOR's custom register file. The checked time is that of the block that
// has just ended, as the checkpoint sits at the start of each block.
//
// Timing: msg is evaluated combinationally and the state and the sticky error
// flags update at the clock edge of the cycle in which step is high.
module tverify_unit
  import cuffs_pkg::*;
#(
  parameter int          PID   = 0,
  parameter int          DEPTH = 1024,
  parameter logic [31:0] KEY   = 32'h5A3C_96E1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      step,       // evaluate msg this cycle
  input  cp_msg_t   msg,
  // table loading
  input  logic      cfg_we,
  input  bid_t      cfg_bid,
  input  bb_entry_t cfg_entry,
  // results
  output logic      tie,        // sticky timing error
  output logic      cfe,        // sticky control-flow error
  output logic      done,       // processor reached its exit block
  output logic      tie_now,    // this step failed timing
  output logic      cfe_now     // this step failed control flow
);

  sid_t      sid;
  bb_entry_t cur_e, prev_e;
  logic      cur_v, prev_v;
  logic      started_q;
  bid_t      prev_bb_q;
  cnt_t      prev_cc_q;
  cnt_t      t;

  sid_cipher #(.KEY(KEY), .DECRYPT(1'b1)) u_dec (.din(msg.esid), .dout(sid));

  bb_table #(.DEPTH(DEPTH)) u_tab (
    .clk, .rst_n,
    .wr_en (cfg_we), .wr_bid (cfg_bid), .wr_entry (cfg_entry),
    .ra_bid (sid_bid(sid)), .ra_entry (cur_e),  .ra_valid (cur_v),
    .rb_bid (prev_bb_q),    .rb_entry (prev_e), .rb_valid (prev_v)
  );

  always_comb begin
    logic known;
    t     = msg.count - prev_cc_q;
    known = (msg.kind == CP_TCUFFB) && (32'(sid_pid(sid)) == PID) && cur_v;
    if (!started_q) begin
      cfe_now = !(known && cur_e.is_entry);
      tie_now = 1'b0;
    end else begin
      cfe_now = !(known && prev_v && is_succ(prev_e, sid_bid(sid)));
      tie_now = prev_v && ((t < prev_e.lo) || (t > prev_e.hi));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started_q <= 1'b0;
      prev_bb_q <= '0;
      prev_cc_q <= '0;
      tie       <= 1'b0;
      cfe       <= 1'b0;
      done      <= 1'b0;
    end else if (step) begin
      started_q <= 1'b1;
      prev_bb_q <= sid_bid(sid);
      prev_cc_q <= msg.count;
      if (tie_now) tie <= 1'b1;
      if (cfe_now) cfe <= 1'b1;
      if (!cfe_now && cur_e.is_exit) done <= 1'b1;
    end
  end

endmodule
