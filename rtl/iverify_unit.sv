// iverify_unit: one lane of the SIMD iVERIFY instruction (iCUFFS), serving
// one application processor.
//
// For each checkpoint message the lane (optionally) verifies the encrypted
// checksum, decrypts the SID and checks:
//  * control flow (icuffs_cfe): pId must be this processor and bId a known
//    block. An iCUFFB must name a successor of the previous block (or an entry
//    block for the first message); an iCUFFE must name the block its iCUFFB
//    opened, and two iCUFFE in a row are an error;
//  * instruction count (icuffs_ice): the instructions since the previous
//    checkpoint must equal the table count of the previous block. For a block
//    that ends in a system call the count runs from its iCUFFB to its iCUFFE;
//    the interval after an iCUFFE (the system call, which is not supervised)
//    is not counted;
//  * checksum (icuffs_cse, CS_EN=1 only): a message whose checksum fails is
//    discarded and flagged.
// It keeps prevIC, prevBB and whether the last checkpoint was an iCUFFE, and
// gives iCHK the count limit of prevBB through its second table port.
//
// Timing: combinational evaluation of msg; state and sticky flags update on
// the clock edge of a cycle with step high.
module iverify_unit
  import cuffs_pkg::*;
#(
  parameter int          PID   = 0,
  parameter int          DEPTH = 1024,
  parameter bit          CS_EN = 1'b1,
  parameter logic [31:0] KEY   = 32'h5A3C_96E1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      step,
  input  cp_msg_t   msg,
  input  logic      cfg_we,
  input  bid_t      cfg_bid,
  input  bb_entry_t cfg_entry,
  output logic      ice,        // sticky instruction-count error
  output logic      cfe,        // sticky control-flow error
  output logic      cse,        // sticky checksum error
  output logic      done,
  output logic      ice_now,
  output logic      cfe_now,
  output logic      cse_now,
  // state read by iCHK
  output logic      started,
  output logic      prev_was_e,
  output cnt_t      prev_ic,
  output cnt_t      prev_limit  // instruction count of prevBB (0 if unknown)
);

  sid_t      sid;
  bb_entry_t cur_e, prev_e;
  logic      cur_v, prev_v;
  bid_t      prev_bb_q;
  cs_t       cs_unused;
  logic      cs_ok;
  cnt_t      n;

  sid_cipher #(.KEY(KEY), .DECRYPT(1'b1)) u_dec (.din(msg.esid), .dout(sid));

  cuff_checksum #(.KEY(KEY)) u_cs (
    .kind (msg.kind), .esid (msg.esid), .count (msg.count),
    .ecs_in (msg.ecs), .ecs_out (cs_unused), .ok (cs_ok)
  );

  bb_table #(.DEPTH(DEPTH)) u_tab (
    .clk, .rst_n,
    .wr_en (cfg_we), .wr_bid (cfg_bid), .wr_entry (cfg_entry),
    .ra_bid (sid_bid(sid)), .ra_entry (cur_e),  .ra_valid (cur_v),
    .rb_bid (prev_bb_q),    .rb_entry (prev_e), .rb_valid (prev_v)
  );

  assign prev_limit = prev_v ? prev_e.lo : '0;

  always_comb begin
    logic known, is_b, is_e;
    n       = msg.count - prev_ic;
    is_b    = (msg.kind == CP_ICUFFB);
    is_e    = (msg.kind == CP_ICUFFE);
    known   = (32'(sid_pid(sid)) == PID) && cur_v;
    cse_now = CS_EN && !cs_ok;
    cfe_now = 1'b0;
    ice_now = 1'b0;
    if (!cse_now) begin
      if (!started) begin
        cfe_now = !(known && is_b && cur_e.is_entry);
      end else if (is_b) begin
        cfe_now = !(known && prev_v && is_succ(prev_e, sid_bid(sid)));
        ice_now = !prev_was_e && prev_v && (n != prev_e.lo);
      end else if (is_e) begin
        cfe_now = !(known && !prev_was_e && sid_bid(sid) == prev_bb_q);
        ice_now = !prev_was_e && prev_v && (n != prev_e.lo);
      end else begin
        cfe_now = 1'b1;  // a tCUFFB in an iCUFFS system
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started    <= 1'b0;
      prev_was_e <= 1'b0;
      prev_bb_q  <= '0;
      prev_ic    <= '0;
      ice        <= 1'b0;
      cfe        <= 1'b0;
      cse        <= 1'b0;
      done       <= 1'b0;
    end else if (step) begin
      if (cse_now) begin
        cse <= 1'b1;
      end else begin
        started    <= 1'b1;
        prev_was_e <= (msg.kind == CP_ICUFFE);
        prev_bb_q  <= sid_bid(sid);
        prev_ic    <= msg.count;
        if (ice_now) ice <= 1'b1;
        if (cfe_now) cfe <= 1'b1;
        if (!cfe_now && msg.kind == CP_ICUFFB && cur_e.is_exit) done <= 1'b1;
      end
    end
  end

endmodule
