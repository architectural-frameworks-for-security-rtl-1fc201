// cuff_port: application-side checkpoint hardware.
//
// When the processor executes a checkpoint instruction (tCUFFB, iCUFFB or
// iCUFFE, carrying the encrypted SID as its immediate) it raises cp_valid.
// The port attaches the current count of its cuff_counter - the cycle count
// for tCUFFS (MODE_INSN=0), the instruction count for iCUFFS (MODE_INSN=1) -
// and, when CS_EN is set, the encrypted checksum of the reliable-communication
// variant, and writes the word into the FIFO to the MONITOR. While the FIFO is
// full, stall is high and the processor must hold the instruction: it retires
// (and is counted) in the cycle the word is written.
//
// For the iCUFFS active MONITOR the port also answers the probe S: in the
// cycle after probe_req it presents, with probe_ack, the count it held in the
// probe cycle (the IC readable over the shared-memory interface).
//
// The reported count includes the checkpoint instruction itself (or the
// current cycle), so consecutive reports differ by exactly the length of the
// block between them. Inputs retire and in_isr come from the processor.
module cuff_port
  import cuffs_pkg::*;
#(
  parameter bit          MODE_INSN = 1'b0,
  parameter bit          CS_EN     = 1'b0,
  parameter logic [31:0] KEY       = 32'h5A3C_96E1
) (
  input  logic     clk,
  input  logic     rst_n,
  // processor side
  input  logic     retire,     // an instruction retires this cycle
  input  logic     in_isr,
  input  logic     cp_valid,   // a checkpoint instruction wants to retire
  input  cp_kind_e cp_kind,
  input  sid_t     cp_esid,
  output logic     stall,
  // FIFO write side
  output logic     fifo_push,
  output cp_msg_t  fifo_wdata,
  input  logic     fifo_full,
  // probe (CHK_IC)
  input  logic     probe_req,
  output logic     probe_ack,
  output cnt_t     probe_count
);

  cnt_t cnt_q, cnt_d;
  logic deduct;
  cs_t  ecs;
  logic cs_ok_unused;

  cuff_counter u_cnt (
    .clk, .rst_n,
    .inc        (MODE_INSN ? retire : 1'b1),
    .in_isr,
    .value      (cnt_q),
    .value_next (cnt_d),
    .deduct
  );

  cuff_checksum #(.KEY(KEY)) u_cs (
    .kind (cp_kind), .esid (cp_esid), .count (cnt_d),
    .ecs_in ('0), .ecs_out (ecs), .ok (cs_ok_unused)
  );

  assign stall      = cp_valid && fifo_full;
  assign fifo_push  = cp_valid && !fifo_full;
  assign fifo_wdata = '{kind: cp_kind, esid: cp_esid, count: cnt_d,
                        ecs: (CS_EN ? ecs : '0)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      probe_ack   <= 1'b0;
      probe_count <= '0;
    end else begin
      probe_ack <= probe_req;
      if (probe_req) probe_count <= cnt_q;
    end
  end

  // A stalled checkpoint must not retire, and one that goes through must.
  a_stall_no_retire: assert property (@(posedge clk) disable iff (!rst_n)
      MODE_INSN && stall |-> !retire)
    else $error("cuff_port: checkpoint retired while stalled");

endmodule
