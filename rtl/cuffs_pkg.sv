// cuffs_pkg: types and constants shared by the tCUFFS and iCUFFS checkpoint
// monitors.
//
// Every basic block (BB) of an application program carries one or two
// checkpoint instructions. A checkpoint names its block by an encrypted 16-bit
// SID, which holds the processor ID (pId) in the top PID_W bits and the block
// ID (bId) in the remaining BID_W bits. When the checkpoint executes, the
// application-side port tags it with the processor's Cycle Count (tCUFFS) or
// Instruction Count (iCUFFS) and writes a cp_msg_t into the FIFO to the
// MONITOR. The iCUFFS variant for reliable communication also appends an
// encrypted 8-bit checksum.
//
// The SID split, the field widths and the message layout are this design's
// choices; the checkpoint kinds (tCUFFB, iCUFFB, iCUFFE) and the table
// contents (control-flow successors, Tmin/Tmax, instruction counts) follow the
// frameworks' description.
package cuffs_pkg;

  localparam int SID_W    = 16;  // encrypted / plain SID width
  localparam int PID_W    = 3;   // processor ID field, up to 8 processors
  localparam int BID_W    = SID_W - PID_W;  // block ID field
  localparam int CNT_W    = 32;  // CC / IC register width
  localparam int CS_W     = 8;   // checksum width
  localparam int MAX_SUCC = 4;   // successors stored per basic block

  typedef logic [SID_W-1:0] sid_t;
  typedef logic [BID_W-1:0] bid_t;
  typedef logic [PID_W-1:0] pid_t;
  typedef logic [CNT_W-1:0] cnt_t;
  typedef logic [CS_W-1:0]  cs_t;

  // Which checkpoint instruction produced a message.
  typedef enum logic [1:0] {
    CP_TCUFFB = 2'd0,   // tCUFFS: start of a basic block
    CP_ICUFFB = 2'd1,   // iCUFFS: start of a basic block
    CP_ICUFFE = 2'd2    // iCUFFS: just before the system call that ends a block
  } cp_kind_e;

  // One FIFO word from an application processor to the MONITOR.
  typedef struct packed {
    cp_kind_e kind;   // checkpoint instruction
    sid_t     esid;   // encrypted SID (immediate of the instruction)
    cnt_t     count;  // CC or IC reading attached by the FIFO port
    cs_t      ecs;    // encrypted checksum (iCUFFS reliable mode, else 0)
  } cp_msg_t;

  localparam int MSG_W = $bits(cp_msg_t);

  // One storage-table entry: the control-flow graph row of a block and its
  // limits. tCUFFS uses lo/hi as Tmin/Tmax in cycles; iCUFFS uses lo as the
  // exact instruction count and ignores hi.
  typedef struct packed {
    logic                        is_entry;  // program may start here
    logic                        is_exit;   // reaching it ends the program
    logic [MAX_SUCC-1:0]         succ_vld;
    logic [MAX_SUCC-1:0][BID_W-1:0] succ;   // valid successor blocks
    cnt_t                        lo;
    cnt_t                        hi;
  } bb_entry_t;

  function automatic pid_t sid_pid(sid_t s);
    return s[SID_W-1 -: PID_W];
  endfunction

  function automatic bid_t sid_bid(sid_t s);
    return s[BID_W-1:0];
  endfunction

  // True when `b` is one of the stored successors of entry `e`.
  function automatic logic is_succ(bb_entry_t e, bid_t b);
    logic hit = 1'b0;
    for (int k = 0; k < MAX_SUCC; k++)
      if (e.succ_vld[k] && e.succ[k] == b) hit = 1'b1;
    return hit;
  endfunction

endpackage
