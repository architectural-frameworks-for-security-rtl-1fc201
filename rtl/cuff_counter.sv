// cuff_counter: the Cycle Count (CC) or Instruction Count (IC) register of an
// application processor, with interrupt deduction.
//
// tCUFFS counts every clock cycle (inc tied high); iCUFFS counts retired
// instructions (inc = retire). Work done inside an interrupt service handler
// must not be charged to the interrupted basic block, so while in_isr is high
// every increment is also added to COUNT_ISH, and once COUNT_ISH is non-zero
// the deduct flag is set and the reported value is raw - COUNT_ISH. Nested
// interrupts need no stack here: in_isr simply stays high through them. The
// frameworks compute COUNT_ISH in software at the first and last handler
// instruction; doing it in hardware is this design's choice and gives the
// same reported value.
//
// Timing: value is the registered count before this cycle's increment,
// value_next the count including it. Both are raw - COUNT_ISH.
module cuff_counter
  import cuffs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic inc,        // one cycle or one retired instruction
  input  logic in_isr,     // processor is executing an interrupt handler
  output cnt_t value,
  output cnt_t value_next,
  output logic deduct      // an interrupt has been deducted
);

  cnt_t raw_q, ish_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_q <= '0;
      ish_q <= '0;
    end else if (inc) begin
      raw_q <= raw_q + 1'b1;
      if (in_isr) ish_q <= ish_q + 1'b1;
    end
  end

  assign deduct     = (ish_q != '0);
  assign value      = deduct ? raw_q - ish_q : raw_q;
  // Increments inside a handler cancel out, so only the others move value.
  assign value_next = value + cnt_t'(inc && !in_isr);

endmodule
