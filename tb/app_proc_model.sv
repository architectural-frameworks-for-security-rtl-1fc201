// app_proc_model: behavioural stand-in for an application processor running
// an instrumented program (testbench only, not synthesizable).
//
// It replays a trace of step_t records after go rises: for each step it
// retires `gap` ordinary instructions, one per cycle (the first `isr` of them
// inside an interrupt handler, in_isr high), waits `idle` cycles without
// retiring, and then, if is_cp, issues the checkpoint instruction and holds it
// while stall is high; the checkpoint retires in the cycle it is accepted.
// It stops at the end of the trace (finished) or when abort rises.
module app_proc_model
  import cuffs_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int TL = 256
) (
  input  logic     clk,
  input  logic     go,
  input  logic     abort,
  input  step_t    trace [TL],
  input  int       n_steps,
  input  logic     stall,
  output logic     retire,
  output logic     in_isr,
  output logic     cp_valid,
  output cp_kind_e cp_kind,
  output sid_t     cp_esid,
  output logic     finished,
  output int       stall_cycles,
  output int       isr_cycles
);

  logic ord;

  assign retire = ord || (cp_valid && !stall);

  initial begin
    ord = 0; in_isr = 0; cp_valid = 0; cp_kind = CP_TCUFFB; cp_esid = '0;
    finished = 0; stall_cycles = 0; isr_cycles = 0;
    forever begin
      @(negedge clk);
      if (go && !finished) begin
        for (int s = 0; s < n_steps && !abort; s++) begin
          for (int i = 0; i < int'(trace[s].gap) && !abort; i++) begin
            ord = 1; in_isr = (i < int'(trace[s].isr));
            if (in_isr) isr_cycles++;
            @(negedge clk);
          end
          ord = 0; in_isr = 0;
          for (int i = 0; i < int'(trace[s].idle) && !abort; i++) @(negedge clk);
          if (trace[s].is_cp && !abort) begin
            cp_valid = 1; cp_kind = trace[s].kind; cp_esid = trace[s].esid;
            #1;
            while (stall && !abort) begin
              stall_cycles++;
              @(negedge clk);
              #1;
            end
            @(negedge clk);
            cp_valid = 0;
          end
        end
        ord = 0; in_isr = 0; cp_valid = 0;
        finished = 1;
      end
      if (!go) begin finished = 0; stall_cycles = 0; isr_cycles = 0; end
    end
  end

endmodule
