// ichk_unit: the iCHK instruction of the iCUFFS "active" MONITOR.
//
// On start it sends the probe signal S to every application processor and,
// through the CHK_IC shared-memory path, collects each processor's current
// instruction count IC. For each processor that has started, has not finished
// and has no checkpoint waiting in its FIFO, it compares IC - prevIC with the
// table count of prevBB; if the difference is greater, the processor has run
// past a checkpoint without reporting it and icuffs_toe is raised. After an
// iCUFFE the processor is inside a system call, which the table does not
// count, so SYSCALL_MAX (this design's bound) is used as the limit instead.
//
// The FIFO Empty flags are sampled in the probe cycle, the same cycle whose
// count the ports return, so a checkpoint written in or after that cycle is
// never mistaken for a missed one.
//
// Timing: start in cycle t raises probe_req in cycle t, the acks arrive in
// t+1 and fin is high in t+2, the cycle whose clock edge updates toe.
module ichk_unit
  import cuffs_pkg::*;
#(
  parameter int   N_APP       = 6,
  parameter cnt_t SYSCALL_MAX = 32'd4096
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             fin,
  input  logic [N_APP-1:0] active,
  // lane state from iVERIFY
  input  logic [N_APP-1:0] started,
  input  logic [N_APP-1:0] done,
  input  logic [N_APP-1:0] prev_was_e,
  input  cnt_t             prev_ic    [N_APP],
  input  cnt_t             prev_limit [N_APP],
  input  logic [N_APP-1:0] fifo_empty,
  // probe path
  output logic             probe_req,
  input  logic [N_APP-1:0] probe_ack,
  input  cnt_t             probe_count [N_APP],
  // results
  output logic [N_APP-1:0] toe,       // sticky per processor
  output logic [N_APP-1:0] toe_now
);

  typedef enum logic [1:0] {IDLE, WAIT, EVAL} state_e;
  state_e           st;
  logic [N_APP-1:0] empty_q, acked_q;
  cnt_t             ic_q [N_APP];

  assign probe_req = (st == IDLE) && start;
  assign fin       = (st == EVAL);

  always_comb begin
    for (int j = 0; j < N_APP; j++) begin
      cnt_t lim;
      lim        = prev_was_e[j] ? SYSCALL_MAX : prev_limit[j];
      toe_now[j] = (st == EVAL) && active[j] && started[j] && !done[j] &&
                   empty_q[j] && ((ic_q[j] - prev_ic[j]) > lim);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= IDLE;
      empty_q <= '0;
      acked_q <= '0;
      toe     <= '0;
      for (int j = 0; j < N_APP; j++) ic_q[j] <= '0;
    end else begin
      case (st)
        IDLE: if (start) begin
          empty_q <= fifo_empty;
          acked_q <= ~active;
          st      <= WAIT;
        end
        WAIT: begin
          for (int j = 0; j < N_APP; j++)
            if (probe_ack[j]) ic_q[j] <= probe_count[j];
          if (&(acked_q | probe_ack)) st <= EVAL;
          acked_q <= acked_q | probe_ack;
        end
        default: begin  // EVAL
          toe <= toe | toe_now;
          st  <= IDLE;
        end
      endcase
    end
  end

endmodule
