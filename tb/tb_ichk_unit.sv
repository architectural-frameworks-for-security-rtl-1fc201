// tb_ichk_unit: iCHK with three processors whose counters the testbench
// answers one cycle after the probe. Checks the limit (IC - prevIC greater
// than the table count of prevBB, equal is still legal), the system-call
// bound after an iCUFFE, that a pending FIFO entry, a finished, an idle or an
// inactive processor never raise TOE, and the start -> fin latency of 2
// cycles.
module tb_ichk_unit;
  import cuffs_pkg::*;

  localparam int N = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, fin, probe_req;
  logic [N-1:0] active = '1, started = '0, done = '0, prev_was_e = '0, fifo_empty = '1;
  logic [N-1:0] probe_ack = '0, toe, toe_now;
  cnt_t prev_ic [N], prev_limit [N], probe_count [N], ic [N];

  ichk_unit #(.N_APP(N), .SYSCALL_MAX(32'd50)) dut (
    .clk, .rst_n, .start, .fin, .active, .started, .done, .prev_was_e,
    .prev_ic, .prev_limit, .fifo_empty, .probe_req, .probe_ack, .probe_count,
    .toe, .toe_now);

  always #5 clk = ~clk;

  // the processors' side of the probe: answer with the count of the probe cycle
  always @(posedge clk) begin
    probe_ack <= {N{probe_req}};
    if (probe_req) for (int j = 0; j < N; j++) probe_count[j] <= ic[j];
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  // one iCHK round; returns toe_now as seen in the fin cycle
  task automatic round(output logic [N-1:0] t);
    int lat;
    @(negedge clk);
    start = 1;
    #1 chk(probe_req, "probe in start cycle");
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!fin && lat < 10) begin @(negedge clk); lat++; end
    chk(lat == 2, $sformatf("fin latency %0d", lat));
    t = toe_now;
    @(negedge clk);  // let the fin-cycle edge take the result
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] t;
    for (int j = 0; j < N; j++) begin
      prev_ic[j] = 100; prev_limit[j] = 10; ic[j] = 100; probe_count[j] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // not started: nothing is checked
    ic[0] = 900;
    round(t); chk(t == 0, "idle processors");
    started = '1;
    // on the limit: legal
    ic[0] = 110; ic[1] = 105; ic[2] = 100;
    round(t); chk(t == 0 && toe == 0, "within limit");
    // one past the limit on processor 0
    ic[0] = 111;
    round(t); chk(t == 3'b001 && toe == 3'b001, "missed checkpoint");
    // system call bound on processor 1
    prev_was_e[1] = 1; ic[1] = 150;
    round(t); chk(t == 3'b001, "system call within bound");
    ic[1] = 151;
    round(t); chk(t == 3'b011 && toe == 3'b011, "system call over bound");
    // processor 2 past its limit but with a checkpoint waiting
    ic[2] = 400; fifo_empty[2] = 0;
    round(t); chk(t[2] == 0, "pending checkpoint");
    fifo_empty[2] = 1; done[2] = 1;
    round(t); chk(t[2] == 0, "finished processor");
    done[2] = 0; active[2] = 0;
    round(t); chk(t[2] == 0, "inactive processor");
    active[2] = 1;
    round(t); chk(t[2] == 1 && toe[2], "processor 2 flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
