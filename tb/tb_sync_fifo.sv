// tb_sync_fifo: random push/pop traffic against a queue model, checking the
// head word, Full, Empty and the fill level; the writer and reader obey the
// stall rules (no push when full, no pop when empty).
module tb_sync_fifo;
  int checks = 0, failures = 0;
  localparam int W = 12, D = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, empty;
  logic [$clog2(D+1)-1:0] level;
  logic [W-1:0] q[$];
  int n_full = 0, n_empty = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata,
                                         .full, .empty, .level);
  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      chk(level == q.size(), "level");
      if (q.size() > 0) chk(rdata == q[0], "head");
      if (full) n_full++;
      if (empty) n_empty++;
      // phases biased towards filling, then draining
      push  = !full && ($urandom_range(0, 9) < (((c / 200) % 2) ? 3 : 8));
      pop   = !empty && ($urandom_range(0, 9) < (((c / 200) % 2) ? 8 : 3));
      wdata = W'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    chk(n_full > 0 && n_empty > 0, "both ends reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
