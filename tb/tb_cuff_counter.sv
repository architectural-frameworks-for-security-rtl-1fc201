// tb_cuff_counter: random increments and interrupt periods against a model
// that simply does not count increments made inside a handler; also checks
// value_next and the deduct flag.
module tb_cuff_counter;
  import cuffs_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, inc = 0, in_isr = 0;
  cnt_t value, value_next;
  logic deduct;
  int   model = 0, ish = 0;

  cuff_counter dut (.clk, .rst_n, .inc, .in_isr, .value, .value_next, .deduct);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s v=%0d m=%0d", what, value, model); end
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
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      inc    = ($urandom_range(0, 3) != 0);
      in_isr = (c > 500) && ((c / 97) % 3 == 1);
      #1;
      chk(value == cnt_t'(model), "value");
      chk(value_next == cnt_t'(model + (inc && !in_isr)), "value_next");
      chk(deduct == (ish != 0), "deduct");
      @(posedge clk);
      if (inc && !in_isr) model++;
      if (inc && in_isr)  ish++;
    end
    chk(ish > 0, "handler periods happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
