// tb_bb_table: writes random entries, reads them back on both ports, and
// checks that unwritten and out-of-range block IDs read as not valid.
module tb_bb_table;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int D = 64;
  logic clk = 0, rst_n = 0, wr_en = 0;
  bid_t wr_bid = '0, ra_bid = '0, rb_bid = '0;
  bb_entry_t wr_entry = '0, ra_entry, rb_entry;
  logic ra_valid, rb_valid;
  bb_entry_t model [D];
  logic      mv [D];

  bb_table #(.DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_bid, .wr_entry,
                             .ra_bid, .ra_entry, .ra_valid, .rb_bid, .rb_entry, .rb_valid);
  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s a=%0d b=%0d", what, ra_bid, rb_bid); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) mv[i] = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // nothing is valid after reset
    for (int i = 0; i < D; i++) begin
      ra_bid = bid_t'(i); #1; chk(!ra_valid, "valid after reset");
    end
    for (int i = 0; i < 100; i++) begin
      int b;
      b = $urandom_range(0, D - 1);
      @(negedge clk);
      wr_en = 1; wr_bid = bid_t'(b);
      wr_entry = mk_entry(1'($urandom), 1'($urandom), $urandom_range(0, 500),
                          $urandom_range(0, 500), $urandom, $urandom);
      model[b] = wr_entry; mv[b] = 1'b1;
      @(negedge clk);
      wr_en = 0;
      ra_bid = bid_t'($urandom_range(0, D - 1));
      rb_bid = bid_t'($urandom_range(0, D - 1));
      #1;
      chk(ra_valid == mv[ra_bid], "a valid");
      chk(rb_valid == mv[rb_bid], "b valid");
      if (mv[ra_bid]) chk(ra_entry == model[ra_bid], "a entry");
      if (mv[rb_bid]) chk(rb_entry == model[rb_bid], "b entry");
    end
    // out of range: aliases of written entries must not read as valid
    ra_bid = bid_t'(D + 3); rb_bid = bid_t'(8191);
    @(negedge clk); wr_en = 1; wr_bid = bid_t'(D + 3); wr_entry = '1;
    @(negedge clk); wr_en = 0; #1;
    chk(!ra_valid && !rb_valid, "out of range invalid");
    rb_bid = bid_t'(3); #1;
    chk(rb_valid == mv[3], "alias untouched valid");
    if (mv[3]) chk(rb_entry == model[3], "alias untouched entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
