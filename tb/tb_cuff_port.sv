// tb_cuff_port: drives an instruction stream with checkpoints, interrupts and
// a FIFO that is sometimes full, in both counting modes. Checks every written
// word (kind, SID, the count including the checkpoint, the checksum), that the
// port stalls exactly while the FIFO is full, and the probe answer.
module tb_cuff_port;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] retire = '0, in_isr = '0, cp_valid = '0, fifo_full = '0, probe_req = '0;
  cp_kind_e cp_kind [2];
  sid_t     cp_esid [2];
  logic [1:0] stall, fifo_push, probe_ack;
  cp_msg_t  wd [2];
  cnt_t     pc [2];
  int       ic_model = 0, cc_model = 0, n_stall = 0, n_isr = 0, n_cp = 0;

  // lane 0: iCUFFS (instruction count, checksum); lane 1: tCUFFS (cycles)
  cuff_port #(.MODE_INSN(1'b1), .CS_EN(1'b1), .KEY(TB_KEY)) u_i (
    .clk, .rst_n, .retire (retire[0]), .in_isr (in_isr[0]), .cp_valid (cp_valid[0]),
    .cp_kind (cp_kind[0]), .cp_esid (cp_esid[0]), .stall (stall[0]),
    .fifo_push (fifo_push[0]), .fifo_wdata (wd[0]), .fifo_full (fifo_full[0]),
    .probe_req (probe_req[0]), .probe_ack (probe_ack[0]), .probe_count (pc[0]));
  cuff_port #(.MODE_INSN(1'b0), .CS_EN(1'b0), .KEY(TB_KEY)) u_t (
    .clk, .rst_n, .retire (retire[1]), .in_isr (in_isr[1]), .cp_valid (cp_valid[1]),
    .cp_kind (cp_kind[1]), .cp_esid (cp_esid[1]), .stall (stall[1]),
    .fifo_push (fifo_push[1]), .fifo_wdata (wd[1]), .fifo_full (fifo_full[1]),
    .probe_req (probe_req[1]), .probe_ack (probe_ack[1]), .probe_count (pc[1]));

  always #5 clk = ~clk;
  // the cycle counter counts every clock edge after reset outside handlers
  always @(posedge clk) if (rst_n && !in_isr[1]) cc_model <= cc_model + 1;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cp_kind[0] = CP_ICUFFB; cp_kind[1] = CP_TCUFFB;
    cp_esid[0] = '0; cp_esid[1] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      logic isr, want_cp, prb;
      int   ic_at_probe;
      @(negedge clk);
      isr     = ((c / 50) % 4 == 3);
      want_cp = !isr && ($urandom_range(0, 6) == 0);
      prb     = ($urandom_range(0, 9) == 0);
      fifo_full = {2{($urandom_range(0, 3) == 0)}};
      in_isr    = {2{isr}};
      cp_valid  = {2{want_cp}};
      cp_kind[0] = $urandom_range(0, 1) ? CP_ICUFFB : CP_ICUFFE;
      cp_esid[0] = sid_t'($urandom);
      cp_esid[1] = cp_esid[0];
      // an ordinary instruction may retire; a checkpoint retires only if not stalled
      retire    = {2{want_cp ? !fifo_full[0] : ($urandom_range(0, 3) != 0)}};
      probe_req = {2{prb}};
      ic_at_probe = ic_model;
      #1;
      chk(stall == (cp_valid & fifo_full), "stall");
      chk(fifo_push == (cp_valid & ~fifo_full), "push");
      if (stall[0]) n_stall++;
      if (isr && retire[0]) n_isr++;
      if (fifo_push[0]) begin
        n_cp++;
        chk(wd[0].kind == cp_kind[0] && wd[0].esid == cp_esid[0], "i fields");
        chk(wd[0].count == cnt_t'(ic_model + 1), "i count includes checkpoint");
        chk(wd[0].ecs == ref_ecs(cp_kind[0], cp_esid[0], cnt_t'(ic_model + 1)), "checksum");
        chk(wd[1].count == cnt_t'(cc_model + 1), "t cycle count");
        chk(wd[1].ecs == '0, "no checksum in tCUFFS");
      end
      @(posedge clk);
      if (retire[0] && !isr) ic_model++;
      #1;
      chk(probe_ack == {2{prb}}, "probe ack");
      if (prb) chk(pc[0] == cnt_t'(ic_at_probe), "probe count");
    end
    chk(n_stall > 0 && n_isr > 0 && n_cp > 0, "stall, interrupt and checkpoints happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
