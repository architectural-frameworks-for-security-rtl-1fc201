// tb_cuff_checksum: compares the encrypted checksum with the reference CRC-8
// model and checks that the receiver rejects every single-bit error in the
// message and in the checksum.
module tb_cuff_checksum;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  cp_kind_e kind;
  sid_t     esid;
  cnt_t     count;
  cs_t      ecs_in, ecs_out;
  logic     ok;

  cuff_checksum #(.KEY(TB_KEY)) dut (.kind, .esid, .count, .ecs_in, .ecs_out, .ok);

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [1:0] k;
      logic [7:0] good;
      k     = 2'($urandom_range(0, 2));
      kind  = cp_kind_e'(k);
      esid  = sid_t'($urandom);
      count = cnt_t'($urandom);
      good  = ref_ecs(k, esid, count);
      ecs_in = good;
      #1;
      chk(ecs_out == good, "ecs value");
      chk(ok, "accepts good");
      // single flip in the checksum
      ecs_in = good ^ (8'h1 << $urandom_range(0, 7));
      #1;
      chk(!ok, "rejects checksum flip");
      ecs_in = good;
      // single flip in the message body
      begin
        int b;
        b = $urandom_range(0, 49);
        if (b < 32)      count = count ^ (cnt_t'(1) << b);
        else if (b < 48) esid  = esid ^ (sid_t'(1) << (b - 32));
        else             kind  = cp_kind_e'(k ^ (2'b1 << (b - 48)));
        #1;
        chk(!ok, "rejects message flip");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
