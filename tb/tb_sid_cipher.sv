// tb_sid_cipher: checks the SID cipher in both directions against the
// reference Feistel model for the hardware key and for random keys, and
// that decryption inverts encryption.
module tb_sid_cipher;
  import cuffs_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [31:0] K2 = 32'hC0FF_EE42;
  int checks = 0, failures = 0;
  sid_t p, c, d, c2, d2;

  sid_cipher #(.KEY(TB_KEY), .DECRYPT(1'b0)) u_enc  (.din(p), .dout(c));
  sid_cipher #(.KEY(TB_KEY), .DECRYPT(1'b1)) u_dec  (.din(c), .dout(d));
  sid_cipher #(.KEY(K2),     .DECRYPT(1'b0)) u_enc2 (.din(p), .dout(c2));
  sid_cipher #(.KEY(K2),     .DECRYPT(1'b1)) u_dec2 (.din(c2), .dout(d2));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s p=%h c=%h d=%h", what, p, c, d);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      p = (i < 4) ? sid_t'(i * 16'h5555) : sid_t'($urandom);
      #1;
      chk(c == ref_enc(p), "enc");
      chk(d == p, "roundtrip");
      chk(c2 == ref_enc(p, K2), "enc key2");
      chk(d2 == p, "roundtrip key2");
      chk(ref_dec(c) == p, "ref roundtrip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
