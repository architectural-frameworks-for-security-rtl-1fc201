// cuff_checksum: encrypted checksum for reliable processor-to-MONITOR
// communication (iCUFFS with the reliability extension).
//
// The sender appends an encrypted checksum to each checkpoint message and the
// receiver recomputes and compares it, so a soft error or tampering on the
// link is caught. The checksum is a CRC-8 (polynomial x^8+x^2+x+1, initial
// value 0, MSB first) over {kind, esid, count} as they travel, computed as
// the XOR of one constant per set bit, and it is encrypted by
// XOR with a key byte, KEY[31:24] ^ KEY[7:0]. Both the CRC and the encryption
// are this design's choices. The same module serves the sender (ecs_out is
// appended) and the receiver (ok compares against ecs_in).
//
// Purely combinational.
module cuff_checksum
  import cuffs_pkg::*;
#(
  parameter logic [31:0] KEY = 32'h5A3C_96E1
) (
  input  cp_kind_e kind,
  input  sid_t     esid,
  input  cnt_t     count,
  input  cs_t      ecs_in,
  output cs_t      ecs_out,
  output logic     ok
);

  localparam int DW = 2 + SID_W + CNT_W;
  typedef logic [7:0] crc_tab_t [DW];

  // With initial value 0 the CRC is linear in the data, so it is the XOR of
  // the CRCs of the single set bits. BIT_CRC[i] is the CRC of a message whose
  // only 1 is bit i (bit DW-1 is shifted in first).
  function automatic crc_tab_t bit_crcs();
    crc_tab_t t;
    for (int i = 0; i < DW; i++) begin
      logic [7:0] c;
      c = 8'h00;
      for (int k = DW - 1; k >= 0; k--) begin
        logic fb;
        fb = c[7] ^ (k == i);
        c  = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
      end
      t[i] = c;
    end
    return t;
  endfunction

  localparam crc_tab_t BIT_CRC = bit_crcs();

  always_comb begin
    logic [DW-1:0] d;
    logic [7:0]    c;
    d = {kind, esid, count};
    c = 8'h00;
    for (int i = 0; i < DW; i++)
      if (d[i]) c ^= BIT_CRC[i];
    ecs_out = c ^ KEY[31:24] ^ KEY[7:0];
    ok      = (ecs_out == ecs_in);
  end

endmodule
