// tb_ref_pkg: reference models used by the testbenches, written apart from
// the RTL so that a testbench can compute expected values on its own.
//  * ref_enc / ref_dec: the 4-round Feistel SID cipher (byte i of the key in
//    round i, F(r,k) = rotl3(r^k) + (r^0x5B));
//  * ref_ecs: CRC-8 (x^8+x^2+x+1, init 0, MSB first) over {kind, esid, count}
//    XOR the key byte KEY[31:24]^KEY[7:0];
//  * mk_sid / entry helpers and the step_t record the processor model runs.
package tb_ref_pkg;
  import cuffs_pkg::*;

  localparam logic [31:0] TB_KEY = 32'h5A3C_96E1;

  function automatic logic [7:0] ref_f(logic [7:0] r, logic [7:0] k);
    logic [7:0] a;
    a = r ^ k;
    return ((a << 3) | (a >> 5)) + (r ^ 8'h5B);
  endfunction

  function automatic sid_t ref_enc(sid_t p, logic [31:0] key = TB_KEY);
    logic [7:0] h [2];
    logic [7:0] nh;
    h[0] = p[15:8]; h[1] = p[7:0];
    for (int i = 0; i < 4; i++) begin
      nh   = h[0] ^ ref_f(h[1], key[i*8 +: 8]);
      h[0] = h[1];
      h[1] = nh;
    end
    return {h[0], h[1]};
  endfunction

  function automatic sid_t ref_dec(sid_t c, logic [31:0] key = TB_KEY);
    logic [7:0] h [2];
    logic [7:0] nh;
    h[0] = c[15:8]; h[1] = c[7:0];
    for (int i = 3; i >= 0; i--) begin
      nh   = h[1] ^ ref_f(h[0], key[i*8 +: 8]);
      h[1] = h[0];
      h[0] = nh;
    end
    return {h[0], h[1]};
  endfunction

  function automatic logic [7:0] ref_ecs(logic [1:0] kind, sid_t esid, cnt_t count,
                                         logic [31:0] key = TB_KEY);
    logic [49:0] bits;
    logic [7:0]  crc;
    bits = {kind, esid, count};
    crc  = 8'h00;
    for (int i = 49; i >= 0; i--) begin
      if (crc[7] != bits[i]) crc = (crc << 1) ^ 8'h07;
      else                   crc = crc << 1;
    end
    return crc ^ key[31:24] ^ key[7:0];
  endfunction

  function automatic sid_t mk_sid(int pid, int bid);
    return sid_t'((pid << BID_W) | bid);
  endfunction

  function automatic sid_t mk_esid(int pid, int bid);
    return ref_enc(mk_sid(pid, bid));
  endfunction

  // Table entry with up to two successors (-1 = none).
  function automatic bb_entry_t mk_entry(logic ent, logic ext, int s0, int s1,
                                         int lo, int hi);
    bb_entry_t e;
    e = '0;
    e.is_entry = ent;
    e.is_exit  = ext;
    if (s0 >= 0) begin e.succ_vld[0] = 1'b1; e.succ[0] = bid_t'(s0); end
    if (s1 >= 0) begin e.succ_vld[1] = 1'b1; e.succ[1] = bid_t'(s1); end
    e.lo = cnt_t'(lo);
    e.hi = cnt_t'(hi);
    return e;
  endfunction

  // One step of a processor trace: `gap` ordinary instructions, `isr`
  // interrupt-handler instructions among them, `idle` cycles without retire,
  // then (if is_cp) a checkpoint instruction.
  typedef struct packed {
    logic        is_cp;
    cp_kind_e    kind;
    sid_t        esid;
    logic [15:0] gap;
    logic [15:0] isr;
    logic [15:0] idle;
  } step_t;

endpackage
