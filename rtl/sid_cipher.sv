// sid_cipher: keyed, invertible scrambling of a 16-bit SID.
//
// The secure loader encrypts every SID with the hardware key and the MONITOR
// decrypts it with an identical copy of that key, so that bus observers cannot
// read processor and block numbers. The frameworks do not fix a cipher; this
// design uses a 4-round Feistel network on two 8-bit halves, round i keyed by
// byte i of KEY, with round function F(r,k) = rotl3(r ^ k) + (r ^ 8'h5B).
// A Feistel network is invertible whatever F is, so DECRYPT=1 runs the rounds
// backwards.
//
// Purely combinational: dout follows din in the same cycle.
module sid_cipher
  import cuffs_pkg::*;
#(
  parameter logic [31:0] KEY     = 32'h5A3C_96E1,
  parameter bit          DECRYPT = 1'b1
) (
  input  sid_t din,
  output sid_t dout
);

  function automatic logic [7:0] rf(logic [7:0] r, logic [7:0] k);
    logic [7:0] x;
    x = r ^ k;
    x = {x[4:0], x[7:5]};
    return x + (r ^ 8'h5B);
  endfunction

  always_comb begin
    logic [7:0] l, r, t;
    l = din[15:8];
    r = din[7:0];
    if (!DECRYPT) begin
      for (int i = 0; i < 4; i++) begin
        t = r;
        r = l ^ rf(r, KEY[8*i +: 8]);
        l = t;
      end
    end else begin
      for (int i = 3; i >= 0; i--) begin
        t = l;
        l = r ^ rf(l, KEY[8*i +: 8]);
        r = t;
      end
    end
    dout = {l, r};
  end

endmodule
