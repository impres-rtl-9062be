// impres_cipher: encrypts a 32-bit basic-block checksum with the secret
// hardware key.
//
// The same function is used twice: by the secure loader, which turns each
// compile-time checksum into the encrypted checksum stored in the chk
// instruction, and by every CFI at run time, which encrypts the re-computed
// checksum and compares it with the stored one. Encryption keeps an attacker
// who can read and write the code from forging a chk instruction for injected
// code, since the key never leaves the hardware.
//
// The IMPRES scheme does not fix the cipher. This design uses a small balanced
// Feistel network on two 16-bit halves, ROUNDS rounds, fully combinational
// (no added latency, in line with the negligible clock-period cost the
// original IMPRES implementation reports). Round i uses the round key
//     k_i = rotate_right(key, 16*i)[15:0] ^ i
// and the round function
//     F(r, k) = rotate_left16(r + k, 5) ^ (r & rotate_left16(r, 9))
// (addition modulo 2^16). Each round maps (L, R) to (R, L ^ F(R, k_i)). A
// plain XOR with the key was rejected because one known checksum pair would
// reveal the key.
module impres_cipher
  import impres_pkg::*;
#(
  parameter int unsigned ROUNDS = 4
) (
  input  logic [KEY_W-1:0] key_i,
  input  logic [CHK_W-1:0] plain_i,
  output logic [CHK_W-1:0] cipher_o
);

  localparam int unsigned HALF = CHK_W / 2;

  function automatic logic [HALF-1:0] rotl16(input logic [HALF-1:0] v, input int unsigned n);
    return (v << n) | (v >> (HALF - n));
  endfunction

  function automatic logic [HALF-1:0] round_f(input logic [HALF-1:0] r, input logic [HALF-1:0] k);
    logic [HALF-1:0] s;
    s = r + k;
    return rotl16(s, 5) ^ (r & rotl16(r, 9));
  endfunction

  logic [HALF-1:0] left  [ROUNDS+1];
  logic [HALF-1:0] right [ROUNDS+1];
  logic [HALF-1:0] rkey  [ROUNDS];

  always_comb begin
    for (int unsigned i = 0; i < ROUNDS; i++) begin
      logic [KEY_W-1:0] rot;
      rot = (key_i >> ((HALF * i) % KEY_W)) | (key_i << ((KEY_W - (HALF * i) % KEY_W) % KEY_W));
      rkey[i] = rot[HALF-1:0] ^ HALF'(i);
    end
  end

  assign left[0]  = plain_i[CHK_W-1:HALF];
  assign right[0] = plain_i[HALF-1:0];

  for (genvar g = 0; g < ROUNDS; g++) begin : g_round
    assign left[g+1]  = right[g];
    assign right[g+1] = left[g] ^ round_f(right[g], rkey[g]);
  end

  assign cipher_o = {left[ROUNDS], right[ROUNDS]};

endmodule
