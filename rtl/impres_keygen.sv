// impres_keygen: holds the secret hardware key and draws a fresh one for
// every program load.
//
// A 64-bit Galois LFSR (polynomial x^64 + x^63 + x^61 + x^60 + 1) runs every
// clock cycle; entropy_i, a bit from the chip's random source, is XORed into
// its feedback so the sequence cannot be predicted from the reset value. When
// new_key_i is high (the start of a program load) the key register takes the
// LFSR state at the clock edge, and the new key is in force from the next
// cycle on. An all-zero draw is replaced by the LFSR seed so the key is never
// zero. After reset the key is the seed until the first load.
//
// The IMPRES scheme asks for a key that is random, different for each load and
// for each processor, and never visible to software; the LFSR and the
// entropy input are this design's choice of how to get it. key_o goes only to
// the cipher instances inside the monitoring hardware.
module impres_keygen
  import impres_pkg::*;
#(
  parameter logic [KEY_W-1:0] SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             entropy_i,
  input  logic             new_key_i,
  output logic [KEY_W-1:0] key_o
);

  localparam logic [KEY_W-1:0] TAPS = 64'hD800_0000_0000_0000;

  logic [KEY_W-1:0] lfsr_q, lfsr_d;
  logic [KEY_W-1:0] key_q;

  always_comb begin
    lfsr_d = lfsr_q >> 1;
    if (lfsr_q[0] ^ entropy_i) lfsr_d = lfsr_d ^ TAPS;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      lfsr_q <= SEED;
      key_q  <= SEED;
    end else begin
      lfsr_q <= (lfsr_d == '0) ? SEED : lfsr_d;
      if (new_key_i) key_q <= (lfsr_q == '0) ? SEED : lfsr_q;
    end
  end

  assign key_o = key_q;

endmodule
