// impres_loader_port: the hardware side of secure loading.
//
// The loader computes nothing secret: it hands each basic block's plain
// checksum (computed at compile time) to this port and writes the encrypted
// value it gets back into the block's chk instruction. The port encrypts
// with the current hardware key, which software never sees.
//
// Load window: load_start_i opens it (and, in the top level, makes the key
// generator draw a new key, in force from the next cycle); load_done_i closes
// it. loading_o is high while it is open. Encryption is served only inside the
// window, so code running after the load cannot use the port to forge chk
// instructions for injected code; a request outside it is answered with
// rsp_err_o high and rsp_data_o zero.
//
// Handshake: one request per cycle, req_valid_i with req_chk_i; the answer
// appears on rsp_valid_o / rsp_data_o / rsp_err_o exactly one cycle later.
// A request in the cycle of load_start_i is outside the window.
//
// That the loader encrypts with a per-load hardware key follows the IMPRES scheme;
// the window, the handshake and the error answer are this design's choices.
module impres_loader_port
  import impres_pkg::*;
#(
  parameter int unsigned ROUNDS = 4
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             load_start_i,
  input  logic             load_done_i,
  input  logic [KEY_W-1:0] key_i,
  input  logic             req_valid_i,
  input  logic [CHK_W-1:0] req_chk_i,
  output logic             loading_o,
  output logic             rsp_valid_o,
  output logic [CHK_W-1:0] rsp_data_o,
  output logic             rsp_err_o
);

  logic             loading_q;
  logic             rsp_valid_q, rsp_err_q;
  logic [CHK_W-1:0] rsp_data_q;
  logic [CHK_W-1:0] enc;

  impres_cipher #(.ROUNDS(ROUNDS)) u_cipher (
    .key_i   (key_i),
    .plain_i (req_chk_i),
    .cipher_o(enc)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      loading_q   <= 1'b0;
      rsp_valid_q <= 1'b0;
      rsp_err_q   <= 1'b0;
      rsp_data_q  <= '0;
    end else begin
      if (load_start_i)     loading_q <= 1'b1;
      else if (load_done_i) loading_q <= 1'b0;
      rsp_valid_q <= req_valid_i;
      if (req_valid_i) begin
        rsp_err_q  <= !loading_q;
        rsp_data_q <= loading_q ? enc : '0;
      end
    end
  end

  assign loading_o   = loading_q;
  assign rsp_valid_o = rsp_valid_q;
  assign rsp_data_o  = rsp_data_q;
  assign rsp_err_o   = rsp_err_q;

  // Every answer belongs to a request made in the previous cycle.
  a_rsp_follows_req: assert property (@(posedge clk_i) disable iff (!rst_ni)
    rsp_valid_o |-> $past(req_valid_i));
  // A window is not opened and closed in the same cycle.
  a_start_done_exclusive: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(load_start_i && load_done_i));

endmodule
