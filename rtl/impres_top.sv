// impres_top: the IMPRES monitoring hardware of a processor.
//
// It joins three parts: the key generator, which holds the secret hardware
// key and draws a new one at each program load; the secure-loader port,
// through which the loader has the plain checksums of the basic blocks
// encrypted with that key during the load; and the integrity monitor, which
// follows the processor's executed-instruction stream, re-computes each basic
// block's checksum, encrypts and compares it at the block's closing CFI
// (SIGCKSM on mismatch), and checks with the fBB flag that every block was
// left through a CFI (SIGNCFI otherwise).
//
// Interface: load_start_i starts a program load (new key, window open, fBB
// set, monitor registers cleared); load_done_i ends it. The enc_* signals are
// the loader's request/response port (answer one cycle after the request).
// ex_valid_i / ex_instr_i carry each instruction the processor executes, one
// per cycle at most. sig_cksm_o and sig_ncfi_o pulse for one cycle, the cycle
// after the offending instruction. The key is not brought out.
//
// The processor itself is not part of this module; in a full system the
// monitor's micro-operations sit in the processor's execute stage and the two
// signals raise exceptions there.
module impres_top
  import impres_pkg::*;
#(
  parameter int unsigned ROUNDS = 4
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               entropy_i,
  input  logic               load_start_i,
  input  logic               load_done_i,
  output logic               loading_o,
  input  logic               enc_req_valid_i,
  input  logic [CHK_W-1:0]   enc_req_chk_i,
  output logic               enc_rsp_valid_o,
  output logic [CHK_W-1:0]   enc_rsp_data_o,
  output logic               enc_rsp_err_o,
  input  logic               ex_valid_i,
  input  logic [INSTR_W-1:0] ex_instr_i,
  output logic               sig_cksm_o,
  output logic               sig_ncfi_o,
  output logic               fbb_o
);

  logic [KEY_W-1:0] key;
  logic [CHK_W-1:0] echk, ichk;

  impres_keygen u_keygen (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .entropy_i(entropy_i),
    .new_key_i(load_start_i),
    .key_o    (key)
  );

  impres_loader_port #(.ROUNDS(ROUNDS)) u_loader (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .load_start_i(load_start_i),
    .load_done_i (load_done_i),
    .key_i       (key),
    .req_valid_i (enc_req_valid_i),
    .req_chk_i   (enc_req_chk_i),
    .loading_o   (loading_o),
    .rsp_valid_o (enc_rsp_valid_o),
    .rsp_data_o  (enc_rsp_data_o),
    .rsp_err_o   (enc_rsp_err_o)
  );

  impres_monitor #(.ROUNDS(ROUNDS)) u_monitor (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .load_i    (load_start_i),
    .key_i     (key),
    .ex_valid_i(ex_valid_i),
    .ex_instr_i(ex_instr_i),
    .sig_cksm_o(sig_cksm_o),
    .sig_ncfi_o(sig_ncfi_o),
    .echk_o    (echk),
    .ichk_o    (ichk),
    .fbb_o     (fbb_o)
  );

endmodule
