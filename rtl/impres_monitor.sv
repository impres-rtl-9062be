// impres_monitor: the run-time basic-block integrity monitor.
//
// It sees every instruction the processor executes (ex_valid_i, ex_instr_i)
// and does, in the same cycle, the extra micro-operations IMPRES adds to each
// instruction class:
//   chk      - load the carried encrypted checksum into eChkSum, restart
//              iChkSum; if fBB is clear (the previous block did not end with
//              a CFI) raise SIGNCFI; clear fBB.
//   non-BI   - fold the instruction into iChkSum; clear fBB.
//   CFI      - fold the instruction into iChkSum, encrypt the result with the
//              hardware key and compare it with eChkSum; a mismatch raises
//              SIGCKSM; set fBB.
// A program load (load_i) sets fBB and clears both checksum registers, so the
// first chk of the program passes.
//
// Timing: sig_cksm_o and sig_ncfi_o are registered one-cycle pulses, high in
// the cycle after the offending instruction. The monitor never stalls the
// processor. eChkSum, iChkSum and fBB are brought out for observation.
//
// The registers, the flag, the two error signals and when each is set follow
// the IMPRES scheme; the checksum fold and the cipher are this design's choices
// (see impres_checksum and impres_cipher).
module impres_monitor
  import impres_pkg::*;
#(
  parameter int unsigned ROUNDS = 4
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               load_i,
  input  logic [KEY_W-1:0]   key_i,
  input  logic               ex_valid_i,
  input  logic [INSTR_W-1:0] ex_instr_i,
  output logic               sig_cksm_o,
  output logic               sig_ncfi_o,
  output logic [CHK_W-1:0]   echk_o,
  output logic [CHK_W-1:0]   ichk_o,
  output logic               fbb_o
);

  instr_class_e     iclass;
  logic [CHK_W-1:0] chk_value;
  logic [CHK_W-1:0] ichk_next;
  logic [CHK_W-1:0] ichk_enc;
  logic [CHK_W-1:0] echk_q;
  logic             fbb_q;
  logic             cksm_q, ncfi_q;
  logic             is_chk, is_cfi;

  impres_instr_class u_class (
    .instr_i    (ex_instr_i),
    .class_o    (iclass),
    .chk_value_o(chk_value)
  );

  assign is_chk = ex_valid_i && (iclass == IC_CHK);
  assign is_cfi = ex_valid_i && (iclass == IC_CFI);

  impres_checksum u_ichk (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .clear_i(load_i || is_chk),
    .en_i   (ex_valid_i),
    .instr_i(ex_instr_i),
    .sum_o  (ichk_o),
    .next_o (ichk_next)
  );

  impres_cipher #(.ROUNDS(ROUNDS)) u_cipher (
    .key_i   (key_i),
    .plain_i (ichk_next),
    .cipher_o(ichk_enc)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      echk_q <= '0;
      fbb_q  <= 1'b1;
      cksm_q <= 1'b0;
      ncfi_q <= 1'b0;
    end else begin
      cksm_q <= is_cfi && (ichk_enc != echk_q);
      ncfi_q <= is_chk && !fbb_q;
      if (load_i) begin
        echk_q <= '0;
        fbb_q  <= 1'b1;
      end else if (ex_valid_i) begin
        if (is_chk) echk_q <= chk_value;
        fbb_q <= is_cfi;
      end
    end
  end

  assign echk_o     = echk_q;
  assign fbb_o      = fbb_q;
  assign sig_cksm_o = cksm_q;
  assign sig_ncfi_o = ncfi_q;

  // The two error signals come from different instruction classes.
  a_signals_exclusive: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(sig_cksm_o && sig_ncfi_o));

endmodule
