// impres_instr_class: classifies an executed PISA instruction for the
// integrity monitor.
//
// A basic block of instrumented code is bounded by two kinds of boundary
// instruction: the chk instruction that opens it and the control-flow
// instruction (CFI) that closes it; everything else is a non-boundary
// instruction. This purely combinational decoder looks at the first 32-bit
// word: opcode OPC_CHK with a zero annotation field gives IC_CHK, the PISA
// jump and branch opcodes give IC_CFI, anything else IC_NONBI. Because chk is
// the one instruction that is not folded into the checksum, it is recognised
// only by its whole first word: a chk with any bit of that word flipped is
// treated as an ordinary instruction and so caught by the checksum. For a chk it also hands out the 32-bit encrypted
// checksum carried in the instruction's field word (chk_value_o is the field
// word for every instruction; only a chk gives it a meaning).
//
// The three classes follow the IMPRES scheme; the opcode values are this design's
// choice (see impres_pkg).
module impres_instr_class
  import impres_pkg::*;
(
  input  logic [INSTR_W-1:0] instr_i,
  output instr_class_e       class_o,
  output logic [CHK_W-1:0]   chk_value_o
);

  pisa_instr_t instr;
  assign instr = pisa_instr_t'(instr_i);

  always_comb begin
    if (instr.annote == '0 && instr.opcode == OPC_CHK)
      class_o = IC_CHK;
    else if (instr.opcode >= OPC_CFI_FIRST && instr.opcode <= OPC_CFI_LAST)
      class_o = IC_CFI;
    else
      class_o = IC_NONBI;
  end

  assign chk_value_o = instr.fields;

endmodule
