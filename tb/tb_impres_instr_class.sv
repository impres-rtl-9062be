// tb_impres_instr_class: exhaustive check of the instruction classifier.
// Every one of the 65536 opcodes is presented with a random annotation and
// field word; the class and the extracted chk field are compared with the
// reference classification.
module tb_impres_instr_class;
  import impres_pkg::*;
  import impres_ref_pkg::*;

  logic [63:0]  instr;
  instr_class_e cls;
  logic [31:0]  chk_value;
  int checks = 0, failures = 0;
  int n_chk = 0, n_cfi = 0;

  impres_instr_class dut (.instr_i(instr), .class_o(cls), .chk_value_o(chk_value));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 65536; op++) begin
      instr = mk_instr(16'(op), $urandom, (op % 2 == 0) ? 16'h0 : 16'($urandom));
      #1;
      checks++;
      if (int'(cls) != ref_class(instr)) begin
        failures++;
        $display("opcode %h: class %0d expected %0d", op, cls, ref_class(instr));
      end
      if (cls == IC_CHK) n_chk++;
      if (cls == IC_CFI) n_cfi++;
      checks++;
      if (chk_value != instr[31:0]) failures++;
    end
    // chk with a non-zero annotation is not a chk.
    instr = mk_instr(16'h00F0, $urandom, 16'h0100);
    #1;
    checks++;
    if (cls != IC_NONBI) failures++;
    checks++;
    if (n_chk != 1 || n_cfi != 12) begin
      failures++;
      $display("class counts chk=%0d cfi=%0d", n_chk, n_cfi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
