// tb_impres_checksum: the iChkSum register against the reference fold.
// Random instruction streams with random enable gaps and clears; checks the
// combinational next value every cycle and the register after each edge.
module tb_impres_checksum;
  import impres_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clear, en;
  logic [63:0] instr;
  logic [31:0] sum, nxt, model;
  int checks = 0, failures = 0;

  impres_checksum dut (.clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .en_i(en),
                       .instr_i(instr), .sum_o(sum), .next_o(nxt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; en = 0; instr = '0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (sum != 32'd0) failures++;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      clear = ($urandom % 16) == 0;
      en    = ($urandom % 4) != 0;
      instr = {$urandom, $urandom};
      #1;
      checks++;
      if (nxt != ref_fold(model, instr)) begin
        failures++;
        if (failures < 5) $display("next %h expected %h", nxt, ref_fold(model, instr));
      end
      if (clear) model = '0;
      else if (en) model = ref_fold(model, instr);
      @(posedge clk); #1;
      checks++;
      if (sum != model) begin
        failures++;
        if (failures < 5) $display("sum %h expected %h", sum, model);
      end
    end
    // A single flipped bit anywhere in an instruction changes the checksum.
    for (int b = 0; b < 64; b++) begin
      checks++;
      if (ref_fold(32'h1234_5678, 64'hA5A5_0F0F_3C3C_9696) ==
          ref_fold(32'h1234_5678, 64'hA5A5_0F0F_3C3C_9696 ^ (64'd1 << b))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
