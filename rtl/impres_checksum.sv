// impres_checksum: the iChkSum register, the run-time checksum of the
// current basic block.
//
// Every executed instruction other than chk is folded into the checksum as it
// executes, so the work is spread over all instructions instead of being done
// at block boundaries. The fold is
//     next = rotate_left(sum, 1) ^ instr[63:32] ^ instr[31:0]
// which changes for any single-bit change of an instruction and, through the
// rotation, depends on the order of the instructions. clear_i (a chk or a
// program load) restarts the sum at CHK_INIT.
//
// Interface and timing: when en_i is high the register takes next_o at the
// clock edge; next_o is combinational, so a CFI can encrypt and compare the
// checksum that includes itself in the cycle it executes. clear_i wins over
// en_i. The IMPRES scheme states only that the checksum is computed incrementally
// by micro-instructions and covers CFIs; the fold function is this design's
// choice.
module impres_checksum
  import impres_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               clear_i,
  input  logic               en_i,
  input  logic [INSTR_W-1:0] instr_i,
  output logic [CHK_W-1:0]   sum_o,
  output logic [CHK_W-1:0]   next_o
);

  logic [CHK_W-1:0] sum_q;

  assign next_o = {sum_q[CHK_W-2:0], sum_q[CHK_W-1]}
                  ^ instr_i[INSTR_W-1:CHK_W] ^ instr_i[CHK_W-1:0];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      sum_q <= CHK_INIT;
    else if (clear_i) sum_q <= CHK_INIT;
    else if (en_i)    sum_q <= next_o;
  end

  assign sum_o = sum_q;

endmodule
