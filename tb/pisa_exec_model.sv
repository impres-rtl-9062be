// pisa_exec_model: behavioural model of the processor the monitor is
// attached to, for testbenches only.
//
// It holds a program of 64-bit PISA words in mem[] (written by the
// testbench) and, after start_i, "executes" it one instruction per cycle
// (with optional random bubbles), presenting each executed instruction on
// ex_valid_o / ex_instr_o. Data are not modelled, only control flow:
//   - chk (0x00F0) and non-boundary opcodes 0x00, 0x20..0x9F fall through;
//   - J/JAL (0x01, 0x02) and every other CFI except BNE jump to the absolute
//     word address in field bits [15:0]; address HALT_ADDR halts the model;
//   - BNE (0x06) is a loop back-edge: it is taken field bits [23:16] times in
//     a row (to the address in bits [15:0]) and then falls through once.
// Any other opcode, or a fetch outside mem[], stops the model with sys_err_o
// (the processor's own illegal-instruction or bus error). abort_i (a monitor
// signal) stops it too. exec_mark[] records which addresses were executed.
module pisa_exec_model #(
  parameter int MEM_WORDS  = 4096,
  parameter int BUBBLE_PCT = 20
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,
  input  logic        abort_i,
  output logic        ex_valid_o,
  output logic [63:0] ex_instr_o,
  output logic        running_o,
  output logic        halted_o,
  output logic        sys_err_o
);

  localparam logic [15:0] HALT_ADDR = 16'hFFFF;

  logic [63:0] mem       [MEM_WORDS];
  bit          exec_mark [MEM_WORDS];
  int unsigned loop_cnt  [MEM_WORDS];
  int unsigned pc;
  int unsigned n_exec;

  function automatic bit valid_op(input logic [15:0] op);
    return op == 16'h00F0 || op == 16'h0000 || (op >= 16'h0001 && op <= 16'h000C) ||
           (op >= 16'h0020 && op <= 16'h009F);
  endfunction

  initial begin
    foreach (mem[i]) mem[i] = '0;
  end

  always @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ex_valid_o <= 1'b0;
      ex_instr_o <= '0;
      running_o  <= 1'b0;
      halted_o   <= 1'b0;
      sys_err_o  <= 1'b0;
      pc         = 0;
      n_exec     = 0;
    end else begin
      ex_valid_o <= 1'b0;
      if (start_i) begin
        running_o <= 1'b1;
        halted_o  <= 1'b0;
        sys_err_o <= 1'b0;
        pc         = 0;
        n_exec     = 0;
        foreach (exec_mark[i]) exec_mark[i] = 0;
        foreach (loop_cnt[i]) loop_cnt[i] = 0;
      end else if (abort_i) begin
        running_o <= 1'b0;
      end else if (running_o && ($urandom % 100) >= BUBBLE_PCT) begin
        if (pc >= MEM_WORDS || !valid_op(mem[pc][47:32])) begin
          sys_err_o <= 1'b1;
          running_o <= 1'b0;
        end else begin
          logic [63:0] w;
          w = mem[pc];
          ex_valid_o <= 1'b1;
          ex_instr_o <= w;
          exec_mark[pc] = 1;
          n_exec++;
          if (w[47:32] >= 16'h0001 && w[47:32] <= 16'h000C) begin
            if (w[47:32] == 16'h0006) begin
              if (loop_cnt[pc] < 32'(w[23:16])) begin
                loop_cnt[pc]++;
                pc = 32'(w[15:0]);
              end else begin
                loop_cnt[pc] = 0;
                pc++;
              end
            end else if (w[15:0] == HALT_ADDR) begin
              halted_o  <= 1'b1;
              running_o <= 1'b0;
            end else begin
              pc = 32'(w[15:0]);
            end
          end else begin
            pc++;
          end
        end
      end
    end
  end

endmodule
