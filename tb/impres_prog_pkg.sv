// impres_prog_pkg: builds instrumented test programs for the IMPRES
// testbenches, playing the role of the compile-time instrumentation.
//
// A program is a list of basic blocks laid out one after another from word
// address 0. Block i is: a chk word, sizes[i] random non-boundary
// instructions and one CFI. The CFI of the last block jumps to the halt
// address; any other block ends either with a BNE loop back-edge to an
// earlier block (taken 1 to 3 times; loops follow one another, they do not
// cross) or with a jump to the next block. The plain checksum of each block
// (fold of its non-BIs and CFI from zero) is returned; the chk words are left
// with a zero field for the loader to fill with the encrypted value.
package impres_prog_pkg;
  import impres_ref_pkg::*;

  typedef logic [63:0] word_q_t[$];
  typedef int          int_q_t[$];
  typedef logic [31:0] sum_q_t[$];

  function automatic void build_program(input int_q_t sizes, input int loop_pct,
                                        output word_q_t words, output int_q_t bb_addr,
                                        output sum_q_t plain);
    int addr, loop_floor;
    int_q_t starts;
    words = {};
    bb_addr = {};
    plain = {};
    addr = 0;
    foreach (sizes[i]) begin
      starts.push_back(addr);
      addr += sizes[i] + 2;
    end
    loop_floor = 0;
    foreach (sizes[i]) begin
      logic [31:0] s;
      logic [63:0] cfi;
      word_q_t body;
      for (int k = 0; k < sizes[i]; k++) body.push_back(rand_nonbi());
      if (i == sizes.size() - 1) begin
        cfi = mk_instr(16'h0001, {16'($urandom), 16'hFFFF});
      end else if (int'($urandom % 100) < loop_pct) begin
        int j;
        j = loop_floor + int'($urandom % 32'(i - loop_floor + 1));
        cfi = mk_instr(16'h0006, {8'($urandom), 8'(1 + $urandom % 3), 16'(starts[j])});
        loop_floor = i + 1;
      end else begin
        logic [15:0] op;
        do op = 16'(1 + $urandom % 12); while (op == 16'h0006);
        cfi = mk_instr(op, {16'($urandom), 16'(starts[i+1])});
      end
      body.push_back(cfi);
      s = 32'd0;
      foreach (body[k]) s = ref_fold(s, body[k]);
      bb_addr.push_back(words.size());
      plain.push_back(s);
      words.push_back(mk_chk(32'd0));
      foreach (body[k]) words.push_back(body[k]);
    end
  endfunction

endpackage
