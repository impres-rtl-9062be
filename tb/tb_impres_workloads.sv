// tb_impres_workloads: the five MiBench programs IMPRES was evaluated with, as
// synthetic instrumented programs, with single-instruction fault injection.
//
// The benchmarks themselves (MiBench adpcm, blowfish, crc32 compiled for
// PISA) are not available, so each is replaced by a random program with the
// same static shape: as many instructions as the uninstrumented benchmark
// and as many basic blocks (chk instructions) as instrumentation added:
//     benchmark          lines  lines with chk  basic blocks
//     adpcm.encode        402        460             58
//     adpcm.decode        397        452             55
//     blowfish.encrypt   2946       3085            139
//     blowfish.decrypt   2946       3085            139
//     crc32.checksum      527        607             80
// Each program is securely loaded and run intact (it must halt with no
// signal; its static size must match the table). Then INJECTIONS faults are
// injected one at a time: a random word of the program is replaced by a
// random valid instruction or has one bit flipped, the program is reloaded
// and run, and the outcome is classed as not activated (the word was never
// executed), caught by the processor (illegal opcode or address), SIGCKSM or
// SIGNCFI. An activated fault that nothing catches, or a run that hangs, is
// a failure. As in the IMPRES evaluation, 10000 faults are injected per benchmark.
module tb_impres_workloads;
  import impres_pkg::*;
  import impres_ref_pkg::*;
  import impres_prog_pkg::*;

  localparam int INJECTIONS = 10000;
  localparam int NAPPS = 5;

  logic clk = 0, rst_n = 0;
  logic entropy, load_start, load_done, loading;
  logic enc_req_valid, enc_rsp_valid, enc_rsp_err;
  logic [31:0] enc_req_chk, enc_rsp_data;
  logic ex_valid;
  logic [63:0] ex_instr;
  logic sig_cksm, sig_ncfi, fbb;
  logic cpu_start, cpu_running, cpu_halted, cpu_sys_err;
  int checks = 0, failures = 0;

  impres_top dut (
    .clk_i(clk), .rst_ni(rst_n), .entropy_i(entropy),
    .load_start_i(load_start), .load_done_i(load_done), .loading_o(loading),
    .enc_req_valid_i(enc_req_valid), .enc_req_chk_i(enc_req_chk),
    .enc_rsp_valid_o(enc_rsp_valid), .enc_rsp_data_o(enc_rsp_data), .enc_rsp_err_o(enc_rsp_err),
    .ex_valid_i(ex_valid), .ex_instr_i(ex_instr),
    .sig_cksm_o(sig_cksm), .sig_ncfi_o(sig_ncfi), .fbb_o(fbb)
  );

  pisa_exec_model #(.MEM_WORDS(4096), .BUBBLE_PCT(0)) u_cpu (
    .clk_i(clk), .rst_ni(rst_n), .start_i(cpu_start), .abort_i(sig_cksm || sig_ncfi),
    .ex_valid_o(ex_valid), .ex_instr_o(ex_instr), .running_o(cpu_running),
    .halted_o(cpu_halted), .sys_err_o(cpu_sys_err)
  );

  always #5 clk = ~clk;
  always @(posedge clk) entropy <= 1'($urandom);

  // Executed chk instructions (the run-time cost of instrumentation).
  int chk_exec = 0;
  always @(posedge clk) if (ex_valid && ref_class(ex_instr) == 1) chk_exec++;

  initial begin
    repeat (1000000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Secure load with the hardware port; the image goes into the model.
  task automatic secure_load(input word_q_t words, input int_q_t bb_addr, input sum_q_t plain);
    word_q_t image;
    image = words;
    @(negedge clk);
    load_start = 1;
    @(negedge clk);
    load_start = 0;
    foreach (bb_addr[i]) begin
      enc_req_valid = 1;
      enc_req_chk   = plain[i];
      @(negedge clk);
      enc_req_valid = 0;
      image[bb_addr[i]] = mk_chk(enc_rsp_data);
    end
    load_done = 1;
    @(negedge clk);
    load_done = 0;
    foreach (u_cpu.mem[i]) u_cpu.mem[i] = (i < image.size()) ? image[i] : 64'd0;
  endtask

  // 0 halted, 1 SIGCKSM, 2 SIGNCFI, 3 processor error, 4 hung
  task automatic run(output int result);
    int t;
    @(negedge clk);
    cpu_start = 1;
    @(negedge clk);
    cpu_start = 0;
    result = 4;
    for (t = 0; t < 200000; t++) begin
      @(posedge clk);
      #1;
      if (sig_cksm) begin result = 1; break; end
      if (sig_ncfi) begin result = 2; break; end
      if (cpu_sys_err) begin result = 3; break; end
      if (cpu_halted) begin
        @(posedge clk);
        #1;
        result = sig_cksm ? 1 : sig_ncfi ? 2 : 0;
        break;
      end
    end
    repeat (2) @(negedge clk);
  endtask

  function automatic logic [63:0] rand_valid_instr();
    int k;
    k = int'($urandom % 10);
    if (k == 0) return mk_chk($urandom);
    if (k <= 2) return rand_cfi();
    return rand_nonbi();
  endfunction

  initial begin
    string names [NAPPS] = '{"adpcm.encode", "adpcm.decode", "blowfish.encrypt",
                             "blowfish.decrypt", "crc32.checksum"};
    int lines_no [NAPPS] = '{402, 397, 2946, 2946, 527};
    int lines_chk[NAPPS] = '{460, 452, 3085, 3085, 607};
    word_q_t words;
    int_q_t sizes, bb_addr;
    sum_q_t plain;
    int res, nbb, nonbi, n_exec_clean, n_chk_exec, n_chk_dyn;
    int cnt[5];
    int n_activated_total;

    load_start = 0; load_done = 0; enc_req_valid = 0; enc_req_chk = 0; cpu_start = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    n_activated_total = 0;

    for (int a = 0; a < NAPPS; a++) begin
      nbb   = lines_chk[a] - lines_no[a];
      nonbi = lines_no[a] - nbb;  // every block has one CFI
      sizes = {};
      for (int b = 0; b < nbb; b++) sizes.push_back(0);
      for (int k = 0; k < nonbi; k++) begin
        int idx;
        idx = int'($urandom % 32'(nbb));
        sizes[idx]++;
      end
      build_program(sizes, 25, words, bb_addr, plain);
      checks++;
      if (words.size() != lines_chk[a] || bb_addr.size() != nbb) begin
        failures++;
        $display("%s: %0d words, %0d blocks", names[a], words.size(), bb_addr.size());
      end

      secure_load(words, bb_addr, plain);
      chk_exec = 0;
      run(res);
      n_exec_clean = int'(u_cpu.n_exec);
      n_chk_dyn = chk_exec;
      n_chk_exec = 0;
      foreach (bb_addr[i]) if (u_cpu.exec_mark[bb_addr[i]]) n_chk_exec++;
      checks++;
      if (res != 0) begin
        failures++;
        $display("%s: intact run ended with %0d", names[a], res);
      end

      foreach (cnt[i]) cnt[i] = 0;
      for (int f = 0; f < INJECTIONS; f++) begin
        int addr;
        logic [63:0] w;
        secure_load(words, bb_addr, plain);
        addr = int'($urandom % 32'(words.size()));
        w = u_cpu.mem[addr];
        if ($urandom % 2) begin
          do w = rand_valid_instr(); while (w == u_cpu.mem[addr]);
        end else begin
          w = w ^ (64'd1 << ($urandom % 64));
        end
        u_cpu.mem[addr] = w;
        run(res);
        checks++;
        if (res == 0 && !u_cpu.exec_mark[addr]) cnt[0]++;       // not activated
        else if (res == 3) cnt[1]++;                            // processor
        else if (res == 1) cnt[2]++;                            // SIGCKSM
        else if (res == 2) cnt[3]++;                            // SIGNCFI
        else begin
          cnt[4]++;
          failures++;
          $display("%s: fault at %0d (%h) not detected, result %0d", names[a], addr, w, res);
        end
      end
      n_activated_total += INJECTIONS - cnt[0];
      $display("%-17s %4d blocks %5d instrs, intact run %6d instrs executed (%0d distinct chk)",
               names[a], nbb, words.size(), n_exec_clean, n_chk_exec);
      $display("%-17s executed chk instructions add %0d%% to the instruction count (%0d of %0d)",
               names[a], 100 * n_chk_dyn / (n_exec_clean - n_chk_dyn), n_chk_dyn, n_exec_clean);
      $display("%-17s injected %0d: not activated %0d, processor %0d, SIGCKSM %0d, SIGNCFI %0d, missed %0d",
               names[a], INJECTIONS, cnt[0], cnt[1], cnt[2], cnt[3], cnt[4]);
      checks++;
      if (cnt[2] == 0) failures++;
    end
    checks++;
    if (n_activated_total == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
