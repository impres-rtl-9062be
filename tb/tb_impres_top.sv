// tb_impres_top: end-to-end test of the IMPRES monitoring hardware at its
// default parameters, with a behavioural processor model running
// instrumented programs.
//
// Flow: programs of random basic blocks (with loops) are built, loaded
// through the secure-loader port (the testbench acts as the loader: it opens
// the load window, has every block's plain checksum encrypted and writes the
// answer into the block's chk word), and executed. The test then
//   - runs intact programs and expects them to halt with no signal;
//   - asks for encryption outside the load window and expects a refusal;
//   - reloads a program and expects different encrypted checksums (new key);
//   - runs the previous load's image under the new key and expects SIGCKSM;
//   - corrupts one block in each of the ten ways of the IMPRES violation list
//     and expects SIGCKSM (T1, T3-T8), SIGNCFI (T2, T9) or either (T10);
//   - checks that every signal comes one cycle after the CFI or chk that
//     caused it, and that a load after an aborted run starts clean.
// Every mechanism is counted and a mechanism never seen is a failure.
module tb_impres_top;
  import impres_pkg::*;
  import impres_ref_pkg::*;
  import impres_prog_pkg::*;

  logic clk = 0, rst_n = 0;
  logic entropy, load_start, load_done, loading;
  logic enc_req_valid, enc_rsp_valid, enc_rsp_err;
  logic [31:0] enc_req_chk, enc_rsp_data;
  logic ex_valid;
  logic [63:0] ex_instr;
  logic sig_cksm, sig_ncfi, fbb;
  logic cpu_start, cpu_running, cpu_halted, cpu_sys_err;

  int checks = 0, failures = 0, cyc = 0, last_cfi = -10, last_chk = -10;
  int n_clean = 0, n_cksm = 0, n_ncfi = 0, n_refused = 0, n_key_change = 0;
  int n_replay = 0, n_loops = 0, n_clean_after_abort = 0, n_latency = 0;

  impres_top dut (
    .clk_i(clk), .rst_ni(rst_n), .entropy_i(entropy),
    .load_start_i(load_start), .load_done_i(load_done), .loading_o(loading),
    .enc_req_valid_i(enc_req_valid), .enc_req_chk_i(enc_req_chk),
    .enc_rsp_valid_o(enc_rsp_valid), .enc_rsp_data_o(enc_rsp_data), .enc_rsp_err_o(enc_rsp_err),
    .ex_valid_i(ex_valid), .ex_instr_i(ex_instr),
    .sig_cksm_o(sig_cksm), .sig_ncfi_o(sig_ncfi), .fbb_o(fbb)
  );

  pisa_exec_model #(.MEM_WORDS(1024)) u_cpu (
    .clk_i(clk), .rst_ni(rst_n), .start_i(cpu_start), .abort_i(sig_cksm || sig_ncfi),
    .ex_valid_o(ex_valid), .ex_instr_o(ex_instr), .running_o(cpu_running),
    .halted_o(cpu_halted), .sys_err_o(cpu_sys_err)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    entropy <= 1'($urandom);
    if (rst_n) begin
      if (sig_cksm) begin
        checks++;
        n_latency++;
        if (cyc - last_cfi != 1) failures++;
      end
      if (sig_ncfi) begin
        checks++;
        n_latency++;
        if (cyc - last_chk != 1) failures++;
      end
      if (ex_valid && ref_class(ex_instr) == 2) last_cfi = cyc;
      if (ex_valid && ref_class(ex_instr) == 1) last_chk = cyc;
    end
  end

  // Asks the hardware to encrypt one checksum; returns the answer.
  task automatic encrypt(input logic [31:0] plain, output logic [31:0] enc, output logic err);
    @(negedge clk);
    enc_req_valid = 1;
    enc_req_chk   = plain;
    @(negedge clk);
    enc_req_valid = 0;
    checks++;
    if (!enc_rsp_valid) failures++;
    enc = enc_rsp_data;
    err = enc_rsp_err;
  endtask

  // Secure load: new key, encrypted checksums written into the chk words.
  task automatic secure_load(input word_q_t words, input int_q_t bb_addr, input sum_q_t plain,
                             output word_q_t image);
    logic [31:0] e;
    logic err;
    image = words;
    @(negedge clk);
    load_start = 1;
    @(negedge clk);
    load_start = 0;
    checks++;
    if (!loading || fbb !== 1'b1) failures++;
    foreach (bb_addr[i]) begin
      encrypt(plain[i], e, err);
      checks++;
      if (err) failures++;
      image[bb_addr[i]] = mk_chk(e);
    end
    @(negedge clk);
    load_done = 1;
    @(negedge clk);
    load_done = 0;
    checks++;
    if (loading) failures++;
    foreach (image[i]) u_cpu.mem[i] = image[i];
  endtask

  // 0 halted cleanly, 1 SIGCKSM, 2 SIGNCFI, 3 processor error, 4 hung
  task automatic run(output int result);
    int t;
    @(negedge clk);
    cpu_start = 1;
    @(negedge clk);
    cpu_start = 0;
    result = 4;
    t = 0;
    while (t < 20000) begin
      @(posedge clk);
      #1;
      if (sig_cksm) begin result = 1; break; end
      if (sig_ncfi) begin result = 2; break; end
      if (cpu_sys_err) begin result = 3; break; end
      if (cpu_halted) begin
        // a signal for the last CFI arrives one cycle after it
        @(posedge clk);
        #1;
        result = sig_cksm ? 1 : sig_ncfi ? 2 : 0;
        break;
      end
      t++;
    end
    repeat (3) @(negedge clk);
  endtask

  function automatic word_q_t corrupt(input word_q_t img, input int s, input int e, input int t);
    int pos;
    pos = s + 1 + int'($urandom % 32'(e - s - 1));
    case (t)
      1: begin
           logic [63:0] w;
           do w = rand_nonbi(); while (w == img[pos]);
           img[pos] = w;
         end
      2: img[pos] = mk_chk($urandom);
      3: img[pos] = mk_instr(16'h0001, {16'h0, 16'(s)});
      4: img[s]   = img[s] ^ (64'd1 << ($urandom % 32));
      5: img[s]   = mk_instr(16'h0002, {16'h0, 16'(s + 1)});
      6: img[s]   = rand_nonbi();
      7: img[e]   = {img[e][63:48], (img[e][47:32] == 16'h0002) ? 16'h0001 : 16'h0002,
                     img[e][31:0]};
      8: img[e]   = {img[e][63:16], img[e][15:0] ^ 16'h0001};
      9: img[e]   = rand_nonbi();
      10: for (int i = s; i <= e; i++) img[i] = rand_nonbi();
      default: ;
    endcase
    return img;
  endfunction

  initial begin
    word_q_t words, image, old_image, bad;
    int_q_t sizes, bb_addr;
    sum_q_t plain;
    logic [31:0] e1, e2;
    logic err;
    int res, expect_sig;

    load_start = 0; load_done = 0; enc_req_valid = 0; enc_req_chk = 0; cpu_start = 0;
    entropy = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Encryption is refused outside a load window.
    encrypt(32'h1234_5678, e1, err);
    checks++;
    if (!err || e1 != 0) failures++; else n_refused++;

    // Intact programs run to the end without a signal.
    for (int p = 0; p < 6; p++) begin
      sizes = {};
      repeat (8 + $urandom % 8) sizes.push_back(1 + int'($urandom % 8));
      build_program(sizes, 40, words, bb_addr, plain);
      secure_load(words, bb_addr, plain, image);
      run(res);
      checks++;
      if (res != 0) begin
        failures++;
        $display("intact program %0d ended with %0d", p, res);
      end else n_clean++;
      if (u_cpu.n_exec > words.size()) n_loops++;
    end
    // Once loaded, a program can be run again.
    run(res);
    checks++;
    if (res != 0) failures++; else n_clean++;

    // Reloading draws a new key: same checksums, other encrypted values,
    // and the previous image no longer passes.
    old_image = image;
    secure_load(words, bb_addr, plain, image);
    checks++;
    if (image[bb_addr[0]] == old_image[bb_addr[0]]) failures++; else n_key_change++;
    foreach (old_image[i]) u_cpu.mem[i] = old_image[i];
    run(res);
    checks++;
    if (res != 1) failures++; else n_replay++;
    foreach (image[i]) u_cpu.mem[i] = image[i];
    run(res);
    checks++;
    if (res != 0) failures++; else n_clean++;

    // The ten violation types on a block in the middle of the program.
    for (int rep = 0; rep < 3; rep++) begin
      for (int t = 1; t <= 10; t++) begin
        int b, s, e;
        sizes = {};
        repeat (6) sizes.push_back(2 + int'($urandom % 6));
        build_program(sizes, 0, words, bb_addr, plain);
        secure_load(words, bb_addr, plain, image);
        b = 2;
        s = bb_addr[b];
        e = bb_addr[b+1] - 1;
        bad = corrupt(image, s, e, t);
        foreach (bad[i]) u_cpu.mem[i] = bad[i];
        run(res);
        expect_sig = (t == 2 || t == 9) ? 2 : 1;
        checks++;
        if (t == 10 ? !(res == 1 || res == 2) : res != expect_sig) begin
          failures++;
          $display("T%0d: result %0d", t, res);
        end
        if (res == 1) n_cksm++;
        if (res == 2) n_ncfi++;
        // A fresh load after the aborted run starts clean.
        secure_load(words, bb_addr, plain, image);
        run(res);
        checks++;
        if (res != 0) failures++; else n_clean_after_abort++;
      end
    end

    // Every mechanism must have been exercised.
    checks++;
    if (n_clean == 0 || n_cksm == 0 || n_ncfi == 0 || n_refused == 0 || n_key_change == 0 ||
        n_replay == 0 || n_loops == 0 || n_clean_after_abort == 0 || n_latency == 0) failures++;
    $display("clean runs %0d, SIGCKSM %0d, SIGNCFI %0d, refused %0d, key changes %0d, replays %0d",
             n_clean, n_cksm, n_ncfi, n_refused, n_key_change, n_replay);
    $display("programs with loops %0d, clean after abort %0d, signal latencies checked %0d",
             n_loops, n_clean_after_abort, n_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
