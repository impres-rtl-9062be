// tb_impres_monitor: the integrity monitor against the code-integrity
// violations it is meant to catch.
//
// Each trial loads a program of three instrumented basic blocks P, A, B
// (chk, random non-boundary instructions, CFI), with the encrypted checksums
// worked out by the reference models, and executes them with random bubbles.
// Block A is then corrupted in one of the ten ways of the IMPRES violation list
// (T1..T10); T0 is the intact program. The expected signal is:
//   T0 none; T1, T3..T8 SIGCKSM; T2, T9 SIGNCFI; T10 either.
// An intact trial must raise nothing. Every SIGCKSM must come exactly one
// cycle after a CFI and every SIGNCFI one cycle after a chk.
module tb_impres_monitor;
  import impres_pkg::*;
  import impres_ref_pkg::*;

  localparam int TRIALS = 400;

  logic clk = 0, rst_n = 0;
  logic load, ex_valid;
  logic [63:0] key, ex_instr;
  logic cksm, ncfi, fbb;
  logic [31:0] echk, ichk;
  int checks = 0, failures = 0;
  int n_cksm = 0, n_ncfi = 0, cyc = 0, last_cfi = -10, last_chk = -10;
  int seen_by_type[11];

  impres_monitor dut (.clk_i(clk), .rst_ni(rst_n), .load_i(load), .key_i(key),
                      .ex_valid_i(ex_valid), .ex_instr_i(ex_instr), .sig_cksm_o(cksm),
                      .sig_ncfi_o(ncfi), .echk_o(echk), .ichk_o(ichk), .fbb_o(fbb));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Signal counting and latency checks.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (cksm) begin
        n_cksm++;
        checks++;
        if (cyc - last_cfi != 1) begin
          failures++;
          $display("SIGCKSM %0d cycles after the CFI", cyc - last_cfi);
        end
      end
      if (ncfi) begin
        n_ncfi++;
        checks++;
        if (cyc - last_chk != 1) begin
          failures++;
          $display("SIGNCFI %0d cycles after the chk", cyc - last_chk);
        end
      end
      if (ex_valid && ref_class(ex_instr) == 2) last_cfi = cyc;
      if (ex_valid && ref_class(ex_instr) == 1) last_chk = cyc;
    end
  end

  typedef logic [63:0] word_q_t[$];

  // Builds one instrumented basic block of n non-boundary instructions.
  function automatic word_q_t make_bb(input int n, input logic [63:0] k);
    word_q_t body, bb;
    logic [31:0] s;
    s = 32'd0;
    for (int i = 0; i < n; i++) body.push_back(rand_nonbi());
    body.push_back(rand_cfi());
    foreach (body[i]) s = ref_fold(s, body[i]);
    bb.push_back(mk_chk(ref_encrypt(k, s)));
    foreach (body[i]) bb.push_back(body[i]);
    return bb;
  endfunction

  task automatic exec(input logic [63:0] w);
    @(negedge clk);
    while (($urandom % 4) == 0) begin
      ex_valid = 0;
      ex_instr = {$urandom, $urandom};
      @(negedge clk);
    end
    ex_valid = 1;
    ex_instr = w;
    @(negedge clk);
    ex_valid = 0;
  endtask

  task automatic do_load();
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
  endtask

  // Applies violation type t to block a (a has at least two non-BIs).
  function automatic word_q_t corrupt(input word_q_t a, input int t);
    int last;
    int pos;
    last = a.size() - 1;
    pos  = 1 + ($urandom % (last - 1));  // a non-BI position
    case (t)
      1: a[pos] = a[pos] ^ (64'd1 << ($urandom % 64));
      2: a[pos] = mk_chk($urandom);
      3: a[pos] = rand_cfi();
      4: a[0]   = mk_chk(a[0][31:0] ^ (32'd1 << ($urandom % 32)));
      5: a[0]   = rand_cfi();
      6: a[0]   = rand_nonbi();
      7: begin
           logic [63:0] w;
           do w = rand_cfi(); while (w[47:32] == a[last][47:32]);
           a[last] = {w[63:32], a[last][31:0]};
         end
      8: a[last] = a[last] ^ (64'd1 << ($urandom % 26));
      9: a[last] = rand_nonbi();
      10: begin
           int n;
           int kind;
           n = a.size();
           kind = $urandom % 3;
           a.delete();
           for (int i = 0; i < n; i++) a.push_back(rand_nonbi());
           if (kind == 0) a[$urandom % n] = rand_cfi();
           if (kind == 1) a[$urandom % n] = mk_chk($urandom);
         end
      default: ;
    endcase
    return a;
  endfunction

  initial begin
    word_q_t p, a, b;
    int c0, n0, t;
    load = 0; ex_valid = 0; ex_instr = '0; key = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (fbb !== 1'b1) failures++;
    for (int trial = 0; trial < TRIALS; trial++) begin
      t = trial % 11;
      key = {$urandom, $urandom};
      p = make_bb(2 + $urandom % 6, key);
      a = make_bb(2 + $urandom % 6, key);
      b = make_bb(2 + $urandom % 6, key);
      a = corrupt(a, t);
      do_load();
      c0 = n_cksm;
      n0 = n_ncfi;
      foreach (p[i]) exec(p[i]);
      foreach (a[i]) exec(a[i]);
      foreach (b[i]) exec(b[i]);
      repeat (2) @(negedge clk);
      checks++;
      case (t)
        0: if (n_cksm != c0 || n_ncfi != n0) begin
             failures++;
             $display("intact program raised a signal");
           end
        2, 9: if (n_ncfi == n0) begin
             failures++;
             $display("T%0d: no SIGNCFI", t);
           end
        10: if (n_ncfi == n0 && n_cksm == c0) begin
             failures++;
             $display("T10: no signal");
           end
        default: if (n_cksm == c0) begin
             failures++;
             $display("T%0d: no SIGCKSM", t);
           end
      endcase
      if (n_cksm != c0 || n_ncfi != n0) seen_by_type[t]++;
    end
    // A program run under another key than it was loaded with fails at every CFI.
    key = 64'hFEED_FACE_0BAD_F00D;
    p = make_bb(3, key);
    key = key ^ 64'd1;
    do_load();
    c0 = n_cksm;
    foreach (p[i]) exec(p[i]);
    repeat (2) @(negedge clk);
    checks++;
    if (n_cksm != c0 + 1) failures++;
    // eChkSum holds the value carried by the last chk.
    checks++;
    if (echk != p[0][31:0]) failures++;
    $display("signals: SIGCKSM %0d SIGNCFI %0d", n_cksm, n_ncfi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
