// impres_ref_pkg: reference models used by the IMPRES testbenches.
//
// Written from the specification of each block rather than from its RTL:
// the instruction classes, the checksum fold, the Feistel checksum cipher and
// the key LFSR. Also helpers to build 64-bit PISA instruction words.
package impres_ref_pkg;

  localparam logic [15:0] R_OPC_CHK = 16'h00F0;

  // 0 = non-boundary, 1 = chk, 2 = control-flow instruction
  function automatic int ref_class(input logic [63:0] w);
    int op;
    op = int'(w[47:32]);
    if (op == 'hF0 && w[63:48] == 16'h0) return 1;
    if (op >= 1 && op <= 12) return 2;
    return 0;
  endfunction

  function automatic logic [31:0] ref_fold(input logic [31:0] s, input logic [63:0] w);
    logic [31:0] r;
    r = {s[30:0], s[31]};
    return r ^ w[63:32] ^ w[31:0];
  endfunction

  function automatic logic [15:0] ref_rol16(input logic [15:0] v, input int n);
    logic [31:0] d;
    d = {v, v} << n;
    return d[31:16];
  endfunction

  function automatic logic [31:0] ref_encrypt(input logic [63:0] key, input logic [31:0] p,
                                              input int rounds = 4);
    logic [15:0] l, r, t, k, f, sum;
    logic [127:0] kk;
    l = p[31:16];
    r = p[15:0];
    kk = {key, key};
    for (int i = 0; i < rounds; i++) begin
      k   = kk[(16 * (i % 4)) +: 16] ^ 16'(i);
      sum = r + k;
      f   = ref_rol16(sum, 5) ^ (r & ref_rol16(r, 9));
      t   = l ^ f;
      l   = r;
      r   = t;
    end
    return {l, r};
  endfunction

  // One step of the key LFSR with an entropy bit mixed into the feedback.
  function automatic logic [63:0] ref_lfsr(input logic [63:0] s, input logic e);
    logic fb;
    logic [63:0] n;
    fb = s[0] ^ e;
    n  = {1'b0, s[63:1]};
    if (fb) begin
      n[63] = ~n[63];
      n[62] = ~n[62];
      n[60] = ~n[60];
      n[59] = ~n[59];
    end
    if (n == 64'd0) n = 64'h9E37_79B9_7F4A_7C15;
    return n;
  endfunction

  function automatic logic [63:0] mk_instr(input logic [15:0] op, input logic [31:0] fields,
                                           input logic [15:0] annote = 16'h0);
    return {annote, op, fields};
  endfunction

  function automatic logic [63:0] mk_chk(input logic [31:0] echk);
    return {16'h0, R_OPC_CHK, echk};
  endfunction

  // A random non-boundary instruction (ALU/load/store opcodes 0x20..0x9F).
  function automatic logic [63:0] rand_nonbi();
    logic [15:0] op;
    op = 16'(32'h20 + ($urandom % 32'h80));
    return {16'h0, op, 32'($urandom)};
  endfunction

  // A random CFI (opcodes 0x01..0x0C) with a random target/offset field.
  function automatic logic [63:0] rand_cfi();
    logic [15:0] op;
    op = 16'(1 + ($urandom % 12));
    return {16'h0, op, 32'($urandom)};
  endfunction

endpackage
