// tb_impres_keygen: key generator against the reference LFSR. Random entropy
// bits and random load requests; the key must equal the LFSR state of the
// load cycle, stay constant between loads and differ from load to load.
module tb_impres_keygen;
  import impres_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic entropy, new_key;
  logic [63:0] key, lfsr_m, key_m, prev_key;
  int checks = 0, failures = 0, loads = 0, repeats = 0;

  impres_keygen dut (.clk_i(clk), .rst_ni(rst_n), .entropy_i(entropy), .new_key_i(new_key),
                     .key_o(key));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    entropy = 0; new_key = 0;
    lfsr_m = 64'h9E37_79B9_7F4A_7C15;
    key_m  = lfsr_m;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (key != key_m) failures++;
    prev_key = key;
    lfsr_m = ref_lfsr(lfsr_m, 1'b0);  // the edge before the first stimulus
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      entropy = 1'($urandom);
      new_key = ($urandom % 50) == 0;
      @(posedge clk);
      if (new_key) key_m = lfsr_m;
      lfsr_m = ref_lfsr(lfsr_m, entropy);
      #1;
      checks++;
      if (key != key_m) begin
        failures++;
        if (failures < 5) $display("key %h expected %h", key, key_m);
      end
      if (new_key) begin
        loads++;
        if (key == prev_key) repeats++;
        prev_key = key;
      end
    end
    checks++;
    if (loads < 100 || repeats != 0) begin
      failures++;
      $display("loads %0d, repeated keys %0d", loads, repeats);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
