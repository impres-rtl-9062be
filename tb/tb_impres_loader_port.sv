// tb_impres_loader_port: the secure-loader encryption port. Opens and closes
// the load window at random, sends requests every cycle at random and checks
// each answer one cycle later: encrypted value inside the window, error
// outside it. Counts both cases.
module tb_impres_loader_port;
  import impres_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, done, req_valid, loading, rsp_valid, rsp_err;
  logic [31:0] req_chk, rsp_data;
  logic [63:0] key;
  int checks = 0, failures = 0, n_ok = 0, n_err = 0;

  impres_loader_port dut (.clk_i(clk), .rst_ni(rst_n), .load_start_i(start), .load_done_i(done),
                          .key_i(key), .req_valid_i(req_valid), .req_chk_i(req_chk),
                          .loading_o(loading), .rsp_valid_o(rsp_valid), .rsp_data_o(rsp_data),
                          .rsp_err_o(rsp_err));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic win_m, exp_valid, exp_err;
    logic [31:0] exp_data;
    start = 0; done = 0; req_valid = 0; req_chk = 0; key = 64'h1111_2222_3333_4444;
    win_m = 0; exp_valid = 0; exp_err = 0; exp_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      checks++;
      if (loading != win_m) failures++;
      checks++;
      if (rsp_valid != exp_valid) failures++;
      if (exp_valid) begin
        checks++;
        if (rsp_err != exp_err || rsp_data != exp_data) begin
          failures++;
          if (failures < 5) $display("rsp %h err %b expected %h err %b", rsp_data, rsp_err,
                                     exp_data, exp_err);
        end
        if (exp_err) n_err++; else n_ok++;
      end
      start = ($urandom % 40) == 0;
      done  = !start && (($urandom % 40) == 0);
      req_valid = ($urandom % 2) == 0;
      req_chk = $urandom;
      if (start) key = {$urandom, $urandom};
      exp_valid = req_valid;
      if (req_valid) begin
        exp_err  = !win_m;
        exp_data = win_m ? ref_encrypt(key, req_chk) : 32'd0;
      end
      if (start) win_m = 1;
      else if (done) win_m = 0;
    end
    checks++;
    if (n_ok < 100 || n_err < 100) begin
      failures++;
      $display("answers ok %0d err %0d", n_ok, n_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
