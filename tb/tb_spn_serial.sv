// tb_spn_serial: fully serial encryption.
//  - default 16-bit SPN (4 rounds, key 6E790, compact S-box): the worked
//    example DEBE -> 2AA3 and the pipelining example blocks, each in
//    exactly 1 + 4*5 = 21 clocks, then random keys and blocks against the
//    reference model;
//  - 64-bit SPN with an 80-bit key and 31 rounds: 1 + 31*17 = 528 clocks
//    per block, random blocks against the reference model.
module tb_spn_serial;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        kf, pf, rdy, cf, rdy64, cf64;
  logic [79:0] k;
  logic [63:0] p, c64;
  logic [15:0] c;

  spn_serial u_dut (.clk, .rst_n, .k_flag(kf), .k(k[19:0]), .p_flag(pf), .p(p[15:0]),
                    .ready(rdy), .c_flag(cf), .c);
  spn_serial #(.B(64), .KAPPA(80), .R(31), .ALPHA(61), .GAMMA(19), .COMPACT(1'b0)) u64 (
    .clk, .rst_n, .k_flag(kf), .k, .p_flag(pf), .p, .ready(rdy64), .c_flag(cf64), .c(c64));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_key(input logic [79:0] key);
    @(negedge clk); k = key; kf = 1; @(negedge clk); kf = 0;
  endtask

  task automatic run16(input logic [15:0] pt, input logic [15:0] exp);
    int lat;
    p = 64'(pt); pf = 1; @(negedge clk); pf = 0; lat = 1;
    while (!cf) begin @(negedge clk); lat++; end
    check($sformatf("16-bit %h", pt), 64'(c), 64'(exp));
    check("16-bit clocks per block", 64'(lat), 21);
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kf = 0; pf = 0; k = '0; p = '0;
    #12 rst_n = 1;
    load_key(80'h6E790);
    run16(16'hDEBE, 16'h2AA3);
    run16(16'hBCA8, 16'hAB2F);
    run16(16'hCC85, 16'hC2BF);
    run16(16'h662A, 16'h6C2F);
    run16(16'h8D0B, 16'h8CA8);
    for (int n = 0; n < 20; n++) begin
      automatic word_t kk = rand_word(), pp = rand_word();
      if (n % 4 == 0) begin
        while (!rdy64) @(negedge clk);
        load_key(kk[79:0]);
      end
      run16(pp[15:0], 16'(ref_encrypt(word_t'(pp[15:0]), word_t'(k[19:0]), 16, 20, 4, 13, 8)));
    end
    for (int n = 0; n < 6; n++) begin
      automatic word_t kk = rand_word(), pp = rand_word();
      int lat;
      while (!rdy64) @(negedge clk);
      if (n % 3 == 0) load_key(kk[79:0]);
      p = pp[63:0]; pf = 1; @(negedge clk); pf = 0; lat = 1;
      while (!cf64) begin @(negedge clk); lat++; end
      check("64-bit ciphertext", c64, 64'(ref_encrypt(pp, word_t'(k), 64, 80, 31, 61, 19)));
      check("64-bit clocks per block", 64'(lat), 528);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
