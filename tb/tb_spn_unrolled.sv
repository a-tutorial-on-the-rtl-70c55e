// tb_spn_unrolled: loop-unrolled encryption.
//  - default (16-bit SPN, 4 rounds, 4 unrolled): the worked example
//    DEBE -> 2AA3 and the pipelining example blocks, one clock per block;
//  - 16-bit SPN with 8 rounds, 4 unrolled (2 clocks) and 2 unrolled
//    (4 clocks), and the 64-bit SPN with 16 rounds, 4 unrolled (4 clocks),
//    against the reference model.
module tb_spn_unrolled;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        kf, pf;
  logic [79:0] k;
  logic [63:0] p;
  logic        rdy_a, cf_a, rdy_b, cf_b, rdy_c, cf_c, rdy_d, cf_d;
  logic [15:0] c_a, c_b, c_c;
  logic [63:0] c_d;

  spn_unrolled u_a (.clk, .rst_n, .k_flag(kf), .k(k[19:0]), .p_flag(pf), .p(p[15:0]),
                    .ready(rdy_a), .c_flag(cf_a), .c(c_a));
  spn_unrolled #(.R(8), .M(4)) u_b (.clk, .rst_n, .k_flag(kf), .k(k[19:0]), .p_flag(pf), .p(p[15:0]),
                    .ready(rdy_b), .c_flag(cf_b), .c(c_b));
  spn_unrolled #(.R(8), .M(2), .COMPACT(1'b1)) u_c (.clk, .rst_n, .k_flag(kf), .k(k[19:0]), .p_flag(pf),
                    .p(p[15:0]), .ready(rdy_c), .c_flag(cf_c), .c(c_c));
  spn_unrolled #(.B(64), .KAPPA(80), .R(16), .ALPHA(61), .GAMMA(19), .M(4)) u_d (
                    .clk, .rst_n, .k_flag(kf), .k(k), .p_flag(pf), .p(p),
                    .ready(rdy_d), .c_flag(cf_d), .c(c_d));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Send one block to all four; check each result at its own latency.
  task automatic run(input logic [63:0] pt, input logic [15:0] exp_a);
    int t = 0;
    bit da = 0, db = 0, dc = 0, dd = 0;
    p = pt; pf = 1; @(negedge clk); pf = 0;
    repeat (4) begin
      t++;
      if (cf_a && !da) begin da = 1; check("4/4 latency", 64'(t), 1); check("4/4 c", 64'(c_a), 64'(exp_a)); end
      if (cf_b && !db) begin db = 1; check("8/4 latency", 64'(t), 2);
        check("8/4 c", 64'(c_b), 64'(ref_encrypt(word_t'(pt[15:0]), word_t'(k[19:0]), 16, 20, 8, 13, 8))); end
      if (cf_c && !dc) begin dc = 1; check("8/2 latency", 64'(t), 4);
        check("8/2 c", 64'(c_c), 64'(ref_encrypt(word_t'(pt[15:0]), word_t'(k[19:0]), 16, 20, 8, 13, 8))); end
      if (cf_d && !dd) begin dd = 1; check("64-bit 16/4 latency", 64'(t), 4);
        check("64-bit 16/4 c", c_d, 64'(ref_encrypt(word_t'(pt), word_t'(k), 64, 80, 16, 61, 19))); end
      @(negedge clk);
    end
    check("all four finished", 64'({da, db, dc, dd}), 64'hF);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kf = 0; pf = 0; p = '0; k = 80'h6E790;
    #12 rst_n = 1;
    @(negedge clk); kf = 1; @(negedge clk); kf = 0;
    run(64'hDEBE, 16'h2AA3);
    run(64'hBCA8, 16'hAB2F);
    run(64'hCC85, 16'hC2BF);
    run(64'h662A, 16'h6C2F);
    run(64'h8D0B, 16'h8CA8);
    for (int n = 0; n < 10; n++) begin
      automatic word_t kk = rand_word(), pp = rand_word();
      k = kk[79:0];
      @(negedge clk); kf = 1; @(negedge clk); kf = 0;
      run(pp[63:0], 16'(ref_encrypt(word_t'(pp[15:0]), word_t'(k[19:0]), 16, 20, 4, 13, 8)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
