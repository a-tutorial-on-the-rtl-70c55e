// tb_spn_round_key_setup: round key setup.
//  - 16-bit SPN, 4 rounds, key 6E790: all five round keys of the worked
//    example, valid 5 clocks after the k_flag clock;
//  - default 64-bit, 31 rounds: all 32 round keys against the reference
//    model for several keys, valid 32 clocks after the k_flag clock, and a
//    k_flag in the middle of a setup restarts it.
module tb_spn_round_key_setup;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        kf16, v16, kf, v;
  logic [19:0] k16;
  logic [79:0] k;
  logic [15:0] rk16 [5];
  logic [63:0] rk [32];

  spn_round_key_setup #(.B(16), .KAPPA(20), .R(4), .ALPHA(13), .GAMMA(8)) u16 (
    .clk, .rst_n, .k_flag(kf16), .k(k16), .keys_valid(v16), .rk(rk16));
  spn_round_key_setup u_dut (.clk, .rst_n, .k_flag(kf), .k, .keys_valid(v), .rk);

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam logic [15:0] RK [5] = '{16'h6E79, 16'h60DD, 16'h8EC3, 16'hD71E, 16'h71AA};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    kf16 = 0; kf = 0; k16 = '0; k = '0;
    #12 rst_n = 1;
    @(negedge clk); k16 = 20'h6E790; kf16 = 1; @(negedge clk); kf16 = 0; t = 0;
    while (!v16) begin @(negedge clk); t++; end
    check("16: setup clocks", 64'(t), 5);
    for (int r = 0; r < 5; r++) check($sformatf("16: RK%0d", r + 1), 64'(rk16[r]), 64'(RK[r]));
    for (int n = 0; n < 4; n++) begin
      automatic word_t kk = rand_word();
      if (n == 0) kk = '0;
      if (n == 2) begin
        // Interrupted setup: a second key arrives half way.
        k = ~kk[79:0]; kf = 1; @(negedge clk); kf = 0;
        repeat (10) @(negedge clk);
        check("not valid during setup", 64'(v), 0);
      end
      k = kk[79:0]; kf = 1; @(negedge clk); kf = 0; t = 0;
      check("not valid right after k_flag", 64'(v), 0);
      while (!v) begin @(negedge clk); t++; end
      check("64: setup clocks", 64'(t), 32);
      for (int r = 0; r < 32; r++)
        check($sformatf("64: key %0d RK%0d", n, r + 1), rk[r], 64'(ref_round_key(kk, r + 1, 64, 80, 61, 19)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
