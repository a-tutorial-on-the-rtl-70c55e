// tb_spn_iterative: basic iterative encryption.
//  - default 64-bit / 80-bit-key / 31-round configuration: the four
//    published PRESENT-80 test vectors (mapped through the different last
//    round, see to_present) and random blocks against the reference model, latency of exactly R = 31 clocks from p_flag to
//    c_flag, and back-to-back blocks every 31 clocks;
//  - 16-bit SPN (4 rounds, key 6E790): DEBE -> 2AA3 in 4 clocks, with the
//    compact S-box.
module tb_spn_iterative;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        kf, pf, rdy, cf;
  logic [79:0] k;
  logic [63:0] p, c;
  logic        kf16, pf16, rdy16, cf16;
  logic [19:0] k16;
  logic [15:0] p16, c16;

  spn_iterative u_dut (.clk, .rst_n, .k_flag(kf), .k, .p_flag(pf), .p, .ready(rdy), .c_flag(cf), .c);
  spn_iterative #(.B(16), .KAPPA(20), .R(4), .ALPHA(13), .GAMMA(8), .COMPACT(1'b1)) u16 (
    .clk, .rst_n, .k_flag(kf16), .k(k16), .p_flag(pf16), .p(p16), .ready(rdy16), .c_flag(cf16), .c(c16));

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

  // PRESENT keeps the permutation in its 31st round and then adds RK_32;
  // this SPN replaces that permutation by the key mixing. The two outputs
  // are related by  C_present = PERM(C ^ RK_32) ^ RK_32.
  function automatic logic [63:0] to_present(input logic [63:0] cc, input logic [79:0] key);
    word_t rk32 = ref_round_key(word_t'(key), 32, 64, 80, 61, 19);
    return 64'(ref_perm(word_t'(cc) ^ rk32, 64) ^ rk32);
  endfunction

  task automatic encrypt_present(input logic [63:0] pt, input logic [63:0] exp_present);
    encrypt(pt, 64'(ref_encrypt(word_t'(pt), word_t'(k), 64, 80, 31, 61, 19)));
    check($sformatf("PRESENT-80 vector for %h", pt), to_present(c, k), exp_present);
  endtask

  // Encrypt one block and check result and latency.
  task automatic encrypt(input logic [63:0] pt, input logic [63:0] exp);
    int lat = 0;
    while (!rdy) @(negedge clk);
    p = pt; pf = 1; @(negedge clk); pf = 0; lat = 1;
    while (!cf) begin @(negedge clk); lat++; end
    check($sformatf("ciphertext of %h", pt), c, exp);
    check("latency", 64'(lat), 64'd31);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kf = 0; pf = 0; k = '0; p = '0; kf16 = 0; pf16 = 0; k16 = '0; p16 = '0;
    #12 rst_n = 1;
    // Published PRESENT-80 test vectors.
    load_key('0);
    encrypt_present(64'h0000000000000000, 64'h5579C1387B228445);
    encrypt_present(64'hFFFFFFFFFFFFFFFF, 64'hA112FFC72F68417B);
    load_key('1);
    encrypt_present(64'h0000000000000000, 64'hE72C46C0F5945049);
    encrypt_present(64'hFFFFFFFFFFFFFFFF, 64'h3333DCD3213210D2);
    // Random keys and blocks.
    for (int n = 0; n < 20; n++) begin
      automatic word_t kk = rand_word(), pp = rand_word();
      if (n % 5 == 0) load_key(kk[79:0]);
      encrypt(pp[63:0], 64'(ref_encrypt(pp, word_t'(k), 64, 80, 31, 61, 19)));
    end
    // Back to back: a new block offered in the cycle c_flag rises.
    begin
      logic [63:0] pts [4];
      int t_prev = 0, t = 0;
      for (int i = 0; i < 4; i++) begin automatic word_t w = rand_word(); pts[i] = w[63:0]; end
      p = pts[0]; pf = 1;
      for (int i = 0; i < 4; i++) begin
        @(negedge clk); t++;
        p = pts[(i + 1) % 4]; pf = (i < 3);
        while (!cf) begin @(negedge clk); t++; end
        check("back-to-back ciphertext", c, 64'(ref_encrypt(word_t'(pts[i]), word_t'(k), 64, 80, 31, 61, 19)));
        check("back-to-back spacing", 64'(t - t_prev), 64'd31);
        t_prev = t;
        #1;
      end
      @(negedge clk); pf = 0;
    end
    // 16-bit SPN of the worked example.
    @(negedge clk); k16 = 20'h6E790; kf16 = 1; @(negedge clk); kf16 = 0;
    p16 = 16'hDEBE; pf16 = 1; @(negedge clk); pf16 = 0;
    repeat (3) begin
      check("16-bit: not done early", 64'(cf16), 64'd0);
      @(negedge clk);
    end
    check("16-bit: done after 4 clocks", 64'(cf16), 64'd1);
    check("16-bit: DEBE -> 2AA3", 64'(c16), 64'h2AA3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
