// tb_spn_iterative_decrypt: decryption engine against the reference model.
//
// Ciphertexts are made by the reference encryption, so a pass shows that
// decryption inverts encryption. The 64-bit engine (default parameters)
// decrypts random blocks under several keys, back to back, checking the
// key setup time (33 clocks) and the latency (R = 31 clocks); a 16-bit
// instance decrypts the worked example 2AA3 back to DEBE under key 6E790.
module tb_spn_iterative_decrypt;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        kf, cf, rdy, pf;
  logic [79:0] k;
  logic [63:0] c, p;
  logic        kf16, cf16, rdy16, pf16;
  logic [19:0] k16;
  logic [15:0] c16, p16;

  spn_iterative_decrypt u64 (.clk, .rst_n, .k_flag(kf), .k, .c_flag(cf), .c, .ready(rdy), .p_flag(pf), .p);
  spn_iterative_decrypt #(.B(16), .KAPPA(20), .R(4), .ALPHA(13), .GAMMA(8)) u16 (
    .clk, .rst_n, .k_flag(kf16), .k(k16), .c_flag(cf16), .c(c16), .ready(rdy16), .p_flag(pf16), .p(p16));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kf = 0; cf = 0; k = '0; c = '0; kf16 = 0; cf16 = 0; k16 = '0; c16 = '0;
    #12 rst_n = 1;
    // 16-bit worked example.
    @(negedge clk); k16 = 20'h6E790; kf16 = 1; @(negedge clk); kf16 = 0;
    while (!rdy16) @(negedge clk);
    c16 = 16'h2AA3; cf16 = 1; @(negedge clk); cf16 = 0;
    while (!pf16) @(negedge clk);
    check("16-bit 2AA3 decrypts to DEBE", 64'(p16), 64'hDEBE);
    for (int n = 0; n < 10; n++) begin
      automatic logic [15:0] pt = 16'($urandom());
      c16 = 16'(ref_encrypt(word_t'(pt), word_t'(k16), 16, 20, 4, 13, 8)); cf16 = 1;
      @(negedge clk); cf16 = 0;
      while (!pf16) @(negedge clk);
      check("16-bit random", 64'(p16), 64'(pt));
    end
    // 64-bit engine at default size.
    for (int key = 0; key < 3; key++) begin
      automatic int t = 0;
      automatic logic [63:0] pts [5];
      @(negedge clk); k = {$urandom(), $urandom(), 16'($urandom())}; kf = 1; @(negedge clk); kf = 0;
      check("not ready during key setup", 64'(rdy), 0);
      while (!rdy) begin @(negedge clk); t++; end
      check("key setup clocks", 64'(t + 1), 33);
      for (int r = 1; r <= 32; r++) check($sformatf("stored RK%0d", r), u64.keys[r-1], 64'(ref_round_key(word_t'(k), r, 64, 80, 61, 19)));
      for (int i = 0; i < 5; i++) pts[i] = {$urandom(), $urandom()};
      c = 64'(ref_encrypt(word_t'(pts[0]), word_t'(k), 64, 80, 31, 61, 19)); cf = 1;
      for (int i = 0; i < 5; i++) begin
        automatic int lat = 1;
        @(negedge clk); cf = 0;
        // A flag while busy is ignored.
        if (i == 2) begin cf = 1; c = '1; @(negedge clk); cf = 0; lat++; end
        while (!pf) begin @(negedge clk); lat++; end
        check($sformatf("64-bit plaintext key %0d block %0d", key, i), p, pts[i]);
        check("64-bit latency", 64'(lat), 31);
        if (i < 4) begin
          // Next block in the clock the plaintext appears.
          check("ready with p_flag", 64'(rdy), 1);
          c = 64'(ref_encrypt(word_t'(pts[i+1]), word_t'(k), 64, 80, 31, 61, 19)); cf = 1;
        end
      end
      repeat (3) @(negedge clk);
      check("p_flag held", 64'(pf), 1);
      check("plaintext held", p, pts[4]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
