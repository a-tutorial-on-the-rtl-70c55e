// tb_spn_parallel: four iterative lanes sharing one key schedule. Each
// batch of four random blocks must give the four reference ciphertexts
// together, 31 clocks after p_flag, for the default 64-bit configuration.
module tb_spn_parallel;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        kf, pf, rdy, cf;
  logic [79:0] k;
  logic [63:0] p [4];
  logic [63:0] c [4];

  spn_parallel u_dut (.clk, .rst_n, .k_flag(kf), .k, .p_flag(pf), .p, .ready(rdy), .c_flag(cf), .c);

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kf = 0; pf = 0; k = '0;
    for (int i = 0; i < 4; i++) p[i] = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      int lat = 0;
      if (n % 4 == 0) begin
        automatic word_t kk = rand_word();
        k = kk[79:0];
        @(negedge clk); kf = 1; @(negedge clk); kf = 0;
      end
      for (int i = 0; i < 4; i++) begin automatic word_t w = rand_word(); p[i] = w[63:0]; end
      if (n == 1) p[2] = p[1];   // two equal blocks give equal ciphertexts
      while (!rdy) @(negedge clk);
      pf = 1; @(negedge clk); pf = 0; lat = 1;
      while (!cf) begin @(negedge clk); lat++; end
      check("latency", 64'(lat), 64'd31);
      for (int i = 0; i < 4; i++)
        check($sformatf("lane %0d", i), c[i], 64'(ref_encrypt(word_t'(p[i]), word_t'(k), 64, 80, 31, 61, 19)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
