// tb_spn_pipeline: pipelined encryption.
//  - 16-bit SPN, 4 stages, key 6E790: the clock-by-clock pipelining
//    example, checking every stage register D1..D4 and the output C in
//    cycles 0..8 (first result in cycle 4);
//  - default 64-bit, 31 stages: key setup takes 32 clocks; 200 blocks with
//    random gaps, every result checked against the reference model at a
//    latency of exactly 31 clocks, including a run of back-to-back blocks
//    (one result per clock); a key change flushes the blocks in flight;
//  - 64-bit, 16 rounds at two rounds per stage: 8 stages, so a latency of
//    8 clocks and one result per clock.
module tb_spn_pipeline;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        kf16, pf16, kr16, cf16;
  logic [19:0] k16;
  logic [15:0] p16, c16;
  logic        kf, pf, kr, cf;
  logic [79:0] k;
  logic [63:0] p, c;

  spn_pipeline #(.B(16), .KAPPA(20), .R(4), .ALPHA(13), .GAMMA(8)) u16 (
    .clk, .rst_n, .k_flag(kf16), .k(k16), .key_ready(kr16), .p_flag(pf16), .p(p16), .c_flag(cf16), .c(c16));
  logic        kf2, pf2, kr2, cf2;
  logic [79:0] k2;
  logic [63:0] p2, c2;
  spn_pipeline #(.R(16), .RPS(2)) u_rps2 (
    .clk, .rst_n, .k_flag(kf2), .k(k2), .key_ready(kr2), .p_flag(pf2), .p(p2), .c_flag(cf2), .c(c2));
  spn_pipeline u_dut (
    .clk, .rst_n, .k_flag(kf), .k, .key_ready(kr), .p_flag(pf), .p, .c_flag(cf), .c);

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Pipelining example: P, D1, D2, D3, D4, C per cycle (0 = not yet valid).
  localparam logic [15:0] EX [9][6] = '{
    '{16'hDEBE, 16'h0000, 16'h0000, 16'h0000, 16'h0000, 16'h0000},
    '{16'hBCA8, 16'hD701, 16'h0000, 16'h0000, 16'h0000, 16'h0000},
    '{16'hCC85, 16'h0FEB, 16'hC726, 16'h0000, 16'h0000, 16'h0000},
    '{16'h662A, 16'h8DE8, 16'hB0F2, 16'hC44A, 16'h0000, 16'h0000},
    '{16'h8D0B, 16'h9855, 16'h246E, 16'hA1AF, 16'h584D, 16'h2AA3},
    '{16'h083E, 16'h635E, 16'h00F7, 16'hEFFF, 16'hE949, 16'hAB2F},
    '{16'h5728, 16'hF1C3, 16'hD877, 16'h30AF, 16'h81CF, 16'hC2BF},
    '{16'h1E75, 16'hC5C9, 16'h8E87, 16'h7041, 16'h650D, 16'h6C2F},
    '{16'hD4D4, 16'hEF08, 16'h9A8B, 16'hFC03, 16'hCC9C, 16'h8CA8}};

  // Scoreboard for the 64-bit pipeline.
  logic [63:0] exp_q [$];
  int          sent_at [$];
  int          cyc = 0, outs = 0, b2b_outs = 0, outs_before = 0;
  logic        cf_prev = 0;

  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Two rounds per stage: ten blocks back to back, each out 8 clocks later.
  initial begin
    logic [63:0] pts [10];
    kf2 = 0; pf2 = 0; p2 = '0; k2 = {$urandom(), $urandom(), 16'($urandom())};
    @(posedge rst_n);
    @(negedge clk); kf2 = 1; @(negedge clk); kf2 = 0;
    while (!kr2) @(negedge clk);
    for (int n = 0; n < 10; n++) begin
      pts[n] = {$urandom(), $urandom()};
      p2 = pts[n]; pf2 = 1;
      check("2 rounds/stage output flag (latency 8)", 64'(cf2), 64'(n >= 8));
      if (n >= 8)
        check("2 rounds/stage ciphertext", c2, 64'(ref_encrypt(word_t'(pts[n-8]), word_t'(k2), 64, 80, 16, 61, 19)));
      @(negedge clk);
    end
    pf2 = 0;
    for (int n = 2; n < 10; n++) begin
      check("2 rounds/stage output flag", 64'(cf2), 1);
      check("2 rounds/stage ciphertext", c2, 64'(ref_encrypt(word_t'(pts[n]), word_t'(k2), 64, 80, 16, 61, 19)));
      @(negedge clk);
    end
    check("2 rounds/stage drained", 64'(cf2), 0);
  end

  // Output monitor of the 64-bit pipeline, sampled at the falling edge.
  always @(negedge clk) begin
    if (rst_n && cf) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", c);
      end else begin
        automatic logic [63:0] e = exp_q.pop_front();
        automatic int s = sent_at.pop_front();
        check("64-bit ciphertext", c, e);
        check("64-bit latency", 64'(cyc - s), 64'd31);
        outs++;
        if (cf_prev) b2b_outs++;
      end
    end
    cf_prev <= cf;
  end

  initial begin
    kf16 = 0; pf16 = 0; k16 = '0; p16 = '0; kf = 0; pf = 0; k = '0; p = '0;
    #12 rst_n = 1;
    // 16-bit example.
    @(negedge clk); k16 = 20'h6E790; kf16 = 1; @(negedge clk); kf16 = 0;
    while (!kr16) @(negedge clk);
    for (int t = 0; t < 9; t++) begin
      p16 = EX[t][0]; pf16 = 1;
      #1;
      if (t >= 1) check($sformatf("cycle %0d D1", t), 64'(u16.dreg[0]), 64'(EX[t][1]));
      if (t >= 2) check($sformatf("cycle %0d D2", t), 64'(u16.dreg[1]), 64'(EX[t][2]));
      if (t >= 3) check($sformatf("cycle %0d D3", t), 64'(u16.dreg[2]), 64'(EX[t][3]));
      if (t >= 4) check($sformatf("cycle %0d D4", t), 64'(u16.dreg[3]), 64'(EX[t][4]));
      if (t >= 4) check($sformatf("cycle %0d C", t), 64'(c16), 64'(EX[t][5]));
      check($sformatf("cycle %0d C_flag", t), 64'(cf16), 64'(t >= 4));
      @(negedge clk);
    end
    pf16 = 0;

    // 64-bit default: key setup time.
    begin
      int t = 0;
      automatic word_t kk = rand_word();
      k = kk[79:0]; kf = 1; @(negedge clk); kf = 0;
      while (!kr) begin @(negedge clk); t++; end
      check("key setup clocks", 64'(t), 64'd32);   // R+1 after the k_flag clock
    end
    for (int n = 0; n < 200; n++) begin
      automatic word_t pp = rand_word();
      p = pp[63:0];
      pf = (n >= 100 && n < 160) ? 1'b1 : ($urandom_range(0, 2) != 0);
      if (pf) begin
        exp_q.push_back(64'(ref_encrypt(pp, word_t'(k), 64, 80, 31, 61, 19)));
        sent_at.push_back(cyc);
      end
      @(negedge clk);
    end
    pf = 0;
    repeat (40) @(negedge clk);
    check("all blocks came out", 64'(exp_q.size()), 0);
    check("back-to-back results seen", 64'(b2b_outs >= 59), 1);
    // A key change drops the blocks in flight.
    outs_before = outs;
    p = '1; pf = 1; @(negedge clk); pf = 0;
    repeat (5) @(negedge clk);
    k = ~k; kf = 1; @(negedge clk); kf = 0;
    exp_q.delete(); sent_at.delete();
    repeat (40) @(negedge clk);
    check("no output after flush", 64'(outs), 64'(outs_before));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
