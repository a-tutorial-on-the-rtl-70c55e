// tb_spn_key_schedule: the on-the-fly key schedule.
//  - 16-bit SPN, 20-bit key 6E790, ALPHA 13, GAMMA 8: round keys
//    6E79 60DD 8EC3 D71E 71AA of the worked example, one step per clock,
//    with the look-ahead output showing the next key;
//  - the same with four steps per clock;
//  - the 80-bit default against the reference model for random keys.
module tb_spn_key_schedule;
  import spn_pkg::*;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ks_ctrl_t    c16, c16x4, c80;
  logic [19:0] k20;
  logic [79:0] k80;
  logic [15:0] rk16 [2];
  logic [15:0] rk16x4 [4];
  logic [63:0] rk80 [1];
  logic [15:0] st16, st16x4;
  logic [63:0] st80;
  rcnt_t       r16, r16x4, r80;

  spn_key_schedule #(.KAPPA(20), .B(16), .ALPHA(13), .GAMMA(8), .STEPS(1), .LOOKAHEAD(1)) u16 (
    .clk, .rst_n, .ctrl(c16), .k(k20), .rk(rk16), .rk_state(st16), .rcnt(r16));
  spn_key_schedule #(.KAPPA(20), .B(16), .ALPHA(13), .GAMMA(8), .STEPS(4), .LOOKAHEAD(0)) u16x4 (
    .clk, .rst_n, .ctrl(c16x4), .k(k20), .rk(rk16x4), .rk_state(st16x4), .rcnt(r16x4));
  spn_key_schedule u80 (
    .clk, .rst_n, .ctrl(c80), .k(k80), .rk(rk80), .rk_state(st80), .rcnt(r80));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam logic [15:0] RK [5] = '{16'h6E79, 16'h60DD, 16'h8EC3, 16'hD71E, 16'h71AA};

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c16 = '0; c16x4 = '0; c80 = '0; k20 = 20'h6E790; k80 = '0;
    #12 rst_n = 1;
    @(negedge clk);
    c16.load_key = 1; c16x4.load_key = 1;
    @(negedge clk);
    c16 = '0; c16x4 = '0;
    check("16: key state after load", st16, 16'h6E79);
    c16.start = 1; c16.advance = 1;
    c16x4.start = 1; c16x4.advance = 1;
    #1;
    check("16: RK1 with start", rk16[0], RK[0]);
    check("16: RK2 look-ahead", rk16[1], RK[1]);
    for (int j = 0; j < 4; j++) check($sformatf("16x4: RK%0d", j + 1), rk16x4[j], RK[j]);
    @(negedge clk);
    c16 = '0; c16x4 = '0;
    check("16x4: final key state = RK5", st16x4, RK[4]);
    for (int r = 2; r <= 4; r++) begin
      c16.advance = 1; #1;
      check($sformatf("16: RK%0d", r), rk16[0], RK[r-1]);
      check($sformatf("16: RK%0d look-ahead", r + 1), rk16[1], RK[r]);
      check($sformatf("16: round count %0d", r), 64'(r16), 64'(r));
      @(negedge clk);
    end
    c16 = '0; #1;
    check("16: RK5 in key state", st16, RK[4]);
    @(negedge clk);
    check("16: holds without control", st16, RK[4]);
    c16.start = 1; @(negedge clk); c16 = '0;
    check("16: start alone restarts", st16, RK[0]);

    // 80-bit default against the reference model.
    for (int n = 0; n < 4; n++) begin
      automatic word_t kk = rand_word();
      if (n == 1) kk = '0;
      if (n == 2) kk = ~word_t'(0);
      k80 = kk[79:0];
      c80 = '0; c80.load_key = 1; @(negedge clk);
      c80 = '0; c80.start = 1; c80.advance = 1;
      for (int r = 1; r <= 31; r++) begin
        #1;
        check($sformatf("80: key %0d RK%0d", n, r), rk80[0], 64'(ref_round_key(word_t'(k80), r, 64, 80, 61, 19)));
        @(negedge clk);
        c80 = '0; c80.advance = 1;
      end
      c80 = '0; #1;
      check($sformatf("80: key %0d RK32", n), st80, 64'(ref_round_key(word_t'(k80), 32, 64, 80, 61, 19)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
