// tb_spn_serial_ctrl: the serial controller's schedule for the 16-bit,
// 4-round SPN: after p_flag one plaintext-load clock (sel 100), then per
// round the sub-block clocks 000, 001, 010, 011 and a permutation clock
// 101 that steps the key schedule; last_round only in round 4's sub-block
// clocks; c_flag after 21 clocks and held; key load and start requests.
module tb_spn_serial_ctrl;
  import spn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       kf, pf, en, last, cf, rdy;
  logic [2:0] sel;
  ks_ctrl_t   ks;

  spn_serial_ctrl u_dut (.clk, .rst_n, .k_flag(kf), .p_flag(pf), .ks_ctrl(ks), .sel, .en,
                         .last_round(last), .c_flag(cf), .ready(rdy));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kf = 0; pf = 0;
    #12 rst_n = 1;
    @(negedge clk);
    check("not ready without a key", 64'(rdy), 0);
    pf = 1; #1; check("p_flag ignored without a key", 64'(ks.start), 0);
    @(negedge clk); pf = 0;
    kf = 1; #1; check("key load requested", 64'(ks.load_key), 1);
    @(negedge clk); kf = 0;
    for (int blk = 0; blk < 3; blk++) begin
      check("ready between blocks", 64'(rdy), 1);
      pf = 1; #1;
      check("start requested with p_flag", 64'(ks.start), 1);
      check("load clock sel", 64'(sel), 64'b100);
      check("load clock en", 64'(en), 1);
      @(negedge clk); pf = 0;
      check("busy", 64'(rdy), 0);
      for (int r = 1; r <= 4; r++) begin
        for (int j = 0; j < 4; j++) begin
          check($sformatf("round %0d sub-block %0d sel", r, j), 64'(sel), 64'(j));
          check("last_round", 64'(last), 64'(r == 4));
          check("no key step in sub-block clocks", 64'(ks.advance), 0);
          check("no c_flag yet", 64'(cf), 0);
          pf = 1;   // ignored while busy
          #1; check("p_flag ignored while busy", 64'(ks.start), 0);
          @(negedge clk); pf = 0;
        end
        check($sformatf("round %0d permutation sel", r), 64'(sel), 64'b101);
        check("key step in permutation clock", 64'(ks.advance), 1);
        check("last_round low", 64'(last), 0);
        @(negedge clk);
      end
      check("c_flag after 21 clocks", 64'(cf), 1);
      check("register held", 64'(en), 0);
      repeat (3) @(negedge clk);
      check("c_flag held", 64'(cf), 1);
    end
    kf = 1; @(negedge clk); kf = 0;
    check("new key clears c_flag", 64'(cf), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
