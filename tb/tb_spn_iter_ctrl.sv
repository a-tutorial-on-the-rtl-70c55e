// tb_spn_iter_ctrl: the iterative controller with ITERS = 5: key load
// request, the p_flag clock (sel = 1, load, key schedule start + step),
// four feedback clocks (sel = 0, load, step), c_flag from clock 5 held
// until the next block, p_flag and k_flag ignored while busy, and a new
// block accepted in the clock in which c_flag is high.
module tb_spn_iter_ctrl;
  import spn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     kf, pf, sel, load, cf, rdy;
  ks_ctrl_t ks;

  spn_iter_ctrl #(.ITERS(5)) u_dut (.clk, .rst_n, .k_flag(kf), .p_flag(pf), .ks_ctrl(ks), .sel, .load,
                                    .c_flag(cf), .ready(rdy));

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
    check("not ready without key", 64'(rdy), 0);
    pf = 1; #1; check("no load without key", 64'(load), 0); @(negedge clk); pf = 0;
    kf = 1; #1; check("key load", 64'(ks.load_key), 1); @(negedge clk); kf = 0;
    for (int blk = 0; blk < 3; blk++) begin
      check("ready", 64'(rdy), 1);
      pf = 1; #1;
      check("sel plaintext", 64'(sel), 1);
      check("load", 64'(load), 1);
      check("start", 64'(ks.start), 1);
      check("advance", 64'(ks.advance), 1);
      @(negedge clk); pf = 0;
      for (int i = 1; i < 5; i++) begin
        check("feedback sel", 64'(sel), 0);
        check("feedback load", 64'(load), 1);
        check("feedback step", 64'(ks.advance), 1);
        check("no start", 64'(ks.start), 0);
        check("not done", 64'(cf), 0);
        kf = (i == 2); pf = (i == 3);
        #1; check("flags ignored while busy", 64'(ks.load_key), 0);
        @(negedge clk); kf = 0; pf = 0;
      end
      check("c_flag after 5 clocks", 64'(cf), 1);
      check("idle: no load", 64'(load), 0);
      check("idle: no step", 64'(ks.advance), 0);
      if (blk == 0) begin
        repeat (3) @(negedge clk);
        check("c_flag held", 64'(cf), 1);
      end
    end
    kf = 1; @(negedge clk); kf = 0;
    check("new key clears c_flag", 64'(cf), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
