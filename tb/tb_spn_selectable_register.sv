// tb_spn_selectable_register: every select code of the 16-bit selectable
// register against a model of the control table: plaintext load (100),
// S-box output into one sub-block with the others held (000..011),
// permutation in one clock (101), the output multiplexer, the hold when
// en is low; plus the 64-bit version for load, S-box writes and permutation.
module tb_spn_selectable_register;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        en;
  logic [2:0]  sel;
  logic [3:0]  sb, so;
  logic [15:0] p, d;
  logic        en64;
  logic [4:0]  sel64;
  logic [3:0]  so64;
  logic [63:0] p64, d64;

  spn_selectable_register #(.B(16)) u_dut (.clk, .rst_n, .en, .sel, .sbox_out(sb), .p, .d, .sub_out(so));
  spn_selectable_register #(.B(64)) u64 (.clk, .rst_n, .en(en64), .sel(sel64), .sbox_out(sb), .p(p64),
                                         .d(d64), .sub_out(so64));

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
    logic [15:0] model;
    logic [63:0] model64;
    en = 0; sel = 3'b100; sb = 0; p = 0; en64 = 0; sel64 = 5'b10000; p64 = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      p = 16'($urandom()); sel = 3'b100; en = 1;
      @(negedge clk);
      model = p;
      check("load plaintext", 64'(d), 64'(model));
      for (int j = 0; j < 4; j++) begin
        sel = 3'(j); sb = 4'($urandom()); #1;
        check($sformatf("output mux sub-block %0d", j), 64'(so), 64'(model[15-4*j -: 4]));
        @(negedge clk);
        model[15-4*j -: 4] = sb;
        check($sformatf("S-box into sub-block %0d", j), 64'(d), 64'(model));
      end
      sel = 3'b101; @(negedge clk);
      model = 16'(ref_perm(word_t'(model), 16));
      check("permutation", 64'(d), 64'(model));
      en = 0; sel = 3'b000; sb = ~sb; @(negedge clk);
      check("hold with en low", 64'(d), 64'(model));
    end
    // Leftmost sub-block gets d15 d11 d7 d3 on a permutation.
    p = 16'b1000_1000_1000_1000; sel = 3'b100; en = 1; @(negedge clk);
    sel = 3'b101; @(negedge clk);
    check("leftmost sub-block takes d15 d11 d7 d3", 64'(d), 64'hF000);
    en = 0;
    // 64-bit register.
    for (int n = 0; n < 10; n++) begin
      p64 = {$urandom(), $urandom()}; sel64 = 5'b10000; en64 = 1; @(negedge clk);
      model64 = p64;
      check("64: load", d64, model64);
      for (int j = 0; j < 16; j++) begin
        sel64 = 5'(j); sb = 4'($urandom()); #1;
        check("64: output mux", 64'(so64), 64'(model64[63-4*j -: 4]));
        @(negedge clk);
        model64[63-4*j -: 4] = sb;
      end
      check("64: after 16 S-box clocks", d64, model64);
      sel64 = 5'b10001; @(negedge clk);
      check("64: permutation", d64, 64'(ref_perm(word_t'(model64), 64)));
      en64 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
