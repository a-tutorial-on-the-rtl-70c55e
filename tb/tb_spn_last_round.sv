// tb_spn_last_round: last round correction against the worked examples
// (final state to ciphertext with RK_5 = 71AA) and against the reference
// model for the 64-bit SPN.
module tb_spn_last_round;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] d16, rk16, c16;
  logic [63:0] d64, rk64, c64;

  spn_last_round #(.B(16)) u16 (.d(d16), .rk(rk16), .c(c16));
  spn_last_round #(.B(64)) u64 (.d(d64), .rk(rk64), .c(c64));

  task automatic chk16(input logic [15:0] d, input logic [15:0] exp);
    d16 = d; rk16 = 16'h71AA; #1;
    checks++;
    if (c16 !== exp) begin
      failures++;
      $display("FAIL 16-bit d=%h got %h expected %h", d, c16, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk16(16'h584D, 16'h2AA3);
    chk16(16'hE949, 16'hAB2F);
    chk16(16'h81CF, 16'hC2BF);
    chk16(16'h650D, 16'h6C2F);
    chk16(16'hCC9C, 16'h8CA8);
    for (int n = 0; n < 200; n++) begin
      automatic word_t a = rand_word(), k = rand_word();
      d64 = a[63:0]; rk64 = k[63:0]; #1;
      checks++;
      if (c64 !== 64'(ref_inv_perm(a, 64) ^ k)) begin
        failures++;
        $display("FAIL 64-bit d=%h rk=%h got %h", d64, rk64, c64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
