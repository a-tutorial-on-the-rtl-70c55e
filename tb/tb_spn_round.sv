// tb_spn_round: the round function for the 16-bit SPN (both S-box forms)
// against the worked encryption example, and for the 16- and 64-bit SPNs
// against the reference model on random states and keys.
module tb_spn_round;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] d16, rk16, o16, o16c;
  logic [63:0] d64, rk64, o64, o64c;

  spn_round #(.B(16), .COMPACT(1'b0)) u16  (.d(d16), .rk(rk16), .d_next(o16));
  spn_round #(.B(16), .COMPACT(1'b1)) u16c (.d(d16), .rk(rk16), .d_next(o16c));
  spn_round #(.B(64), .COMPACT(1'b0)) u64  (.d(d64), .rk(rk64), .d_next(o64));
  spn_round #(.B(64), .COMPACT(1'b1)) u64c (.d(d64), .rk(rk64), .d_next(o64c));

  task automatic chk16(input logic [15:0] d, input logic [15:0] rk, input logic [15:0] exp);
    d16 = d; rk16 = rk; #1;
    checks += 2;
    if (o16 !== exp || o16c !== exp) begin
      failures++;
      $display("FAIL 16-bit round d=%h rk=%h got %h/%h expected %h", d, rk, o16, o16c, exp);
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
    // Rounds 1-3 of the 16-bit encryption example.
    chk16(16'hDEBE, 16'h6E79, 16'hD701);
    chk16(16'hD701, 16'h60DD, 16'hC726);
    chk16(16'hC726, 16'h8EC3, 16'hC44A);
    // Rounds of the pipelining example (plaintext CC85).
    chk16(16'hCC85, 16'h6E79, 16'h8DE8);
    chk16(16'h8DE8, 16'h60DD, 16'h246E);
    for (int n = 0; n < 200; n++) begin
      automatic word_t a = rand_word(), k = rand_word();
      chk16(a[15:0], k[15:0], 16'(ref_round(a, k, 16)));
      d64 = a[63:0]; rk64 = k[63:0]; #1;
      checks += 2;
      if (o64 !== 64'(ref_round(a, k, 64)) || o64c !== o64) begin
        failures++;
        $display("FAIL 64-bit round d=%h rk=%h got %h/%h", d64, rk64, o64, o64c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
