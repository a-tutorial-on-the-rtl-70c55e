// tb_spn_sbox: exhaustive check of the table S-box and its inverse form
// against the reference S-box table, plus a round trip through both.
module tb_spn_sbox;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] x, y, yi, back;

  spn_sbox #(.INVERSE(1'b0)) u_fwd (.x(x), .y(y));
  spn_sbox #(.INVERSE(1'b1)) u_inv (.x(x), .y(yi));
  spn_sbox #(.INVERSE(1'b1)) u_back (.x(y), .y(back));

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: x=%h got %h expected %h", what, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      check("S", y, ref_sbox(x));
      check("S^-1", yi, ref_inv_sbox(x));
      check("S^-1(S(x))", back, x);
    end
    // A few entries straight from the mapping table.
    x = 4'h0; #1; check("S(0)", y, 4'hC);
    x = 4'h3; #1; check("S(3)", y, 4'hB);
    x = 4'hB; #1; check("S^-1(B)", yi, 4'h3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
