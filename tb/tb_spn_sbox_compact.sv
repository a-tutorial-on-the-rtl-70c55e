// tb_spn_sbox_compact: exhaustive check of the 14-gate S-box network
// against the reference S-box table and against the table-form module.
module tb_spn_sbox_compact;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] x, y, y_tab;

  spn_sbox_compact u_dut (.x(x), .y(y));
  spn_sbox #(.INVERSE(1'b0)) u_tab (.x(x), .y(y_tab));

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
      checks += 2;
      if (y !== ref_sbox(x)) begin
        failures++;
        $display("FAIL x=%h got %h expected %h", x, y, ref_sbox(x));
      end
      if (y !== y_tab) begin
        failures++;
        $display("FAIL x=%h compact %h table %h", x, y, y_tab);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
