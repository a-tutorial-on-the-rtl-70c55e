// tb_spn_ctr: CTR mode on the pipeline at its default size.
//
// Loads a key and a starting counter, streams blocks (first back to back,
// then with gaps) and checks every output against
// reference_encrypt(counter_0 + n) ^ plaintext_n, its latency (31 clocks)
// and that outputs come one per clock. The ciphertexts are then run
// through again from the same counter and must give back the plaintexts.
// Blocks before a counter is loaded must be ignored.
module tb_spn_ctr;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        kf, kr, ctrf, pf, cf;
  logic [79:0] k;
  logic [63:0] ctr, p, c;

  spn_ctr dut (.clk, .rst_n, .k_flag(kf), .k, .key_ready(kr), .ctr_flag(ctrf), .ctr,
               .p_flag(pf), .p, .c_flag(cf), .c);

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

  int cyc = 0;
  always @(posedge clk) cyc++;
  logic [63:0] exp_q [$];
  int          sent_q [$];
  logic [63:0] outs [$];
  int          n_b2b = 0;
  logic        cf_prev = 0;
  always @(negedge clk) begin
    if (rst_n && cf) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        automatic logic [63:0] e = exp_q.pop_front();
        automatic int s = sent_q.pop_front();
        check("CTR output", c, e);
        check("CTR latency", 64'(cyc - s), 31);
        outs.push_back(c);
        if (cf_prev) n_b2b++;
      end
    end
    cf_prev <= cf;
  end

  task automatic stream(input logic [63:0] ctr0, input logic [63:0] data [$], input bit gaps);
    logic [63:0] cnt = ctr0;
    for (int n = 0; n < data.size(); ) begin
      pf = !gaps || n < 8 || ($urandom_range(0, 2) != 0);
      p  = data[n];
      if (pf) begin
        exp_q.push_back(64'(ref_encrypt(word_t'(cnt), word_t'(k), 64, 80, 31, 61, 19)) ^ data[n]);
        sent_q.push_back(cyc);
        cnt++;
        n++;
      end
      @(negedge clk);
    end
    pf = 0;
    repeat (34) @(negedge clk);
    check("all outputs seen", 64'(exp_q.size()), 0);
  endtask

  initial begin
    logic [63:0] pts [$];
    logic [63:0] cts [$];
    logic [63:0] ctr0;
    kf = 0; ctrf = 0; pf = 0; k = '0; ctr = '0; p = '0;
    #12 rst_n = 1;
    @(negedge clk); k = {$urandom(), $urandom(), 16'($urandom())}; kf = 1; @(negedge clk); kf = 0;
    while (!kr) @(negedge clk);
    // No counter yet: ignored.
    pf = 1; p = '1; @(negedge clk); pf = 0;
    repeat (35) @(negedge clk);
    check("block without counter ignored", 64'(outs.size()), 0);
    ctr0 = {$urandom(), 32'hFFFF_FFF0};   // crosses a 32-bit carry
    ctr = ctr0; ctrf = 1; @(negedge clk); ctrf = 0;
    for (int n = 0; n < 40; n++) pts.push_back({$urandom(), $urandom()});
    stream(ctr0, pts, 1'b1);
    check("back-to-back outputs seen", 64'(n_b2b > 0), 1);
    // Decrypt: same counter start, ciphertext in.
    cts = outs;
    outs.delete();
    ctr = ctr0; ctrf = 1; @(negedge clk); ctrf = 0;
    stream(ctr0, cts, 1'b0);
    for (int n = 0; n < 40; n++) check("CTR round trip", outs[n], pts[n]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
