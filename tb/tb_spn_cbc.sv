// tb_spn_cbc: CBC mode, encrypting and decrypting sides, default size.
//
// Encrypts a run of blocks and checks each ciphertext against the
// reference C_i = E_K(P_i ^ C_{i-1}), C_0 = IV, and its latency (31
// clocks). Blocks are given either in the clock the previous result
// appears (no gap) or after a random gap, so both the direct chaining path
// and the stored one are used. The ciphertexts are then decrypted and must
// give back the plaintexts. A new IV restarts the chain.
module tb_spn_cbc;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        kf, ivf;
  logic [79:0] k;
  logic [63:0] iv;
  logic        e_in, e_rdy, e_out, d_in, d_rdy, d_out;
  logic [63:0] e_din, e_dout, d_din, d_dout;

  spn_cbc #(.DECRYPT(0)) u_enc (.clk, .rst_n, .k_flag(kf), .k, .iv_flag(ivf), .iv,
    .in_flag(e_in), .din(e_din), .ready(e_rdy), .out_flag(e_out), .dout(e_dout));
  spn_cbc #(.DECRYPT(1)) u_dec (.clk, .rst_n, .k_flag(kf), .k, .iv_flag(ivf), .iv,
    .in_flag(d_in), .din(d_din), .ready(d_rdy), .out_flag(d_out), .dout(d_dout));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_direct = 0;

  // Runs one chain through one side; dec selects the decrypting side.
  task automatic run_chain(input bit dec, input logic [63:0] blocks [$], output logic [63:0] res [$]);
    int t0;
    res.delete();
    while (!(dec ? d_rdy : e_rdy)) @(negedge clk);
    for (int n = 0; n < blocks.size(); n++) begin
      bit gap = (n % 3 == 2) || ($urandom_range(0, 3) == 0);
      if (gap) repeat ($urandom_range(1, 4)) @(negedge clk);
      else if (n > 0) n_direct++;
      if (dec) begin d_in = 1; d_din = blocks[n]; end
      else     begin e_in = 1; e_din = blocks[n]; end
      t0 = 1;
      @(negedge clk);
      d_in = 0; e_in = 0;
      do begin
        @(negedge clk);
        t0++;
      end while (!(dec ? d_out : e_out));
      check(dec ? "CBC decrypt latency" : "CBC encrypt latency", 64'(t0), 31);
      res.push_back(dec ? d_dout : e_dout);
    end
  endtask

  task automatic load_iv(input logic [63:0] v);
    while (!(e_rdy && d_rdy)) @(negedge clk);
    iv = v; ivf = 1; @(negedge clk); ivf = 0;
  endtask

  initial begin
    logic [63:0] pts [$];
    logic [63:0] cts [$];
    logic [63:0] back [$];
    logic [63:0] prev;
    kf = 0; ivf = 0; e_in = 0; d_in = 0; k = '0; iv = '0; e_din = '0; d_din = '0;
    #12 rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      k = {$urandom(), $urandom(), 16'($urandom())}; kf = 1; @(negedge clk); kf = 0;
      load_iv({$urandom(), $urandom()});
      pts.delete();
      for (int n = 0; n < 12; n++) pts.push_back({$urandom(), $urandom()});
      run_chain(1'b0, pts, cts);
      prev = iv;
      for (int n = 0; n < 12; n++) begin
        logic [63:0] x;
        x = pts[n] ^ prev;
        check("CBC ciphertext", cts[n], 64'(ref_encrypt(word_t'(x), word_t'(k), 64, 80, 31, 61, 19)));
        prev = cts[n];
      end
      run_chain(1'b1, cts, back);
      for (int n = 0; n < 12; n++) check("CBC round trip", back[n], pts[n]);
      // Same IV again: the same first ciphertext.
      load_iv(iv);
      pts = pts[0:0];
      run_chain(1'b0, pts, back);
      check("CBC restart on IV", back[0], cts[0]);
    end
    check("blocks given with no gap", 64'(n_direct > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
