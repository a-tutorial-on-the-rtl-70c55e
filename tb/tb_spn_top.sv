// tb_spn_top: end-to-end run of all engines at their default sizes.
//
// Every engine gets keys and blocks through the top's ports and every
// ciphertext is compared with the reference model. The testbench counts
// how often each mechanism of the designs happened and fails any that
// never did: iterative feedback rounds, a block started in the clock its
// predecessor finished, an unrolled single-clock block, parallel lanes,
// pipeline round key setup, pipeline priming, back-to-back pipeline
// results, the pipeline flush on a key change, serial sub-block and
// permutation clocks, the serial last-round key mixing behind the S-box,
// the 16-bit worked example (DEBE -> 2AA3) on the 16-bit engines,
// decryption of reference ciphertexts, CTR keystream blocks, and chained
// CBC blocks on both the encrypting and the decrypting side.
module tb_spn_top;
  import spn_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        it_kf, it_pf, it_rdy, it_cf;
  logic [79:0] it_k;
  logic [63:0] it_p, it_c;
  logic        ur_kf, ur_pf, ur_rdy, ur_cf;
  logic [19:0] ur_k;
  logic [15:0] ur_p, ur_c;
  logic        pa_kf, pa_pf, pa_rdy, pa_cf;
  logic [79:0] pa_k;
  logic [63:0] pa_p [4];
  logic [63:0] pa_c [4];
  logic        pp_kf, pp_kr, pp_pf, pp_cf;
  logic [79:0] pp_k;
  logic [63:0] pp_p, pp_c;
  logic        se_kf, se_pf, se_rdy, se_cf;
  logic [19:0] se_k;
  logic [15:0] se_p, se_c;
  logic        dc_kf, dc_cf, dc_rdy, dc_pf;
  logic [79:0] dc_k;
  logic [63:0] dc_c, dc_p;
  logic        ct_kf, ct_kr, ct_ctrf, ct_pf, ct_cf;
  logic [79:0] ct_k;
  logic [63:0] ct_ctr, ct_p, ct_c;
  logic        ce_kf, ce_ivf, ce_inf, ce_rdy, ce_of, cd_kf, cd_ivf, cd_inf, cd_rdy, cd_of;
  logic [79:0] ce_k, cd_k;
  logic [63:0] ce_iv, ce_din, ce_dout, cd_iv, cd_din, cd_dout;
  int          n_ctr = 0, n_cbc_enc = 0, n_cbc_dec = 0;

  spn_top u_top (
    .clk, .rst_n,
    .it_k_flag(it_kf), .it_k, .it_p_flag(it_pf), .it_p, .it_ready(it_rdy), .it_c_flag(it_cf), .it_c,
    .ur_k_flag(ur_kf), .ur_k, .ur_p_flag(ur_pf), .ur_p, .ur_ready(ur_rdy), .ur_c_flag(ur_cf), .ur_c,
    .pa_k_flag(pa_kf), .pa_k, .pa_p_flag(pa_pf), .pa_p, .pa_ready(pa_rdy), .pa_c_flag(pa_cf), .pa_c,
    .pp_k_flag(pp_kf), .pp_k, .pp_key_ready(pp_kr), .pp_p_flag(pp_pf), .pp_p, .pp_c_flag(pp_cf), .pp_c,
    .se_k_flag(se_kf), .se_k, .se_p_flag(se_pf), .se_p, .se_ready(se_rdy), .se_c_flag(se_cf), .se_c,
    .dc_k_flag(dc_kf), .dc_k, .dc_c_flag(dc_cf), .dc_c, .dc_ready(dc_rdy), .dc_p_flag(dc_pf), .dc_p,
    .ct_k_flag(ct_kf), .ct_k, .ct_key_ready(ct_kr), .ct_ctr_flag(ct_ctrf), .ct_ctr,
    .ct_p_flag(ct_pf), .ct_p, .ct_c_flag(ct_cf), .ct_c,
    .ce_k_flag(ce_kf), .ce_k, .ce_iv_flag(ce_ivf), .ce_iv, .ce_in_flag(ce_inf), .ce_din,
    .ce_ready(ce_rdy), .ce_out_flag(ce_of), .ce_dout,
    .cd_k_flag(cd_kf), .cd_k, .cd_iv_flag(cd_ivf), .cd_iv, .cd_in_flag(cd_inf), .cd_din,
    .cd_ready(cd_rdy), .cd_out_flag(cd_of), .cd_dout);

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Mechanism counters.
  int n_feedback = 0, n_start_on_done = 0, n_unrolled_1clk = 0, n_lanes = 0, n_key_setup = 0;
  int n_priming = 0, n_pipe_b2b = 0, n_flush = 0, n_serial_sub = 0, n_serial_perm = 0;
  int n_serial_lastmix = 0, n_example = 0, n_decrypt = 0;

  always @(posedge clk) if (rst_n) begin
    if (u_top.u_iterative.load && !u_top.u_iterative.sel) n_feedback++;
    if (it_pf && it_rdy && it_cf) n_start_on_done++;
    if (u_top.u_serial.en && !u_top.u_serial.sel[2]) n_serial_sub++;
    if (u_top.u_serial.en && u_top.u_serial.sel == 3'b101) n_serial_perm++;
    if (u_top.u_serial.last_round) n_serial_lastmix++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- basic iterative ----------------
  task automatic run_iterative();
    logic [63:0] pts [6];
    @(negedge clk); it_k = {$urandom(), $urandom(), 16'($urandom())}; it_kf = 1; @(negedge clk); it_kf = 0;
    for (int i = 0; i < 6; i++) pts[i] = {$urandom(), $urandom()};
    it_p = pts[0]; it_pf = 1;
    for (int i = 0; i < 6; i++) begin
      int lat = 0;
      @(negedge clk); lat = 1;
      it_pf = 0;
      while (!it_cf) begin @(negedge clk); lat++; end
      check("iterative ciphertext", it_c, 64'(ref_encrypt(word_t'(pts[i]), word_t'(it_k), 64, 80, 31, 61, 19)));
      check("iterative latency", 64'(lat), 31);
      if (i < 5) begin it_p = pts[i+1]; it_pf = 1; end
    end
  endtask

  // ---------------- loop unrolled ----------------
  task automatic run_unrolled();
    @(negedge clk); ur_k = 20'h6E790; ur_kf = 1; @(negedge clk); ur_kf = 0;
    ur_p = 16'hDEBE; ur_pf = 1; @(negedge clk); ur_pf = 0;
    if (ur_cf) n_unrolled_1clk++;
    check("unrolled worked example", 64'(ur_c), 64'h2AA3);
    if (ur_c == 16'h2AA3) n_example++;
    for (int n = 0; n < 20; n++) begin
      ur_p = 16'($urandom()); ur_pf = 1; @(negedge clk); ur_pf = 0;
      if (ur_cf) n_unrolled_1clk++;
      check("unrolled ciphertext", 64'(ur_c), 64'(ref_encrypt(word_t'(ur_p), word_t'(ur_k), 16, 20, 4, 13, 8)));
    end
  endtask

  // ---------------- parallel ----------------
  task automatic run_parallel();
    @(negedge clk); pa_k = {$urandom(), $urandom(), 16'($urandom())}; pa_kf = 1; @(negedge clk); pa_kf = 0;
    for (int b = 0; b < 3; b++) begin
      int lat;
      for (int i = 0; i < 4; i++) pa_p[i] = {$urandom(), $urandom()};
      while (!pa_rdy) @(negedge clk);
      pa_pf = 1; @(negedge clk); pa_pf = 0; lat = 1;
      while (!pa_cf) begin @(negedge clk); lat++; end
      check("parallel latency", 64'(lat), 31);
      for (int i = 0; i < 4; i++) begin
        check("parallel lane", pa_c[i], 64'(ref_encrypt(word_t'(pa_p[i]), word_t'(pa_k), 64, 80, 31, 61, 19)));
        n_lanes++;
      end
    end
  endtask

  // ---------------- pipelined ----------------
  logic [63:0] pp_exp [$];
  int          pp_sent [$];
  int          cyc = 0, pp_outs = 0;
  logic        pp_cf_prev = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (rst_n && pp_cf) begin
      if (pp_exp.size() == 0) begin
        failures++;
        $display("FAIL unexpected pipeline output");
      end else begin
        automatic logic [63:0] e = pp_exp.pop_front();
        automatic int s = pp_sent.pop_front();
        check("pipeline ciphertext", pp_c, e);
        check("pipeline latency", 64'(cyc - s), 31);
        pp_outs++;
        if (pp_cf_prev) n_pipe_b2b++;
        if (pp_outs == 1 && cyc - s == 31) n_priming++;
      end
    end
    pp_cf_prev <= pp_cf;
  end

  task automatic run_pipeline();
    int t = 0, out_mark;
    @(negedge clk); pp_k = {$urandom(), $urandom(), 16'($urandom())}; pp_kf = 1; @(negedge clk); pp_kf = 0;
    while (!pp_kr) begin @(negedge clk); t++; end
    if (t == 32) n_key_setup++;
    check("pipeline key setup clocks", 64'(t), 32);
    for (int n = 0; n < 64; n++) begin
      pp_p = {$urandom(), $urandom()}; pp_pf = (n < 40) || ($urandom_range(0, 1) == 1);
      if (pp_pf) begin
        pp_exp.push_back(64'(ref_encrypt(word_t'(pp_p), word_t'(pp_k), 64, 80, 31, 61, 19)));
        pp_sent.push_back(cyc);
      end
      @(negedge clk);
    end
    pp_pf = 0;
    repeat (35) @(negedge clk);
    check("pipeline drained", 64'(pp_exp.size()), 0);
    // Key change with blocks in flight.
    out_mark = pp_outs;
    pp_p = '0; pp_pf = 1; @(negedge clk); pp_pf = 0;
    repeat (10) @(negedge clk);
    pp_k = ~pp_k; pp_kf = 1; @(negedge clk); pp_kf = 0;
    repeat (40) @(negedge clk);
    if (pp_outs == out_mark) n_flush++;
    check("flushed block dropped", 64'(pp_outs), 64'(out_mark));
  endtask

  // ---------------- serial ----------------
  task automatic run_serial();
    @(negedge clk); se_k = 20'h6E790; se_kf = 1; @(negedge clk); se_kf = 0;
    for (int n = 0; n < 10; n++) begin
      int lat;
      se_p = (n == 0) ? 16'hDEBE : 16'($urandom());
      se_pf = 1; @(negedge clk); se_pf = 0; lat = 1;
      while (!se_cf) begin @(negedge clk); lat++; end
      check("serial clocks per block", 64'(lat), 21);
      check("serial ciphertext", 64'(se_c), 64'(ref_encrypt(word_t'(se_p), word_t'(se_k), 16, 20, 4, 13, 8)));
      if (n == 0 && se_c == 16'h2AA3) n_example++;
    end
  endtask

  // ---------------- decryption ----------------
  task automatic run_decrypt();
    logic [63:0] pt;
    @(negedge clk); dc_k = {$urandom(), $urandom(), 16'($urandom())}; dc_kf = 1; @(negedge clk); dc_kf = 0;
    for (int n = 0; n < 4; n++) begin
      int lat;
      while (!dc_rdy) @(negedge clk);
      pt = {$urandom(), $urandom()};
      dc_c = 64'(ref_encrypt(word_t'(pt), word_t'(dc_k), 64, 80, 31, 61, 19)); dc_cf = 1;
      @(negedge clk); dc_cf = 0; lat = 1;
      while (!dc_pf) begin @(negedge clk); lat++; end
      check("decryption latency", 64'(lat), 31);
      check("decrypted plaintext", dc_p, pt);
      if (dc_p == pt) n_decrypt++;
    end
  endtask

  // ---------------- CTR mode ----------------
  // Six blocks back to back from one counter; the outputs come back to
  // back 31 clocks later, each the block XOR the encrypted counter.
  task automatic run_ctr();
    logic [63:0] pts [6];
    logic [63:0] ctr0;
    @(negedge clk); ct_k = {$urandom(), $urandom(), 16'($urandom())}; ct_kf = 1; @(negedge clk); ct_kf = 0;
    while (!ct_kr) @(negedge clk);
    ctr0 = {$urandom(), $urandom()};
    ct_ctr = ctr0; ct_ctrf = 1; @(negedge clk); ct_ctrf = 0;
    for (int n = 0; n < 6; n++) begin
      pts[n] = {$urandom(), $urandom()};
      ct_p = pts[n]; ct_pf = 1; @(negedge clk);
    end
    ct_pf = 0;
    while (!ct_cf) @(negedge clk);
    for (int n = 0; n < 6; n++) begin
      logic [63:0] cnt;
      cnt = ctr0 + 64'(n);
      check("CTR output flag", 64'(ct_cf), 1);
      check("CTR output", ct_c, 64'(ref_encrypt(word_t'(cnt), word_t'(ct_k), 64, 80, 31, 61, 19)) ^ pts[n]);
      if (ct_cf && ct_c == (64'(ref_encrypt(word_t'(cnt), word_t'(ct_k), 64, 80, 31, 61, 19)) ^ pts[n])) n_ctr++;
      @(negedge clk);
    end
  endtask

  // ---------------- CBC mode ----------------
  // Four blocks chained through the encrypting side, each given in the
  // clock the previous ciphertext appears, then decrypted on the other side.
  task automatic run_cbc();
    logic [63:0] pts [4];
    logic [63:0] cts [4];
    logic [63:0] prev, x;
    @(negedge clk);
    ce_k = {$urandom(), $urandom(), 16'($urandom())}; cd_k = ce_k; ce_kf = 1; cd_kf = 1;
    @(negedge clk); ce_kf = 0; cd_kf = 0;
    while (!(ce_rdy && cd_rdy)) @(negedge clk);
    ce_iv = {$urandom(), $urandom()}; cd_iv = ce_iv; ce_ivf = 1; cd_ivf = 1;
    @(negedge clk); ce_ivf = 0; cd_ivf = 0;
    prev = ce_iv;
    for (int n = 0; n < 4; n++) begin
      pts[n] = {$urandom(), $urandom()};
      ce_din = pts[n]; ce_inf = 1; @(negedge clk); ce_inf = 0;
      while (!ce_of) @(negedge clk);
      x = pts[n] ^ prev;
      cts[n] = ce_dout;
      check("CBC ciphertext", ce_dout, 64'(ref_encrypt(word_t'(x), word_t'(ce_k), 64, 80, 31, 61, 19)));
      if (n > 0 && ce_dout == 64'(ref_encrypt(word_t'(x), word_t'(ce_k), 64, 80, 31, 61, 19))) n_cbc_enc++;
      prev = ce_dout;
    end
    for (int n = 0; n < 4; n++) begin
      cd_din = cts[n]; cd_inf = 1; @(negedge clk); cd_inf = 0;
      while (!cd_of) @(negedge clk);
      check("CBC decrypted block", cd_dout, pts[n]);
      if (n > 0 && cd_dout == pts[n]) n_cbc_dec++;
    end
  endtask

  initial begin
    ct_kf = 0; ct_ctrf = 0; ct_pf = 0; ct_k = '0; ct_ctr = '0; ct_p = '0;
    ce_kf = 0; ce_ivf = 0; ce_inf = 0; ce_k = '0; ce_iv = '0; ce_din = '0;
    cd_kf = 0; cd_ivf = 0; cd_inf = 0; cd_k = '0; cd_iv = '0; cd_din = '0;
    dc_kf = 0; dc_cf = 0; dc_k = '0; dc_c = '0;
    it_kf = 0; it_pf = 0; it_k = '0; it_p = '0;
    ur_kf = 0; ur_pf = 0; ur_k = '0; ur_p = '0;
    pa_kf = 0; pa_pf = 0; pa_k = '0;
    for (int i = 0; i < 4; i++) pa_p[i] = '0;
    pp_kf = 0; pp_pf = 0; pp_k = '0; pp_p = '0;
    se_kf = 0; se_pf = 0; se_k = '0; se_p = '0;
    #12 rst_n = 1;
    fork
      run_iterative();
      run_unrolled();
      run_parallel();
      run_pipeline();
      run_serial();
      run_decrypt();
      run_ctr();
      run_cbc();
    join
    begin
      automatic string names [16] = '{"decrypted blocks", "iterative feedback rounds", "start in the clock of c_flag",
        "unrolled one-clock blocks", "parallel lane results", "pipeline round key setup",
        "pipeline priming", "pipeline back-to-back results", "pipeline flush on key change",
        "serial sub-block clocks", "serial permutation clocks", "serial last-round key mixing",
        "16-bit worked example", "CTR keystream blocks", "CBC chained encryptions",
        "CBC chained decryptions"};
      automatic int counts [16] = '{n_decrypt, n_feedback, n_start_on_done, n_unrolled_1clk, n_lanes, n_key_setup,
        n_priming, n_pipe_b2b, n_flush, n_serial_sub, n_serial_perm, n_serial_lastmix, n_example,
        n_ctr, n_cbc_enc, n_cbc_dec};
      for (int i = 0; i < 16; i++) begin
        $display("mechanism %-32s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
