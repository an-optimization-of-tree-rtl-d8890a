// tb_mulmod_pe: self-checking test of the MulMod processor element.
//
// Two PEs are tested: a 64-bit one (random and corner operands, many cases)
// and one at the default key length of 1024 bits (fewer cases). Each product
// is compared with a wide '%' reference, and the latency from start to done
// is checked to be exactly K+1 cycles. A start issued while the PE is busy
// must be ignored.
module tb_mulmod_pe;
  import tb_ref_pkg::*;

  localparam int unsigned KS = 64;
  localparam int unsigned KL = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Small PE
  logic           s_start, s_busy, s_done;
  logic [KS-1:0]  s_n, s_a, s_b, s_res, s_nout;
  mulmod_pe #(.K(KS)) u_small (
    .clk(clk), .rst_n(rst_n), .start(s_start), .n_in(s_n), .a_in(s_a), .b_in(s_b),
    .busy(s_busy), .done(s_done), .result(s_res), .n_out(s_nout));

  // Full-size PE (default parameter)
  logic           l_start, l_busy, l_done;
  logic [KL-1:0]  l_n, l_a, l_b, l_res, l_nout;
  mulmod_pe u_large (
    .clk(clk), .rst_n(rst_n), .start(l_start), .n_in(l_n), .a_in(l_a), .b_in(l_b),
    .busy(l_busy), .done(l_done), .result(l_res), .n_out(l_nout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_small(word_t a, word_t b, word_t n);
    int cyc;
    word_t exp_r;
    exp_r = ref_mulmod(a, b, n);
    @(negedge clk);
    s_a = KS'(a); s_b = KS'(b); s_n = KS'(n); s_start = 1'b1;
    @(negedge clk);
    s_start = 1'b0;
    cyc = 1;
    // A start while busy must not disturb the operation.
    s_a = ~s_a; s_start = 1'b1;
    @(negedge clk);
    s_start = 1'b0;
    cyc++;
    while (!s_done) begin
      @(negedge clk);
      cyc++;
    end
    check(word_t'(s_res) == exp_r, $sformatf("small %h*%h mod %h = %h, want %h", a, b, n, s_res, exp_r));
    check(cyc == KS + 1, $sformatf("small latency %0d, want %0d", cyc, KS + 1));
    check(s_nout == KS'(n), "small n register");
  endtask

  task automatic run_large(word_t a, word_t b, word_t n);
    int cyc;
    word_t exp_r;
    exp_r = ref_mulmod(a, b, n);
    @(negedge clk);
    l_a = a; l_b = b; l_n = n; l_start = 1'b1;
    @(negedge clk);
    l_start = 1'b0;
    cyc = 1;
    while (!l_done) begin
      @(negedge clk);
      cyc++;
    end
    check(l_res == exp_r, "large product");
    check(cyc == KL + 1, $sformatf("large latency %0d, want %0d", cyc, KL + 1));
  endtask

  initial begin
    word_t n, a, b;
    s_start = 0; l_start = 0; s_a = 0; s_b = 0; s_n = 0; l_a = 0; l_b = 0; l_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Corner cases
    n = rand_modulus(KS);
    run_small(0, n - 1, n);
    run_small(n - 1, n - 1, n);
    run_small(1, n - 1, n);
    run_small(2, 3, 7);
    run_small(6, 6, 7);
    run_small(word_t'({KS{1'b1}}) - 2, word_t'({KS{1'b1}}) - 3, word_t'({KS{1'b1}}));
    // Random
    for (int i = 0; i < 200; i++) begin
      n = (i % 4 == 0) ? rand_modulus(1 + $urandom_range(2, KS - 1)) : rand_modulus(KS);
      a = rand_below(n, KS);
      b = rand_below(n, KS);
      run_small(a, b, n);
    end
    // Full size
    for (int i = 0; i < 6; i++) begin
      n = rand_modulus(KL);
      a = (i == 0) ? n - 1 : rand_below(n, KL);
      b = (i == 0) ? n - 1 : rand_below(n, KL);
      run_large(a, b, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
