// tb_trsa_table1: multiplication counts for 1024-bit keys.
//
// Runs best-case (e = 2^1023, one set bit) and worst-case (e = all ones)
// exponents through two 1024-bit exponentiators: one with the default 3-level
// tree and one with a 60-level optimized tree (119 PEs). For each run it
// checks C = m^e mod n, checks the coordinator's MulMod count against the
// binary-method count, and prints the number of MulMods on the critical path
// (coordinator plus one per tree level) beside the cycle count. For
// reference, the plain binary method needs k-1 = 1023 MulMods in its best
// case and 2(k-1) = 2046 in its worst.
module tb_trsa_table1;
  import tb_ref_pkg::*;

  localparam int unsigned K = 1024;
  localparam int NCFG = 2;
  localparam int unsigned LV [NCFG] = '{3, 60};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done_cfg = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned bin_ops(word_t x);
    int unsigned len, ones;
    len = 0; ones = 0;
    for (int i = 0; i < RW; i++) if (x[i]) begin len = i + 1; ones++; end
    return (len == 0) ? 0 : (len - 1) + (ones - 1);
  endfunction

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic          in_valid, in_ready, out_valid;
    logic [K-1:0]  in_m, in_e, in_n, out_c;
    logic [7:0]    in_flight;
    logic [31:0]   coord_ops;
    logic [LV[c]-1:0] stage_active;

    trsa_top #(.K(K), .LEVELS(LV[c])) u_dut (
      .clk(clk), .rst_n(rst_n), .pipe_en(1'b1), .coord_bypass(1'b0),
      .in_valid(in_valid), .in_ready(in_ready), .in_m(in_m), .in_e(in_e), .in_n(in_n),
      .in_a('0), .in_b('0), .out_valid(out_valid), .out_ready(1'b1),
      .out_c(out_c), .in_flight(in_flight), .coord_ops(coord_ops),
      .stage_active(stage_active));

    initial begin
      word_t n, m, e, want;
      longint t0, t1;
      int unsigned ops_want;
      in_valid = 0; in_m = 0; in_e = 0; in_n = 0;
      wait (rst_n);
      for (int w = 0; w < 2; w++) begin
        n = rand_modulus(K);
        m = rand_below(n, K);
        e = (w == 0) ? (word_t'(1) << (K - 1)) : {RW{1'b1}};
        want = ref_modexp(m, e, n);
        ops_want = bin_ops(e >> LV[c]) + bin_ops(e & ((word_t'(1) << LV[c]) - 1)) + 1;
        @(negedge clk);
        in_valid = 1; in_m = m; in_e = e; in_n = n;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        t0 = $time;
        #1 in_valid = 0;
        while (!out_valid) @(posedge clk);
        t1 = $time;
        check(word_t'(out_c) == want, $sformatf("l=%0d %s case: wrong C", LV[c], (w != 0) ? "worst" : "best"));
        check(coord_ops == ops_want,
              $sformatf("l=%0d coordinator MulMods %0d, want %0d", LV[c], coord_ops, ops_want));
        $display("k=%0d l=%0d %s case: coordinator %0d + tree %0d = %0d MulMods on the path, %0d cycles",
                 K, LV[c], (w != 0) ? "worst" : "best", coord_ops, LV[c], coord_ops + LV[c], (t1 - t0) / 10);
        @(negedge clk);
      end
      done_cfg++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done_cfg == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
