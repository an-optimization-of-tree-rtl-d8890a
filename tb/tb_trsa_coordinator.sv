// tb_trsa_coordinator: self-checking test of the TRSA coordinator.
//
// For random and corner-case (m, e, n) the coordinator's A and B are compared
// with A = m^(e div 2^l) mod n and B = m^(e div 2^l + e mod 2^l) mod n from a
// wide-integer reference, and its MulMod count with the count of the binary
// method: (bit length - 1) squares plus (ones - 1) multiplies for each
// exponent part, plus the one product A*R. Results are held back with
// out_ready low for a while to check that they stay put. Instances: 64-bit
// keys with 3 levels, 48-bit keys with 4 levels, and one default-size
// (1024-bit, 3-level) message.
module tb_trsa_coordinator;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

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

  // One DUT per configuration, with a shared driver task via a generate.
  localparam int NCFG = 3;
  localparam int unsigned CK [NCFG] = '{64, 48, 1024};
  localparam int unsigned CL [NCFG] = '{3, 4, 3};

  logic             iv   [NCFG];
  logic             ir   [NCFG];
  logic             ov   [NCFG];
  logic             ordy [NCFG];
  word_t            im [NCFG], ie [NCFG], inn [NCFG];
  word_t            oa [NCFG], ob [NCFG], on [NCFG];
  logic [31:0]      ops [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_dut
    localparam int unsigned K = CK[c];
    logic [K-1:0] a, b, n;
    if (c == 2) begin : g_default
      trsa_coordinator u_dut (
        .clk(clk), .rst_n(rst_n), .in_valid(iv[c]), .in_ready(ir[c]),
        .in_m(K'(im[c])), .in_e(K'(ie[c])), .in_n(K'(inn[c])),
        .out_valid(ov[c]), .out_ready(ordy[c]), .out_a(a), .out_b(b), .out_n(n),
        .op_count(ops[c]));
    end else begin : g_small
      trsa_coordinator #(.K(K), .LEVELS(CL[c])) u_dut (
        .clk(clk), .rst_n(rst_n), .in_valid(iv[c]), .in_ready(ir[c]),
        .in_m(K'(im[c])), .in_e(K'(ie[c])), .in_n(K'(inn[c])),
        .out_valid(ov[c]), .out_ready(ordy[c]), .out_a(a), .out_b(b), .out_n(n),
        .op_count(ops[c]));
    end
    assign oa[c] = word_t'(a);
    assign ob[c] = word_t'(b);
    assign on[c] = word_t'(n);
  end

  task automatic run(int c, word_t m, word_t e, word_t n, int hold);
    word_t eo, er, ea, eb;
    int unsigned lv;
    lv = CL[c];
    eo = e >> lv;
    er = e & ((word_t'(1) << lv) - 1);
    ea = ref_modexp(m, eo, n);
    eb = ref_modexp(m, eo + er, n);
    @(negedge clk);
    check(ir[c] == 1'b1, "in_ready in idle");
    iv[c] = 1'b1; im[c] = m; ie[c] = e; inn[c] = n; ordy[c] = 1'b0;
    @(negedge clk);
    iv[c] = 1'b0;
    while (!ov[c]) @(negedge clk);
    repeat (hold) begin
      @(negedge clk);
      check(ov[c] && !ir[c], "result held while out_ready low");
    end
    check(oa[c] == ea, $sformatf("cfg %0d A: got %h want %h", c, oa[c], ea));
    check(ob[c] == eb, $sformatf("cfg %0d B: got %h want %h", c, ob[c], eb));
    check(on[c] == n, "n passed on");
    check(ops[c] == bin_ops(eo) + bin_ops(er) + 1,
          $sformatf("cfg %0d op count %0d want %0d", c, ops[c], bin_ops(eo) + bin_ops(er) + 1));
    ordy[c] = 1'b1;
    @(negedge clk);
    check(!ov[c], "result released");
    ordy[c] = 1'b0;
  endtask

  initial begin
    word_t n, m, e;
    for (int c = 0; c < NCFG; c++) begin
      iv[c] = 0; ordy[c] = 0; im[c] = 0; ie[c] = 0; inn[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2; c++) begin
      n = rand_modulus(CK[c]);
      m = rand_below(n, CK[c]);
      run(c, m, 0, n, 0);                                   // e = 0
      run(c, m, 5, n, 1);                                   // e < 2^l: A = 1
      run(c, m, word_t'(1) << CL[c], n, 0);                 // e = n_p: A = m, R = 1
      run(c, m, (word_t'(1) << CK[c]) - 1, n, 2);           // all ones: worst case
      for (int i = 0; i < 30; i++) begin
        n = rand_modulus(CK[c]);
        run(c, rand_below(n, CK[c]), rand_bits(CK[c]), n, i % 3);
      end
    end
    n = rand_modulus(1024);
    run(2, rand_below(n, 1024), rand_bits(1024), n, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
