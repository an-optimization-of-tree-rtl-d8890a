// tb_trsa_full: the TRSA exponentiator at its default size (1024-bit keys,
// 3-level optimized tree, internal coordinator, pipelined mode).
//
// Two full 1024-bit modular exponentiations are sent back to back: one with
// the common public exponent e = 65537 and one with a random 1024-bit
// exponent, as a private-key operation would use. Both results are compared
// with the wide-integer reference, and the MulMod count the coordinator
// reports is checked against the binary-method count.
module tb_trsa_full;
  import tb_ref_pkg::*;

  localparam int unsigned K = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          pipe_en, coord_bypass, in_valid, in_ready, out_valid, out_ready;
  logic [K-1:0]  in_m, in_e, in_n, in_a, in_b, out_c;
  logic [7:0]    in_flight;
  logic [31:0]   coord_ops;
  logic [2:0]    stage_active;

  trsa_top u_dut (
    .clk(clk), .rst_n(rst_n), .pipe_en(pipe_en), .coord_bypass(coord_bypass),
    .in_valid(in_valid), .in_ready(in_ready), .in_m(in_m), .in_e(in_e), .in_n(in_n),
    .in_a(in_a), .in_b(in_b), .out_valid(out_valid), .out_ready(out_ready),
    .out_c(out_c), .in_flight(in_flight), .coord_ops(coord_ops),
    .stage_active(stage_active));

  int checks = 0, failures = 0;
  word_t em [2], ee [2], en [2], ec [2];
  int    nout = 0;

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

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      check(word_t'(out_c) == ec[nout], $sformatf("message %0d: C differs from m^e mod n", nout));
      nout++;
    end
  end

  initial begin
    pipe_en = 1; coord_bypass = 0; in_valid = 0; out_ready = 1;
    in_m = 0; in_e = 0; in_n = 0; in_a = 0; in_b = 0;
    for (int i = 0; i < 2; i++) begin
      en[i] = rand_modulus(K);
      em[i] = rand_below(en[i], K);
      ee[i] = (i == 0) ? word_t'(65537) : rand_bits(K);
      ec[i] = ref_modexp(em[i], ee[i], en[i]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2; i++) begin
      @(negedge clk);
      in_valid = 1; in_m = em[i]; in_e = ee[i]; in_n = en[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0;
      // wait for the coordinator's A and B, then check its MulMod count
      while (!u_dut.u_coord.out_valid) @(negedge clk);
      check(coord_ops == bin_ops(ee[i] >> 3) + bin_ops(ee[i] & 7) + 1,
            $sformatf("message %0d: coordinator used %0d MulMods", i, coord_ops));
    end
    while (nout < 2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
