// tree_harness: drives one trsa_tree configuration and checks it.
//
// NMSG messages (random n, A, B < n) are sent in three phases:
//   1. back to back with the output always ready: the first result must leave
//      exactly LEVELS*(K+2) cycles after its input was taken, and inputs must
//      be taken every K+2 cycles (one MulMod time per pipeline stage);
//   2. with the output held off for long stretches (stalls), so the pipeline
//      fills and in_ready drops;
//   3. with random gaps on both sides.
// Every result is compared, in order, with A^(2^LEVELS - 1) * B mod n from
// the wide-integer reference. 'done' rises when all results are back.
module tree_harness
  import tb_ref_pkg::*;
#(
  parameter int unsigned K         = 32,
  parameter int unsigned LEVELS    = 3,
  parameter bit          OPTIMIZED = 1'b1,
  parameter int unsigned NMSG      = 24
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   overlaps
);

  localparam int unsigned T = K + 2;

  logic              in_valid, in_ready, out_valid, out_ready;
  logic [K-1:0]      in_a, in_b, in_n, out_c;
  logic [LEVELS-1:0] stage_active;

  trsa_tree #(.K(K), .LEVELS(LEVELS), .OPTIMIZED(OPTIMIZED)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_a(in_a), .in_b(in_b), .in_n(in_n), .out_valid(out_valid),
    .out_ready(out_ready), .out_c(out_c), .stage_active(stage_active));

  word_t ma [NMSG], mb [NMSG], mn [NMSG], mc [NMSG];
  longint cyc;
  longint t_in [NMSG];
  int     n_in, n_out;
  int     phase;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (K=%0d L=%0d opt=%0d): %s", K, LEVELS, OPTIMIZED, what);
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; stalls = 0; overlaps = 0;
    for (int i = 0; i < NMSG; i++) begin
      mn[i] = rand_modulus(K);
      ma[i] = (i == 1) ? mn[i] - 1 : rand_below(mn[i], K);
      mb[i] = (i == 2) ? word_t'(1) : rand_below(mn[i], K);
      mc[i] = ref_mulmod(ref_modexp(ma[i], (word_t'(1) << LEVELS) - 1, mn[i]), mb[i], mn[i]);
    end
  end

  // Cycle counter and monitor, on the rising edge.
  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      if ($countones(stage_active) > 1) overlaps++;
      if (out_valid && !out_ready) stalls++;
      if (in_valid && in_ready) begin
        t_in[n_in] = cyc;
        if (phase == 1 && n_in > 0)
          check(cyc - t_in[n_in-1] == longint'(T),
                $sformatf("issue interval %0d, want %0d", cyc - t_in[n_in-1], T));
        n_in++;
      end
      if (out_valid && out_ready) begin
        check(word_t'(out_c) == mc[n_out],
              $sformatf("msg %0d: C=%h want %h", n_out, out_c, mc[n_out]));
        if (n_out == 0)
          check(cyc - t_in[0] == longint'(LEVELS * T),
                $sformatf("latency %0d, want %0d", cyc - t_in[0], LEVELS * T));
        n_out++;
        if (n_out == NMSG) done <= 1;
      end
    end
  end

  // Driver of the input side.
  initial begin
    int i;
    in_valid = 0; in_a = 0; in_b = 0; in_n = 0; n_in = 0; n_out = 0; phase = 1;
    wait (rst_n);
    i = 0;
    while (i < NMSG) begin
      @(negedge clk);
      if (i >= NMSG / 3) phase = (i >= 2 * NMSG / 3) ? 3 : 2;
      if (phase == 3 && $urandom_range(0, 3) == 0 && !in_valid) continue;
      in_valid = 1; in_a = K'(ma[i]); in_b = K'(mb[i]); in_n = K'(mn[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
      i++;
      in_valid = 0;
    end
  end

  // Output side: always ready in phase 1, long stalls in phase 2, random in 3.
  initial begin
    out_ready = 1;
    forever begin
      @(negedge clk);
      if (phase == 2 && n_out > 0) begin
        out_ready = 0;
        repeat (3 * LEVELS * T) @(negedge clk);
        out_ready = 1;
        repeat (T) @(negedge clk);
      end else if (phase == 3) begin
        out_ready = ($urandom_range(0, 2) != 0);
      end else begin
        out_ready = 1;
      end
    end
  end

endmodule
