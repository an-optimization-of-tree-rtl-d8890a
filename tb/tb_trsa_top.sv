// tb_trsa_top: end-to-end test of the TRSA exponentiator (32-bit keys,
// 3 levels, optimized tree).
//
//  1. RSA round trip with a real small key (p = 65521, q = 65519, e = 65537,
//     d = e^-1 mod phi worked out here): encrypt m, then decrypt the
//     ciphertext, and get m back.
//  2. Pipelined mode with the internal coordinator: a stream of random
//     messages, with output stalls.
//  3. Unpipelined mode (the original TRSA): at most one message inside.
//  4. Coordinator bypass (host-supplied A and B), pipelined and unpipelined:
//     the issue intervals are measured; pipelining must raise throughput by
//     at least a factor l (the tree has l stages here; the coordinator is
//     not one of them in this mode).
// Every result is checked, in order, against m^e mod n (or A^(2^l-1)*B mod
// n in bypass mode) from the wide-integer reference. Each mechanism (overlap
// of messages, output stall, each mode, mode switch) is counted and must
// have happened.
module tb_trsa_top;
  import tb_ref_pkg::*;

  localparam int unsigned K = 32;
  localparam int unsigned L = 3;
  localparam int unsigned T = K + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          pipe_en, coord_bypass, in_valid, in_ready, out_valid, out_ready;
  logic [K-1:0]  in_m, in_e, in_n, in_a, in_b, out_c;
  logic [7:0]    in_flight;
  logic [31:0]   coord_ops;
  logic [L-1:0]  stage_active;

  trsa_top #(.K(K), .LEVELS(L)) u_dut (
    .clk(clk), .rst_n(rst_n), .pipe_en(pipe_en), .coord_bypass(coord_bypass),
    .in_valid(in_valid), .in_ready(in_ready), .in_m(in_m), .in_e(in_e), .in_n(in_n),
    .in_a(in_a), .in_b(in_b), .out_valid(out_valid), .out_ready(out_ready),
    .out_c(out_c), .in_flight(in_flight), .coord_ops(coord_ops),
    .stage_active(stage_active));

  int checks = 0, failures = 0;
  // Mechanism counters
  int n_overlap = 0, n_stall = 0, n_coord_msgs = 0, n_bypass_msgs = 0;
  int n_unpiped_msgs = 0, n_switch = 0, n_coord_tree_overlap = 0;

  word_t  exp_q [$];
  word_t  last_c;
  longint cyc = 0;
  longint t_acc [$];
  bit     stall_en = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Monitor
  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (in_flight > 1) n_overlap++;
      // coordinator busy on one message while the tree holds another
      if (!coord_bypass && in_flight > 1 && stage_active != '0) n_coord_tree_overlap++;
      if (out_valid && !out_ready) n_stall++;
      if (!pipe_en) check(in_flight <= 1, "unpipelined mode holds one message at most");
      if (in_valid && in_ready) t_acc.push_back(cyc);
      if (out_valid && out_ready) begin
        if (exp_q.size() == 0) check(0, "unexpected result");
        else begin
          word_t w;
          w = exp_q.pop_front();
          check(word_t'(out_c) == w, $sformatf("C=%h want %h", out_c, w));
          last_c = word_t'(out_c);
        end
      end
    end
  end

  // Output-side stalls when enabled.
  always @(negedge clk) out_ready <= stall_en ? ($urandom_range(0, 3) == 0) : 1'b1;

  task automatic send(word_t m, word_t e, word_t n, word_t a, word_t b);
    @(negedge clk);
    in_valid = 1; in_m = K'(m); in_e = K'(e); in_n = K'(n); in_a = K'(a); in_b = K'(b);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
    if (coord_bypass) begin
      n_bypass_msgs++;
      exp_q.push_back(ref_mulmod(ref_modexp(a, (word_t'(1) << L) - 1, n), b, n));
    end else begin
      n_coord_msgs++;
      exp_q.push_back(ref_modexp(m, e, n));
    end
    if (!pipe_en) n_unpiped_msgs++;
  endtask

  task automatic drain();
    while (exp_q.size() != 0 || in_flight != 0) @(negedge clk);
  endtask

  task automatic set_mode(bit pipe, bit bypass);
    drain();
    if (pipe != pipe_en || bypass != coord_bypass) n_switch++;
    @(negedge clk);
    pipe_en = pipe; coord_bypass = bypass;
    repeat (2) @(negedge clk);
  endtask

  // Modular inverse by the extended Euclidean algorithm.
  function automatic longint modinv(longint a, longint m);
    longint t, nt, r, nr, q, tmp;
    t = 0; nt = 1; r = m; nr = a;
    while (nr != 0) begin
      q = r / nr;
      tmp = t - q * nt; t = nt; nt = tmp;
      tmp = r - q * nr; r = nr; nr = tmp;
    end
    return (t < 0) ? t + m : t;
  endfunction

  initial begin
    longint p, q, phi, d;
    word_t n, m, c;
    longint iv_p, iv_np;
    pipe_en = 1; coord_bypass = 0; in_valid = 0;
    in_m = 0; in_e = 0; in_n = 0; in_a = 0; in_b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. RSA round trip
    p = 65521; q = 65519; phi = (p - 1) * (q - 1);
    d = modinv(65537, phi);
    n = word_t'(p * q);
    m = word_t'(32'h1234_5678) % n;
    send(m, 65537, n, 0, 0);
    drain();
    c = last_c;
    check(c != m, "ciphertext differs from plaintext");
    send(c, word_t'(d), n, 0, 0);
    drain();
    check(last_c == m, $sformatf("RSA round trip: got %h want %h", last_c, m));

    // 2. Pipelined, internal coordinator, with stalls half of the time
    for (int i = 0; i < 16; i++) begin
      n = rand_modulus(K);
      stall_en = (i >= 8);
      send(rand_below(n, K), (i == 0) ? word_t'(0) : (i == 1) ? word_t'(7) : rand_bits(K), n, 0, 0);
    end
    drain();
    stall_en = 0;

    // 3. Unpipelined
    set_mode(0, 0);
    for (int i = 0; i < 4; i++) begin
      n = rand_modulus(K);
      send(rand_below(n, K), rand_bits(K), n, 0, 0);
    end

    // 4. Bypass, pipelined: issue interval
    set_mode(1, 1);
    t_acc.delete();
    for (int i = 0; i < 8; i++) begin
      n = rand_modulus(K);
      send(0, 0, n, rand_below(n, K), rand_below(n, K));
    end
    drain();
    iv_p = (t_acc[7] - t_acc[1]) / 6;
    check(iv_p == longint'(T), $sformatf("pipelined issue interval %0d, want %0d", iv_p, T));

    // Bypass, unpipelined
    set_mode(0, 1);
    t_acc.delete();
    for (int i = 0; i < 8; i++) begin
      n = rand_modulus(K);
      send(0, 0, n, rand_below(n, K), rand_below(n, K));
    end
    drain();
    iv_np = (t_acc[7] - t_acc[1]) / 6;
    check(iv_np >= longint'(L) * iv_p,
          $sformatf("throughput gain %0d/%0d below %0d", iv_np, iv_p, L));
    $display("issue interval: pipelined %0d cycles, unpipelined %0d cycles", iv_p, iv_np);

    // back to the default mode
    set_mode(1, 0);
    n = rand_modulus(K);
    send(rand_below(n, K), rand_bits(K), n, 0, 0);
    drain();

    $display("mechanisms: overlap=%0d coord+tree overlap=%0d stall=%0d coord_msgs=%0d bypass_msgs=%0d unpipelined_msgs=%0d switches=%0d",
             n_overlap, n_coord_tree_overlap, n_stall, n_coord_msgs, n_bypass_msgs, n_unpiped_msgs, n_switch);
    check(n_overlap > 0, "pipeline overlap happened");
    check(n_coord_tree_overlap > 0, "coordinator overlapped with the tree");
    check(n_stall > 0, "output stall happened");
    check(n_coord_msgs > 0 && n_bypass_msgs > 0, "both coordinator modes used");
    check(n_unpiped_msgs > 0, "unpipelined mode used");
    check(n_switch >= 3, "mode switches happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
