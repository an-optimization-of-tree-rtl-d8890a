// tb_trsa_tree: self-checking test of the pipelined TRSA tree.
//
// Runs tree_harness on the optimized (2l-1 PEs) and the full (2^l-1 PEs)
// tree with 3 and 4 levels at small key lengths, and on the optimized tree at
// the default size (1024-bit keys, 3 levels). Besides the results, latency
// and issue interval, it requires that the pipeline really overlapped
// messages and that the output stall path was exercised.
module tb_trsa_tree;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 5;
  logic done [NH];
  int   c [NH], f [NH], st [NH], ov [NH];

  tree_harness #(.K(32), .LEVELS(3), .OPTIMIZED(1), .NMSG(24)) h0 (
    .clk(clk), .rst_n(rst_n), .done(done[0]), .checks(c[0]), .failures(f[0]), .stalls(st[0]), .overlaps(ov[0]));
  tree_harness #(.K(32), .LEVELS(3), .OPTIMIZED(0), .NMSG(24)) h1 (
    .clk(clk), .rst_n(rst_n), .done(done[1]), .checks(c[1]), .failures(f[1]), .stalls(st[1]), .overlaps(ov[1]));
  tree_harness #(.K(24), .LEVELS(4), .OPTIMIZED(1), .NMSG(30)) h2 (
    .clk(clk), .rst_n(rst_n), .done(done[2]), .checks(c[2]), .failures(f[2]), .stalls(st[2]), .overlaps(ov[2]));
  tree_harness #(.K(24), .LEVELS(4), .OPTIMIZED(0), .NMSG(30)) h3 (
    .clk(clk), .rst_n(rst_n), .done(done[3]), .checks(c[3]), .failures(f[3]), .stalls(st[3]), .overlaps(ov[3]));
  tree_harness #(.K(1024), .LEVELS(3), .OPTIMIZED(1), .NMSG(9)) h4 (
    .clk(clk), .rst_n(rst_n), .done(done[4]), .checks(c[4]), .failures(f[4]), .stalls(st[4]), .overlaps(ov[4]));

  int checks, failures;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks   += c[i] + 2;
      failures += f[i];
      if (st[i] == 0) begin failures++; $display("FAIL: harness %0d never stalled", i); end
      if (ov[i] == 0) begin failures++; $display("FAIL: harness %0d never overlapped", i); end
      $display("harness %0d: checks=%0d failures=%0d stall_cycles=%0d overlap_cycles=%0d",
               i, c[i], f[i], st[i], ov[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    checks = 0; failures = 1;
    for (int i = 0; i < NH; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
