// trsa_tree: the pipelined TRSA tree of MulMod processor elements.
//
// Given A = m^e_o mod n and B = m^e_l mod n from the coordinator, the tree
// computes C = A^(2^l - 1) * B mod n = m^e mod n in l levels. Every leaf
// squares A except the last leaf, which computes A*B; every inner PE
// multiplies the results of its two children; the root's result is C.
//
// Full form (OPTIMIZED = 0): 2^l - 1 PEs, level by level as in a binary tree.
// Optimized form (OPTIMIZED = 1): all PEs of a level except the rightmost one
// compute the same value, so each level keeps just two PEs, X (the all-A
// branch, X' = X*X) and Y (the branch holding B, Y' = X*Y), and the root
// computes X*Y: 2l - 1 PEs. Both forms give the same C.
//
// Pipelining: each level is one pipeline stage. A level starts its next
// operation as soon as its result has been taken by the level above, so up to
// l messages are in the tree at once and, in steady state, one C leaves every
// K+2 cycles. Stage 0 is the leaf level, stage l-1 the root (level 1).
//
// Interface: valid/ready in (A, B, n) and out (C). A, B must be < n. The
// per-stage status stage_active (busy or holding a result) shows the overlap.
//
// Timing: latency from an accepted input to out_valid is l*(K+2) - 1 cycles
// when nothing stalls; the issue interval is K+2 cycles.
module trsa_tree
  import trsa_pkg::*;
#(
  parameter int unsigned K         = KEY_BITS_DEFAULT,
  parameter int unsigned LEVELS    = LEVELS_DEFAULT,
  parameter bit          OPTIMIZED = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [K-1:0]      in_a,
  input  logic [K-1:0]      in_b,
  input  logic [K-1:0]      in_n,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [K-1:0]      out_c,
  output logic [LEVELS-1:0] stage_active
);

  localparam int unsigned MAXW = max_stage_pes(LEVELS, OPTIMIZED);

  // Results and moduli of every stage; unused slots stay zero.
  logic [K-1:0] res   [LEVELS][MAXW];
  logic [K-1:0] n_stg [LEVELS];

  logic [LEVELS-1:0] st_in_valid, st_in_ready, st_out_ready, st_start;
  logic [LEVELS-1:0] st_busy, st_done, st_full;

  for (genvar s = 0; s < LEVELS; s++) begin : g_stage
    localparam int unsigned NP = pes_at_stage(LEVELS, OPTIMIZED, s);

    logic [NP-1:0] busy_v, done_v;

    // Handshake of this stage.
    assign st_in_valid[s]  = (s == 0) ? in_valid : st_full[(s == 0) ? 0 : s - 1];
    assign st_out_ready[s] = (s == LEVELS - 1) ? out_ready
                                               : st_in_ready[(s == LEVELS - 1) ? s : s + 1];
    assign st_in_ready[s]  = !st_busy[s] && (!st_full[s] || st_out_ready[s]);
    assign st_start[s]     = st_in_valid[s] && st_in_ready[s];
    // All PEs of a stage start together and take the same time. The cycle
    // in which the result is written still counts as busy, so that the
    // stage cannot restart before its result is marked as held.
    assign st_busy[s]      = (|busy_v) || (|done_v);
    assign st_done[s]      = |done_v;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                              st_full[s] <= 1'b0;
      else if (st_done[s])                     st_full[s] <= 1'b1;
      else if (st_full[s] && st_out_ready[s])  st_full[s] <= 1'b0;
    end

    for (genvar j = 0; j < NP; j++) begin : g_pe
      logic [K-1:0] op1, op2, n_op, n_pe;

      if (s == 0) begin : g_leaf
        // Leaves: A*A, except the last one, A*B.
        assign op1 = in_a;
        assign op2 = (j == NP - 1) ? in_b : in_a;
        assign n_op = in_n;
      end else if (OPTIMIZED && s != LEVELS - 1) begin : g_opt
        // Optimized inner level: X' = X*X, Y' = X*Y.
        assign op1 = res[s-1][0];
        assign op2 = (j == 0) ? res[s-1][0] : res[s-1][1];
        assign n_op = n_stg[s-1];
      end else begin : g_full
        // Binary tree: the two children of PE j are PEs 2j and 2j+1.
        assign op1 = res[s-1][2*j];
        assign op2 = res[s-1][2*j+1];
        assign n_op = n_stg[s-1];
      end

      mulmod_pe #(.K(K)) u_pe (
        .clk    (clk),
        .rst_n  (rst_n),
        .start  (st_start[s]),
        .n_in   (n_op),
        .a_in   (op1),
        .b_in   (op2),
        .busy   (busy_v[j]),
        .done   (done_v[j]),
        .result (res[s][j]),
        .n_out  (n_pe)
      );

      if (j == 0) begin : g_n
        assign n_stg[s] = n_pe;
      end
    end

    for (genvar j = NP; j < MAXW; j++) begin : g_unused
      assign res[s][j] = '0;
    end

    assign stage_active[s] = st_busy[s] || st_full[s];
  end

  assign in_ready  = st_in_ready[0];
  assign out_valid = st_full[LEVELS-1];
  assign out_c     = res[LEVELS-1][0];

  // Input handshake: once offered, an operand set stays until it is taken.
  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_a) && $stable(in_b) && $stable(in_n));

  // Output handshake: a result stays until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_c));

  initial begin
    assert (LEVELS >= 2) else $error("trsa_tree needs at least two levels");
  end

endmodule
