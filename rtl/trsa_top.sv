// trsa_top: pipelined, optimized TRSA modular exponentiator, C = m^e mod n.
//
// The design is a coordinator followed by a tree of MulMod processor
// elements. The coordinator splits the exponent over the 2^l tree inputs and
// computes A = m^(e div 2^l) and B = m^(e div 2^l + e mod 2^l), both mod n;
// the tree of l levels multiplies 2^l - 1 copies of A and one B. In its
// optimized form the tree has 2l - 1 PEs instead of 2^l - 1, and every level
// is a pipeline stage, so a new message can enter the tree each MulMod time.
//
// Two run-time modes, sampled only while nothing is in flight:
//   pipe_en      = 1: messages overlap in the pipeline (pipelined TRSA);
//                  0: a message is admitted only once the previous result
//                  has left (the behaviour of the original, unpipelined TRSA).
//   coord_bypass = 1: the host supplies A and B itself (the coordinator role
//                  played by a host CPU, the tree used as a coprocessor);
//                  0: the internal coordinator computes them from m and e.
//
// Interface: valid/ready on the message input (in_m, in_e, in_n, or in_a,
// in_b, in_n in bypass mode) and on the result (out_c). Results come out in
// the order the messages went in. in_flight counts accepted messages whose
// result has not left yet; coord_ops is the MulMod count the coordinator
// spent on its last message.
module trsa_top
  import trsa_pkg::*;
#(
  parameter int unsigned K         = KEY_BITS_DEFAULT,
  parameter int unsigned LEVELS    = LEVELS_DEFAULT,
  parameter bit          OPTIMIZED = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pipe_en,
  input  logic              coord_bypass,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [K-1:0]      in_m,
  input  logic [K-1:0]      in_e,
  input  logic [K-1:0]      in_n,
  input  logic [K-1:0]      in_a,
  input  logic [K-1:0]      in_b,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [K-1:0]      out_c,
  output logic [7:0]        in_flight,
  output logic [31:0]       coord_ops,
  output logic [LEVELS-1:0] stage_active
);

  logic         pipe_q, bypass_q;
  logic [7:0]   flight_q;
  logic         admit, in_fire, out_fire;

  logic         co_in_ready, co_out_valid, co_out_ready;
  logic [K-1:0] co_a, co_b, co_n;

  logic         tr_in_valid, tr_in_ready;
  logic [K-1:0] tr_a, tr_b, tr_n;

  // Without pipelining only one message may be inside at a time.
  assign admit = pipe_q || (flight_q == '0);

  trsa_coordinator #(.K(K), .LEVELS(LEVELS)) u_coord (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid && admit && !bypass_q),
    .in_ready  (co_in_ready),
    .in_m      (in_m),
    .in_e      (in_e),
    .in_n      (in_n),
    .out_valid (co_out_valid),
    .out_ready (co_out_ready),
    .out_a     (co_a),
    .out_b     (co_b),
    .out_n     (co_n),
    .op_count  (coord_ops)
  );

  // Tree input: from the coordinator, or straight from the host.
  always_comb begin
    if (bypass_q) begin
      tr_in_valid = in_valid && admit;
      tr_a        = in_a;
      tr_b        = in_b;
      tr_n        = in_n;
    end else begin
      tr_in_valid = co_out_valid;
      tr_a        = co_a;
      tr_b        = co_b;
      tr_n        = co_n;
    end
  end
  assign co_out_ready = !bypass_q && tr_in_ready;

  trsa_tree #(.K(K), .LEVELS(LEVELS), .OPTIMIZED(OPTIMIZED)) u_tree (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (tr_in_valid),
    .in_ready     (tr_in_ready),
    .in_a         (tr_a),
    .in_b         (tr_b),
    .in_n         (tr_n),
    .out_valid    (out_valid),
    .out_ready    (out_ready),
    .out_c        (out_c),
    .stage_active (stage_active)
  );

  assign in_ready = admit && (bypass_q ? tr_in_ready : co_in_ready);
  assign in_fire  = in_valid && in_ready;
  assign out_fire = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe_q   <= 1'b1;
      bypass_q <= 1'b0;
      flight_q <= '0;
    end else begin
      flight_q <= flight_q + 8'(in_fire) - 8'(out_fire);
      // Modes change only when the design is empty, so order is kept.
      if (flight_q == '0 && !in_fire) begin
        pipe_q   <= pipe_en;
        bypass_q <= coord_bypass;
      end
    end
  end

  assign in_flight = flight_q;

endmodule
