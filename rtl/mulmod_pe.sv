// mulmod_pe: one TRSA processor element, computing result = (in1 * in2) mod n.
//
// The PE holds four registers, as the element of the tree does: the modulus n,
// the two operands in1 and in2, and the output register. The multiply and the
// reduction are done together, one multiplier bit per clock, by interleaved
// modular multiplication (MSB first): acc = 2*acc + in1[i]*in2, followed by at
// most two subtractions of n, keeps acc < n at every step. This is the
// design's own choice of how to build the multiply-and-mod; it needs only
// K+2-bit adders instead of a K x K multiplier and a 2K-bit divider.
//
// Interface: 'start' (sampled when not busy) loads n_in, a_in and b_in. Both
// operands must be smaller than n. K clock edges after the edge that took
// 'start', 'done' goes high for one cycle and 'result' holds the product
// (K+1 cycles counted from the cycle in which start was raised); it stays until
// the next product is written, so a parent PE may read it while this PE is
// already working on the next operation. 'n_out' is the n register, passed on
// with the data so every PE of the tree can see the modulus.
//
// Timing: start sampled at edge 0, iterations at edges 1..K, the product is
// written and done = 1 after edge K. A new start is accepted in the cycle
// done is high.
module mulmod_pe
  import trsa_pkg::*;
#(
  parameter int unsigned K = KEY_BITS_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] n_in,
  input  logic [K-1:0] a_in,
  input  logic [K-1:0] b_in,
  output logic         busy,
  output logic         done,
  output logic [K-1:0] result,
  output logic [K-1:0] n_out
);

  localparam int unsigned CW = $clog2(K + 1);

  logic [K-1:0]  n_q, in1_q, in2_q, out_q;
  logic [K-1:0]  acc_q;
  logic [CW-1:0] cnt_q;
  logic          busy_q, done_q;

  // One interleaved step: 2*acc + bit*in2 < 3n, then reduce twice.
  logic [K+1:0] t0, t1, t2;
  always_comb begin
    t0 = {1'b0, acc_q, 1'b0} + (in1_q[K-1] ? {2'b00, in2_q} : '0);
    t1 = (t0 >= {2'b00, n_q}) ? t0 - {2'b00, n_q} : t0;
    t2 = (t1 >= {2'b00, n_q}) ? t1 - {2'b00, n_q} : t1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q    <= '0;
      in1_q  <= '0;
      in2_q  <= '0;
      out_q  <= '0;
      acc_q  <= '0;
      cnt_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (start) begin
          n_q    <= n_in;
          in1_q  <= a_in;
          in2_q  <= b_in;
          acc_q  <= '0;
          cnt_q  <= CW'(K);
          busy_q <= 1'b1;
        end
      end else begin
        acc_q <= t2[K-1:0];
        in1_q <= {in1_q[K-2:0], 1'b0};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          out_q  <= t2[K-1:0];
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign busy   = busy_q;
  assign done   = done_q;
  assign result = out_q;
  assign n_out  = n_q;

endmodule
