// trsa_coordinator: the coordinator node of TRSA, which feeds the tree.
//
// For a tree of l levels the exponent is split over n_p = 2^l tree inputs:
//   e_o = e div n_p,   e_l = e_o + (e mod n_p),
//   A   = m^e_o mod n, B   = m^e_l mod n.
// The tree then multiplies 2^l - 1 copies of A and one B, giving m^e mod n.
//
// How it works: one mulmod_pe is reused for every MulMod. A is computed by
// the left-to-right binary method on e_o (leading zero bits are skipped, the
// first set bit loads m, after that every bit costs a square and every set
// bit a multiply by m). Then R = m^(e mod n_p) is computed the same way, and
// B = A * R. Computing B through A is this design's choice; it gives the
// same B as the definition above. An exponent part equal to zero yields 1.
//
// Interface: valid/ready on both sides. A message (m, e, n) is accepted in
// IDLE; m must be smaller than n and n must be above 1. The result (A, B, n)
// is held with out_valid until out_ready. op_count is the number of MulMods
// the last message used; it is valid together with out_valid.
//
// Timing: each MulMod takes K+1 cycles plus one cycle of control, so a
// message takes roughly (squares + multiplies) * (K+2) cycles.
module trsa_coordinator
  import trsa_pkg::*;
#(
  parameter int unsigned K      = KEY_BITS_DEFAULT,
  parameter int unsigned LEVELS = LEVELS_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  // message in
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [K-1:0] in_m,
  input  logic [K-1:0] in_e,
  input  logic [K-1:0] in_n,
  // A, B and n out to the tree
  output logic         out_valid,
  input  logic         out_ready,
  output logic [K-1:0] out_a,
  output logic [K-1:0] out_b,
  output logic [K-1:0] out_n,
  output logic [31:0]  op_count
);

  localparam int unsigned BW = $clog2(K + 1);

  typedef enum logic [2:0] {
    S_IDLE,   // waiting for a message
    S_BIT,    // decide what the current exponent bit needs
    S_SQ,     // waiting for acc^2
    S_MUL,    // waiting for acc*m
    S_B,      // waiting for B = A * R
    S_OUT     // A and B ready
  } state_t;

  state_t        state_q;
  logic          phase_r_q;   // 0: exponent e_o (for A), 1: e mod n_p (for R)
  logic          started_q;   // a set bit has been seen in this exponent part
  logic [K-1:0]  m_q, n_q, exp_q, acc_q, a_q, b_q;
  logic [LEVELS-1:0] er_q;      // e mod n_p
  logic [BW-1:0] bits_q;
  logic [31:0]   ops_q;

  logic          pe_start, pe_busy, pe_done;
  logic [K-1:0]  pe_a, pe_b, pe_res, pe_n_unused;

  // The only exponent bit looked at is the MSB of exp_q.
  logic cur_bit;
  assign cur_bit = exp_q[K-1];

  // Operands of the MulMod about to start.
  always_comb begin
    pe_start = 1'b0;
    pe_a     = acc_q;
    pe_b     = acc_q;
    unique case (state_q)
      S_BIT: begin
        if (bits_q != '0 && started_q) begin
          pe_start = 1'b1;               // square
        end else if (bits_q == '0 && phase_r_q) begin
          pe_start = 1'b1;               // B = A * R
          pe_a     = a_q;
          pe_b     = started_q ? acc_q : K'(1);
        end
      end
      S_SQ: begin
        if (pe_done && cur_bit) begin
          pe_start = 1'b1;               // multiply by m
          pe_a     = pe_res;
          pe_b     = m_q;
        end
      end
      default: ;
    endcase
  end

  mulmod_pe #(.K(K)) u_pe (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (pe_start),
    .n_in   (n_q),
    .a_in   (pe_a),
    .b_in   (pe_b),
    .busy   (pe_busy),
    .done   (pe_done),
    .result (pe_res),
    .n_out  (pe_n_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      phase_r_q <= 1'b0;
      started_q <= 1'b0;
      m_q       <= '0;
      n_q       <= '0;
      er_q      <= '0;
      exp_q     <= '0;
      acc_q     <= '0;
      a_q       <= '0;
      b_q       <= '0;
      bits_q    <= '0;
      ops_q     <= '0;
    end else begin
      if (pe_start) ops_q <= ops_q + 1;
      unique case (state_q)
        S_IDLE: begin
          if (in_valid) begin
            m_q       <= in_m;
            n_q       <= in_n;
            er_q      <= in_e[LEVELS-1:0];
            // e_o = e >> LEVELS, kept MSB-aligned: clear the low bits.
            exp_q     <= in_e & {{(K-LEVELS){1'b1}}, {LEVELS{1'b0}}};
            bits_q    <= BW'(K - LEVELS);
            phase_r_q <= 1'b0;
            started_q <= 1'b0;
            ops_q     <= '0;
            state_q   <= S_BIT;
          end
        end
        S_BIT: begin
          if (bits_q == '0) begin
            if (!phase_r_q) begin
              // A is complete; start on R = m^(e mod n_p).
              a_q       <= started_q ? acc_q : K'(1);
              exp_q     <= {er_q, {(K-LEVELS){1'b0}}};
              bits_q    <= BW'(LEVELS);
              phase_r_q <= 1'b1;
              started_q <= 1'b0;
            end else begin
              state_q <= S_B;
            end
          end else if (started_q) begin
            state_q <= S_SQ;
          end else begin
            if (cur_bit) begin
              acc_q     <= m_q;
              started_q <= 1'b1;
            end
            exp_q  <= exp_q << 1;
            bits_q <= bits_q - 1'b1;
          end
        end
        S_SQ: begin
          if (pe_done) begin
            acc_q <= pe_res;
            if (cur_bit) begin
              state_q <= S_MUL;
            end else begin
              exp_q   <= exp_q << 1;
              bits_q  <= bits_q - 1'b1;
              state_q <= S_BIT;
            end
          end
        end
        S_MUL: begin
          if (pe_done) begin
            acc_q   <= pe_res;
            exp_q   <= exp_q << 1;
            bits_q  <= bits_q - 1'b1;
            state_q <= S_BIT;
          end
        end
        S_B: begin
          if (pe_done) begin
            b_q     <= pe_res;
            state_q <= S_OUT;
          end
        end
        S_OUT: begin
          if (out_ready) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign in_ready  = (state_q == S_IDLE);
  assign out_valid = (state_q == S_OUT);
  assign out_a     = a_q;
  assign out_b     = b_q;
  assign out_n     = n_q;
  assign op_count  = ops_q;

  // The PE is never started while it is still working.
  a_pe_free: assert property (@(posedge clk) disable iff (!rst_n) pe_start |-> !pe_busy);

endmodule
