// trap_filter: stage 2 of the filter datapath, one trapezoidal filter.
//
// The trapezoidal output is the sum of the newest window of samples minus the
// sum of an older window of the same width, a gap apart. It is computed
// recursively: each clock the previous output gains the sample entering each
// window and loses the sample leaving it,
//     O[n] = O[n-1] + WIN2_NEW - WIN2_OLD - WIN1_NEW + WIN1_OLD.
// No division by the window width is done in hardware; the host divides.
//
// The four 8-bit operands are sign-extended to ACC_W (16) bits. The previous
// output is kept in redundant sum/carry form in two registers, so the five
// terms are six vectors, reduced to two by four carry-save adders in three
// levels:
//     CSA1(WIN2_NEW, WIN1_OLD, ~WIN2_OLD)  CSA2(~WIN1_NEW, SUM, CARRY)
//     CSA3(s1, c1<<1 | 1, s2)
//     CSA4(s3, c3<<1, c2<<1 | 1)
// The two subtracted operands are bit-inverted, and the "+1" that completes
// each negation is placed in the empty LSB of a shifted carry vector. The
// CSA4 outputs are fed back to SUM/CARRY and added once by a single adder
// whose result is registered as the filter output. Arithmetic wraps modulo
// 2^16, so the output is exact as long as the true value fits in 16 bits.
//
// Timing: operands registered at edge k contribute to out after edge k+1
// (one cycle). clear zeroes the feedback and the output together with the
// FIFO so that the recursion restarts from a consistent state (this
// implementation's choice). The adder tree arrangement follows the design;
// the synchronous reset is this implementation's.
module trap_filter
  import pd_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    clear,
  input  sample_t w2new,
  input  sample_t w2old,
  input  sample_t w1new,
  input  sample_t w1old,
  output acc_t    out
);

  logic [ACC_W-1:0] sum_q, carry_q;           // previous output, redundant form
  logic [ACC_W-1:0] x_w2new, x_w2old, x_w1new, x_w1old;
  logic [ACC_W-1:0] s1, c1, s2, c2, s3, c3, s4, c4;
  logic [ACC_W-1:0] nxt_sum, nxt_carry;

  always_comb begin
    x_w2new = {{(ACC_W-SAMPLE_W){w2new[SAMPLE_W-1]}}, w2new};  // sign extension
    x_w2old = {{(ACC_W-SAMPLE_W){w2old[SAMPLE_W-1]}}, w2old};
    x_w1new = {{(ACC_W-SAMPLE_W){w1new[SAMPLE_W-1]}}, w1new};
    x_w1old = {{(ACC_W-SAMPLE_W){w1old[SAMPLE_W-1]}}, w1old};
    {s1, c1} = csa(x_w2new, x_w1old, ~x_w2old);
    {s2, c2} = csa(~x_w1new, sum_q, carry_q);
    {s3, c3} = csa(s1, {c1[ACC_W-2:0], 1'b1}, s2);
    {s4, c4} = csa(s3, {c3[ACC_W-2:0], 1'b0}, {c2[ACC_W-2:0], 1'b1});
    nxt_sum   = s4;
    nxt_carry = {c4[ACC_W-2:0], 1'b0};
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      sum_q   <= '0;
      carry_q <= '0;
      out     <= '0;
    end else begin
      sum_q   <= nxt_sum;
      carry_q <= nxt_carry;
      out     <= acc_t'(nxt_sum + nxt_carry);  // the single carry-propagate add
    end
  end

endmodule
