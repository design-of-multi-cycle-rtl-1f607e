// "More than" comparison scheme for two unsigned W-bit numbers.
//
// Every bit pair goes through a one-bit incomplete (half) adder fed with
// a[i] and ~b[i]: its carry a[i]&~b[i] says "a wins at this bit" and its
// sum ~(a[i]^b[i]) says "the bits are equal". For each bit i a NAND element
// takes the carry of bit i together with the equality signals of all bits
// above it; it goes low exactly when a and b agree above bit i and a has a
// 1 where b has a 0. The output p_n is the AND of all NAND outputs, so it
// is active low: p_n = 0 means a > b, p_n = 1 means a <= b.
//
// The half-adder/NAND structure and the active-low output follow the
// improved comparison scheme of the source design; the width is a
// parameter here (the original is drawn for 4 bits). Purely combinational.
module gt_comparator #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         p_n   // 0: a > b, 1: a <= b
);

  logic [W-1:0] ha_carry;  // a[i] > b[i]
  logic [W-1:0] ha_sum;    // a[i] == b[i]
  logic [W-1:0] nand_out;

  always_comb begin
    logic eq_above;
    ha_carry = a & ~b;
    ha_sum   = a ^ ~b;
    eq_above = 1'b1;
    for (int i = W - 1; i >= 0; i--) begin
      nand_out[i] = ~(ha_carry[i] & eq_above);
      eq_above    = eq_above & ha_sum[i];
    end
    p_n = &nand_out;
  end

endmodule
