// bit_swap: the two 2x1 multiplexers of the bit-swapping arrangement.
//
// Two adjacent LFSR cells a and b are passed to o1 and o2 unchanged, or
// crossed over, depending on a third cell sel: when sel equals SWAP_ON the
// pair is swapped (o1 = b, o2 = a). Placed on the right cells, one of the two
// outputs carries half the transitions of a plain LFSR cell while the ones and
// zeros stay balanced. Purely combinational.
// The swap rule is from the bit-swapping method; the default polarity
// (swap when the selection cell is 0) is the one that puts the saving on o2
// in the x^n + x + 1 arrangement.
module bit_swap #(
  parameter bit SWAP_ON = 1'b0
) (
  input  logic a,
  input  logic b,
  input  logic sel,
  output logic o1,
  output logic o2
);

  logic swap;

  always_comb begin
    swap = (sel == SWAP_ON);
    o1   = swap ? b : a;
    o2   = swap ? a : b;
  end

endmodule
