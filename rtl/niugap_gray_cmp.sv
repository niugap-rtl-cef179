// niugap_gray_cmp: reflected Gray code successor check.
// Decides whether cand is the code that follows prev in the cyclic reflected
// Gray sequence, without converting either to binary. Two checks, as in the
// NIUGAP reorder comparator: an XOR of the two codes must have exactly one bit
// set (Hamming distance 1, output hd1), and that bit must be the one the
// reflected code's regular pattern flips next. That pattern is: if prev has an
// even number of ones, bit 0 flips; otherwise the bit just left of the lowest
// 1 flips; from the last code (MSB alone set) the MSB flips back to zero. The
// second check rejects codes at distance 1 that are not the successor.
// next_code is prev with that bit flipped. Combinational.
module niugap_gray_cmp #(
  parameter int W = 12
) (
  input  logic [W-1:0] prev,
  input  logic [W-1:0] cand,
  output logic         hd1,
  output logic         is_next,
  output logic [W-1:0] next_code
);
  logic [W-1:0] diff, flip;
  logic         found;

  always_comb begin
    diff = prev ^ cand;
    hd1  = (diff != '0) && ((diff & (diff - W'(1))) == '0);
    flip = '0;
    found = 1'b0;
    if (^prev == 1'b0) begin
      flip[0] = 1'b1;
    end else begin
      for (int i = 0; i < W - 1; i++) begin
        if (!found && prev[i]) begin
          flip[i+1] = 1'b1;
          found     = 1'b1;
        end
      end
      if (!found) flip[W-1] = 1'b1;  // last code wraps to zero
    end
    next_code = prev ^ flip;
    is_next   = hd1 && (diff == flip);
  end
endmodule
