// niugap_bin2gray: binary to reflected Gray code converter.
// Each Gray bit is the XOR of the binary bit and the next more significant
// bit; the most significant bit passes unchanged, so successive binary counts
// give codes that differ in exactly one bit. This is the conversion network
// of the NIUGAP design (four bits there), here with a width parameter W.
// Purely combinational, no clock.
module niugap_bin2gray #(
  parameter int W = 4
) (
  input  logic [W-1:0] bin,
  output logic [W-1:0] gray
);
  always_comb begin
    gray[W-1] = bin[W-1];
    for (int i = 0; i < W - 1; i++) gray[i] = bin[i] ^ bin[i+1];
  end
endmodule
