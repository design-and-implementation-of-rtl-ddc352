// syndrome_decoder: single-error locator of the SEC-DED decoder.
//
// Decodes the 6-bit syndrome C1..C6 into a one-hot flip mask over the 38
// Hamming bit positions: loc_o[p-1] is set when the syndrome equals p. A
// zero syndrome and the values 39..63, which no single error can produce,
// give an all-zero mask, so nothing is flipped. The mask drives the XOR
// correction directly; whether the error was a correctable single error is
// decided separately by the double-error flag.
//
// Interface: syn_i (6 bits) in, loc_o (38 bits, at most one bit set) out.
// Timing: purely combinational.
module syndrome_decoder
  import sbox_pkg::*;
(
  input  logic [CHK_W-1:0] syn_i,
  output logic [HAM_W-1:0] loc_o
);

  always_comb begin
    for (int unsigned p = 1; p <= HAM_W; p++) begin
      loc_o[p - 1] = (syn_i == CHK_W'(p));
    end
  end

endmodule
