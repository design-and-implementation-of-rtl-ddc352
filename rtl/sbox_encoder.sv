// sbox_encoder: transmit side of the S-BOX link.
//
// The 32-bit message is encoded with the (39,32) SEC-DED extended Hamming
// code and every one of the 39 code bits is then triplicated, so the link
// carries 3*39 = 117 wires. Triplication raises the minimum distance from 4
// to 12, which is what lets the receiver correct any pattern of up to five
// wire errors, random, burst or mixed. The three copies of a code bit are
// placed on adjacent wires (wire 3*j+g carries copy g of code bit j), so the
// middle wire of each triple never sees a neighbour switching against it and
// no wire ever has both neighbours switching against it: this is how the
// code also avoids the worst crosstalk. Encoding and triplication follow the
// description of the code; the adjacent-copy wire order is this design's
// reading of how triplication avoids crosstalk.
//
// Interface: msg_i (32 bits) in, link_o (117 bits) out.
// Timing: purely combinational.
module sbox_encoder
  import sbox_pkg::*;
(
  input  logic [MSG_W-1:0]  msg_i,
  output logic [LINK_W-1:0] link_o
);

  logic [CW_W-1:0] cw;

  secded_encoder u_enc (
    .msg_i (msg_i),
    .cw_o  (cw)
  );

  // triplication: copy g of code bit j on wire 3*j+g
  always_comb begin
    for (int unsigned j = 0; j < CW_W; j++) begin
      for (int unsigned g = 0; g < COPIES; g++) begin
        link_o[COPIES*j + g] = cw[j];
      end
    end
  end

endmodule
