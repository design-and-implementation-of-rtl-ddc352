// group_comparator: comparator of the S-BOX decoder.
//
// Compares the three received groups and the first two decoded copies:
//   received_not_eq_o  = 1 when all three received groups differ pairwise
//   dec_a_eq_dec_b_o   = 1 when decoded copy A equals decoded copy B
// Both signals and their meaning follow the description of the decoder; they
// are plain equality comparators.
//
// Interface: rx_a_i/rx_b_i/rx_c_i (39 bits each), dec_a_i/dec_b_i (32 bits
// each) in; the two flags out. Timing: purely combinational.
module group_comparator
  import sbox_pkg::*;
(
  input  logic [CW_W-1:0]  rx_a_i,
  input  logic [CW_W-1:0]  rx_b_i,
  input  logic [CW_W-1:0]  rx_c_i,
  input  logic [MSG_W-1:0] dec_a_i,
  input  logic [MSG_W-1:0] dec_b_i,
  output logic             received_not_eq_o,
  output logic             dec_a_eq_dec_b_o
);

  assign received_not_eq_o = (rx_a_i != rx_b_i) && (rx_b_i != rx_c_i) && (rx_a_i != rx_c_i);
  assign dec_a_eq_dec_b_o  = (dec_a_i == dec_b_i);

endmodule
