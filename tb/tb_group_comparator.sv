// tb_group_comparator: random groups with forced equalities between pairs;
// checks Received_Not_eq (all three differ) and DecodeA_eq_DecodeB.
module tb_group_comparator;
  import sbox_ref_pkg::*;

  int checks = 0, failures = 0;
  cw_t  ra, rb, rc;
  msg_t da, db;
  logic rne, aeqb;

  group_comparator dut (.rx_a_i(ra), .rx_b_i(rb), .rx_c_i(rc), .dec_a_i(da), .dec_b_i(db),
                        .received_not_eq_o(rne), .dec_a_eq_dec_b_o(aeqb));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      ra = CW'({$urandom(), $urandom()});
      rb = ra ^ ((t % 5 == 1) ? cw_t'(0) : cw_t'(1) << $urandom_range(CW-1));
      rc = (t % 5 == 2) ? ra : (t % 5 == 3) ? rb : rb ^ (cw_t'(1) << $urandom_range(CW-1));
      da = rand_msg();
      db = (t % 2 == 0) ? da : da ^ (msg_t'(1) << $urandom_range(MSG-1));
      #1;
      checks++;
      if (rne !== (ra != rb && rb != rc && ra != rc)) begin
        failures++;
        $display("FAIL received_not_eq=%b", rne);
      end
      checks++;
      if (aeqb !== (t % 2 == 0)) begin
        failures++;
        $display("FAIL dec_a_eq_dec_b=%b", aeqb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
