// tb_sbox_encoder: checks the transmit side: the 117 wires must carry three
// adjacent copies of every reference code bit, and two consecutive words must
// never make a wire's two neighbours both switch against it.
module tb_sbox_encoder;
  import sbox_ref_pkg::*;

  int checks = 0, failures = 0;
  msg_t msg;
  lnk_t lnk, prev;

  sbox_encoder dut (.msg_i(msg), .link_o(lnk));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    for (int i = 0; i < 3000; i++) begin
      msg = (i == 0) ? '0 : (i == 1) ? '1 : rand_msg();
      #1;
      checks++;
      if (lnk !== ref_triplicate(ref_encode(msg))) begin
        failures++;
        $display("FAIL msg=%h link=%h", msg, lnk);
      end
      // crosstalk: no wire whose both neighbours switch opposite to it
      if (i > 0) begin
        automatic int bad = 0;
        for (int w = 1; w < LNK-1; w++) begin
          automatic logic up   = !prev[w] && lnk[w];
          automatic logic down = prev[w] && !lnk[w];
          automatic logic l_up = !prev[w-1] && lnk[w-1], l_dn = prev[w-1] && !lnk[w-1];
          automatic logic r_up = !prev[w+1] && lnk[w+1], r_dn = prev[w+1] && !lnk[w+1];
          if ((up && l_dn && r_dn) || (down && l_up && r_up)) bad++;
        end
        checks++;
        if (bad != 0) begin
          failures++;
          $display("FAIL crosstalk pattern on %0d wires", bad);
        end
      end
      prev = lnk;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
