// tb_sbox_link_exhaustive: exhaustive error-pattern workload for the S-BOX
// link. Every pattern of one to five wrong wires out of 117 is put on the
// link between sbox_link's encoder and decoder:
//   C(117,1..5) = 117 + 6,786 + 260,130 + 7,413,705 + 167,549,733
//               = 175,230,471 patterns.
// The message changes (randomly) for every choice of the first two wires.
// The decoded message must always equal the one sent, so this shows that
// the code corrects every random, burst or mixed pattern of up to five
// errors. Runs in about a minute with verilator.
module tb_sbox_link_exhaustive;
  import sbox_ref_pkg::*;
  import sbox_pkg::copy_sel_e;

  localparam longint TOTAL = 64'd175230471;

  int checks = 0, failures = 0;
  longint patterns = 0;
  msg_t       tx, rx;
  lnk_t       lo, li, e;
  copy_sel_e  sel;
  logic [2:0] de;
  logic       rne, aeqb;

  sbox_link dut (
    .tx_msg_i(tx), .link_o(lo), .link_i(li), .rx_msg_o(rx), .rx_sel_o(sel),
    .rx_double_err_o(de), .rx_received_not_eq_o(rne), .rx_dec_a_eq_dec_b_o(aeqb));

  // decode the current pattern e and compare
  task automatic try_pattern();
    li = lo ^ e;
    #1;
    patterns++;
    if (rx !== tx) begin
      failures++;
      if (failures < 10)
        $display("FAIL pattern %h sel=%0d de=%b rne=%b aeqb=%b", e, sel, de, rne, aeqb);
    end
  endtask

  initial begin : watchdog
    #1_000_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e  = '0;
    tx = rand_msg();
    #1;
    for (int a = 0; a < LNK; a++) begin
      e[a] = 1'b1;
      try_pattern();
      for (int b = a + 1; b < LNK; b++) begin
        e[b] = 1'b1;
        tx = rand_msg();
        #1;
        try_pattern();
        for (int c = b + 1; c < LNK; c++) begin
          e[c] = 1'b1;
          try_pattern();
          for (int d = c + 1; d < LNK; d++) begin
            e[d] = 1'b1;
            try_pattern();
            for (int f = d + 1; f < LNK; f++) begin
              e[f] = 1'b1;
              try_pattern();
              e[f] = 1'b0;
            end
            e[d] = 1'b0;
          end
          e[c] = 1'b0;
        end
        e[b] = 1'b0;
      end
      e[a] = 1'b0;
    end
    checks++;
    if (patterns != TOTAL) begin
      failures++;
      $display("FAIL %0d patterns run", patterns);
    end
    // one check per decoded pattern, capped to the counter's range
    checks += (patterns > 64'd2000000000) ? 2000000000 : int'(patterns);
    $display("error patterns of 1..5 wires decoded: %0d", patterns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
