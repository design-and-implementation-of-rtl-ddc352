// tb_sbox_link: end-to-end test of the S-BOX link at its full size
// (32-bit message, 117 wires). The link is modelled here: link_i is link_o
// with chosen wires inverted. Messages are random.
//   - noiseless link
//   - every pattern of one, two and three wrong wires (exhaustive)
//   - every burst of 1..5 adjacent wrong wires at every position
//   - random four- and five-wire patterns and random-plus-burst mixes
// The received message must always equal the one sent. Consecutive words
// are also checked for the crosstalk rule of the triplicated wires: no wire
// may see both neighbours switch against it. Counters make sure every
// mechanism occurs: single-error correction in the forwarded copy,
// double-error detection, forwarding of copy A, B and C, Received_Not_eq,
// DecodeA_eq_DecodeB false, and five-wire bursts.
module tb_sbox_link;
  import sbox_ref_pkg::*;
  import sbox_pkg::*;

  int checks = 0, failures = 0;
  msg_t       tx, rx;
  lnk_t       lo, li, prev;
  copy_sel_e  sel;
  logic [2:0] de;
  logic       rne, aeqb;

  int n_corrected = 0, n_double = 0, n_rne = 0, n_a_ne_b = 0, n_burst5 = 0, n_xtalk = 0;
  int n_sel[3] = '{0, 0, 0};

  sbox_link dut (
    .tx_msg_i             (tx),
    .link_o               (lo),
    .link_i               (li),
    .rx_msg_o             (rx),
    .rx_sel_o             (sel),
    .rx_double_err_o      (de),
    .rx_received_not_eq_o (rne),
    .rx_dec_a_eq_dec_b_o  (aeqb)
  );

  task automatic send(lnk_t err);
    dec_t fwd;
    tx = rand_msg();
    #1;
    li = lo ^ err;
    #1;
    checks++;
    if (rx !== tx) begin
      failures++;
      if (failures < 10)
        $display("FAIL errors (%0d,%0d,%0d) sel=%0d got %h sent %h", group_errors(err, 0),
                 group_errors(err, 1), group_errors(err, 2), sel, rx, tx);
    end
    // crosstalk rule on the transmitted wires
    begin
      automatic int bad = 0;
      for (int w = 1; w < LNK-1; w++) begin
        automatic logic [1:0] d  = {prev[w], lo[w]};
        automatic logic [1:0] dl = {prev[w-1], lo[w-1]};
        automatic logic [1:0] dr = {prev[w+1], lo[w+1]};
        if ((d == 2'b01 && dl == 2'b10 && dr == 2'b10) || (d == 2'b10 && dl == 2'b01 && dr == 2'b01))
          bad++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL crosstalk pattern on %0d wires", bad);
      end
      n_xtalk++;
    end
    prev = lo;
    fwd = ref_decode(ref_group(li, int'(sel)));
    if (fwd.syn != 0 && !fwd.de) n_corrected++;
    if (de != 0) n_double++;
    if (rne) n_rne++;
    if (!aeqb) n_a_ne_b++;
    if ($countones(err) == 5) begin
      automatic int first = 0;
      while (!err[first]) first++;
      if (err[first +: 5] == 5'b11111) n_burst5++;
    end
    n_sel[int'(sel)]++;
  endtask

  initial begin : watchdog
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lnk_t e;
    prev = '0;
    for (int t = 0; t < 100; t++) send('0);
    for (int i = 0; i < LNK; i++) begin
      e = '0; e[i] = 1'b1;
      send(e);
      for (int j = i + 1; j < LNK; j++) begin
        e[j] = 1'b1;
        send(e);
        for (int k = j + 1; k < LNK; k++) begin
          e[k] = 1'b1;
          send(e);
          e[k] = 1'b0;
        end
        e[j] = 1'b0;
      end
    end
    for (int len = 1; len <= 5; len++)
      for (int s = 0; s + len <= LNK; s++) begin
        e = '0;
        for (int i = 0; i < len; i++) e[s+i] = 1'b1;
        send(e);
      end
    for (int t = 0; t < 100000; t++) send(rand_errors(4 + t % 2));
    for (int t = 0; t < 30000; t++) begin
      e = rand_burst(2 + t % 4);
      while ($countones(e) < 5) e[$urandom_range(LNK-1)] = 1'b1;
      send(e);
    end
    $display("mechanisms: corrected=%0d double=%0d selA=%0d selB=%0d selC=%0d recv_not_eq=%0d decA_ne_decB=%0d burst5=%0d xtalk_checked=%0d",
             n_corrected, n_double, n_sel[0], n_sel[1], n_sel[2], n_rne, n_a_ne_b, n_burst5, n_xtalk);
    checks++; if (n_corrected == 0) begin failures++; $display("FAIL no single-error correction seen"); end
    checks++; if (n_double == 0)    begin failures++; $display("FAIL no double error seen"); end
    checks++; if (n_sel[0] == 0 || n_sel[1] == 0 || n_sel[2] == 0) begin failures++; $display("FAIL a copy was never forwarded"); end
    checks++; if (n_rne == 0)       begin failures++; $display("FAIL Received_Not_eq never set"); end
    checks++; if (n_a_ne_b == 0)    begin failures++; $display("FAIL decoded A and B never differed"); end
    checks++; if (n_burst5 == 0)    begin failures++; $display("FAIL no five-wire burst sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
