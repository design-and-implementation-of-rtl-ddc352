// tb_syndrome_computation: for random 38-bit words the syndrome must equal
// the XOR of the 1-based indices of the set bits; for valid code words it
// must be zero and for a single flipped bit it must be that bit's index.
module tb_syndrome_computation;
  import sbox_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [HAM-1:0] ham;
  logic [5:0]     syn;

  syndrome_computation dut (.ham_i(ham), .syn_o(syn));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      ham = HAM'({$urandom(), $urandom()});
      #1;
      checks++;
      if (int'(syn) != index_xor(cw_t'(ham))) begin
        failures++;
        $display("FAIL ham=%h syn=%0d", ham, syn);
      end
    end
    for (int p = 1; p <= HAM; p++) begin
      automatic cw_t w = ref_encode(rand_msg());
      ham = w[HAM-1:0];
      #1;
      checks++;
      if (syn != 0) begin failures++; $display("FAIL nonzero syndrome on code word"); end
      ham[p-1] = ~ham[p-1];
      #1;
      checks++;
      if (int'(syn) != p) begin failures++; $display("FAIL single error at %0d syn=%0d", p, syn); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
