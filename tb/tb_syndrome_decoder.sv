// tb_syndrome_decoder: all 64 syndrome values; 1..38 must select exactly the
// bit with that 1-based index, 0 and 39..63 must select nothing.
module tb_syndrome_decoder;
  import sbox_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [5:0]     syn;
  logic [HAM-1:0] loc;

  syndrome_decoder dut (.syn_i(syn), .loc_o(loc));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 64; s++) begin
      logic [HAM-1:0] exp;
      syn = 6'(s);
      #1;
      exp = '0;
      if (s >= 1 && s <= HAM) exp[s-1] = 1'b1;
      checks++;
      if (loc !== exp) begin
        failures++;
        $display("FAIL syn=%0d loc=%h exp=%h", s, loc, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
