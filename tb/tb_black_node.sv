// tb_black_node: exhaustive check of the prefix operator in both polarities.
// The expected (G,P) o (G',P') is formed from true-polarity inputs; the even
// instance gets them inverted and must answer in true polarity, the odd
// instance gets them true and must answer inverted.
module tb_black_node;
  logic gh, ph, gl, pl;
  logic ge_o, pe_o, go_o, po_o;
  int checks = 0, failures = 0;

  black_node #(.EVEN(1'b1)) dut_even (
    .g_hi(~gh), .p_hi(~ph), .g_lo(~gl), .p_lo(~pl), .g_o(ge_o), .p_o(pe_o)
  );
  black_node #(.EVEN(1'b0)) dut_odd (
    .g_hi(gh), .p_hi(ph), .g_lo(gl), .p_lo(pl), .g_o(go_o), .p_o(po_o)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic g_exp, p_exp;
      {gh, ph, gl, pl} = i[3:0];
      #1;
      // the upper span generates, or propagates a carry generated below it
      g_exp = gh ? 1'b1 : (ph ? gl : 1'b0);
      p_exp = ph ? pl : 1'b0;
      checks += 2;
      if (ge_o !== g_exp || pe_o !== p_exp) begin
        failures++;
        $display("FAIL even %b%b%b%b: g=%b p=%b", gh, ph, gl, pl, ge_o, pe_o);
      end
      if (go_o !== !g_exp || po_o !== !p_exp) begin
        failures++;
        $display("FAIL odd %b%b%b%b: g_n=%b p_n=%b", gh, ph, gl, pl, go_o, po_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
