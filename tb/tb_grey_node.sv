// tb_grey_node: exhaustive check of the generate-only prefix operator in
// both polarities (even: inverted in, true out; odd: true in, inverted out).
module tb_grey_node;
  logic gh, ph, gl;
  logic ge_o, go_o;
  int checks = 0, failures = 0;

  grey_node #(.EVEN(1'b1)) dut_even (.g_hi(~gh), .p_hi(~ph), .g_lo(~gl), .g_o(ge_o));
  grey_node #(.EVEN(1'b0)) dut_odd  (.g_hi(gh),  .p_hi(ph),  .g_lo(gl),  .g_o(go_o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic g_exp;
      {gh, ph, gl} = i[2:0];
      #1;
      g_exp = gh ? 1'b1 : (ph ? gl : 1'b0);
      checks += 2;
      if (ge_o !== g_exp) begin
        failures++;
        $display("FAIL even %b%b%b: g=%b", gh, ph, gl, ge_o);
      end
      if (go_o !== !g_exp) begin
        failures++;
        $display("FAIL odd %b%b%b: g_n=%b", gh, ph, gl, go_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
