// tb_pg_pre: exhaustive check of the preprocessing row.
// Every combination of two 4-bit slices is applied; the inverted generate
// and propagate are compared with ~(a & b) and ~(a ^ b) worked out per bit.
module tb_pg_pre;
  localparam int W = 4;
  logic [W-1:0] a, b, g_n, p_n;
  int checks = 0, failures = 0;

  pg_pre #(.W(W)) dut (.a(a), .b(b), .g_n(g_n), .p_n(p_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = i[3:0];
      b = i[7:4];
      #1;
      for (int k = 0; k < W; k++) begin
        // bit generate is 1 only for 1+1, bit propagate for 0+1 and 1+0
        logic g_exp, p_exp;
        g_exp = (a[k] == 1'b1) && (b[k] == 1'b1);
        p_exp = (a[k] != b[k]);
        checks++;
        if (g_n[k] !== !g_exp || p_n[k] !== !p_exp) begin
          failures++;
          $display("FAIL a=%b b=%b bit %0d: g_n=%b p_n=%b", a, b, k, g_n[k], p_n[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
