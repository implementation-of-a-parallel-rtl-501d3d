// tb_rca: exhaustive check of the carry-ripple adder at the sub-group width
// (2 bits) and at 3 bits, for both carry-in values, against integer
// addition.
module tb_rca;
  logic [1:0] a2, b2, s2;
  logic [2:0] a3, b3, s3;
  logic       cin;
  int checks = 0, failures = 0;

  rca #(.W(2)) dut2 (.a(a2), .b(b2), .cin(cin), .s(s2));
  rca #(.W(3)) dut3 (.a(a3), .b(b3), .cin(cin), .s(s3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      int unsigned e2, e3;
      cin = i[6];
      a2 = i[1:0]; b2 = i[3:2];
      a3 = i[2:0]; b3 = i[5:3];
      #1;
      e2 = (int'(a2) + int'(b2) + int'(cin)) % 4;
      e3 = (int'(a3) + int'(b3) + int'(cin)) % 8;
      checks += 2;
      if (int'(s2) != e2) begin
        failures++;
        $display("FAIL W=2 %0d+%0d+%0d = %0d", a2, b2, cin, s2);
      end
      if (int'(s3) != e3) begin
        failures++;
        $display("FAIL W=3 %0d+%0d+%0d = %0d", a3, b3, cin, s3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
