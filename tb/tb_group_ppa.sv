// tb_group_ppa: exhaustive check of the bottom-level group adder pair.
// For every pair of 8-bit operands the carry-in-0 sum, the carry-in-1 sum,
// the group generate (carry out of a + b) and the group propagate (every
// bit of a ^ b set) are compared with integer arithmetic. A second 8-bit
// instance without the carry variant (lowest group) and a 4-bit instance
// (whose G/P leave an odd level, hence inverted) are checked alongside.
// It also counts how often a sub-group carry chain ran through a whole
// group, the case the shared-node carry tree must get right.
module tb_group_ppa;
  import hppa_pkg::*;

  int checks = 0, failures = 0;
  int full_propagate = 0;

  logic [7:0] a, b;
  logic       g8, p8, g8l, p8l;
  logic [7:0] snc8, sc8, snc8l, sc8l;
  logic [3:0] a4, b4, snc4, sc4;
  logic       g4, p4;

  group_ppa #(.GROUP_BITS(8), .WITH_CARRY(1'b1)) dut8 (
    .a(a), .b(b), .g_grp(g8), .p_grp(p8), .s_nc(snc8), .s_c(sc8));
  group_ppa #(.GROUP_BITS(8), .WITH_CARRY(1'b0)) dut8l (
    .a(a), .b(b), .g_grp(g8l), .p_grp(p8l), .s_nc(snc8l), .s_c(sc8l));
  group_ppa #(.GROUP_BITS(4), .WITH_CARRY(1'b1)) dut4 (
    .a(a4), .b(b4), .g_grp(g4), .p_grp(p4), .s_nc(snc4), .s_c(sc4));

  localparam bit INV8 = level_inverted(2);   // 4 sub-groups: last level CM2
  localparam bit INV4 = level_inverted(1);   // 2 sub-groups: last level CM1

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int unsigned s0, s1;
      a  = i[7:0];
      b  = i[15:8];
      a4 = i[3:0];
      b4 = i[7:4];
      #1;
      s0 = int'(a) + int'(b);
      s1 = s0 + 1;
      if ((a ^ b) == 8'hff) full_propagate++;
      checks += 7;
      if (snc8 !== s0[7:0] || sc8 !== s1[7:0]) begin
        failures++;
        $display("FAIL 8-bit %h+%h: s_nc=%h s_c=%h", a, b, snc8, sc8);
      end
      if ((g8 ^ INV8) !== s0[8] || (p8 ^ INV8) !== ((a ^ b) == 8'hff)) begin
        failures++;
        $display("FAIL 8-bit %h+%h: g=%b p=%b", a, b, g8, p8);
      end
      if (snc8l !== s0[7:0]) begin
        failures++;
        $display("FAIL lowest %h+%h: s_nc=%h", a, b, snc8l);
      end
      if ((g8l ^ INV8) !== s0[8]) begin
        failures++;
        $display("FAIL lowest %h+%h: g=%b", a, b, g8l);
      end
      if (p8l !== 1'b0 || sc8l !== 8'h00) begin
        failures++;
        $display("FAIL lowest %h+%h: p=%b s_c=%h (not formed, expect 0)", a, b, p8l, sc8l);
      end
      begin
        int unsigned t0;
        t0 = int'(a4) + int'(b4);
        if (snc4 !== t0[3:0] || sc4 !== 4'(t0 + 1)) begin
          failures++;
          $display("FAIL 4-bit %h+%h: s_nc=%h s_c=%h", a4, b4, snc4, sc4);
        end
        if ((g4 ^ INV4) !== t0[4] || (p4 ^ INV4) !== ((a4 ^ b4) == 4'hf)) begin
          failures++;
          $display("FAIL 4-bit %h+%h: g=%b p=%b", a4, b4, g4, p4);
        end
      end
    end
    checks++;
    if (full_propagate == 0) begin
      failures++;
      $display("FAIL no fully propagating group was applied");
    end
    $display("full-group propagations: %0d", full_propagate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
