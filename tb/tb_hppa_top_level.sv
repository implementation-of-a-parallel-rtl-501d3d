// tb_hppa_top_level: checks the top level of the adder on its own.
// The group G/P and the two candidate sums of every group are drawn at
// random (they need not come from a real addition), the carry into every
// group is found by rippling c = g | p & c over the groups, and the word
// sum must hold, group by group, the carry-in-1 sum where that carry is set
// and the carry-in-0 sum elsewhere; cout must be the final carry.
// Two shapes: eight 8-bit groups (CM3..CM5, true-polarity inputs) and
// sixteen 4-bit groups (CM2..CM5, inverted inputs).
module tb_hppa_top_level;
  import hppa_pkg::*;

  int checks = 0, failures = 0;
  int sel_c = 0, sel_nc = 0, couts = 0;

  logic [7:0]        g8, p8;
  logic [7:0][7:0]   snc8;
  logic [7:1][7:0]   sc8;
  logic [63:0]       sum8;
  logic              cout8;

  logic [15:0]       g4, p4;
  logic [15:0][3:0]  snc4;
  logic [15:1][3:0]  sc4;
  logic [63:0]       sum4;
  logic              cout4;

  localparam bit IN8 = level_inverted(2);   // group G/P leave CM2
  localparam bit IN4 = level_inverted(1);   // group G/P leave CM1

  hppa_top_level #(.WIDTH(64), .GROUP_BITS(8)) dut8 (
    .g_grp(g8 ^ {8{IN8}}), .p_grp(p8 ^ {8{IN8}}), .s_nc(snc8), .s_c(sc8),
    .sum(sum8), .cout(cout8));
  hppa_top_level #(.WIDTH(64), .GROUP_BITS(4)) dut4 (
    .g_grp(g4 ^ {16{IN4}}), .p_grp(p4 ^ {16{IN4}}), .s_nc(snc4), .s_c(sc4),
    .sum(sum4), .cout(cout4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic c;
      logic [63:0] e8, e4;
      g8 = 8'($urandom) & 8'($urandom) & 8'($urandom);
      p8 = 8'($urandom) | 8'($urandom);
      g4 = 16'($urandom) & 16'($urandom) & 16'($urandom);
      p4 = 16'($urandom) | 16'($urandom);
      for (int j = 0; j < 8; j++) snc8[j] = 8'($urandom);
      for (int j = 1; j < 8; j++) sc8[j]  = 8'($urandom);
      for (int j = 0; j < 16; j++) snc4[j] = 4'($urandom);
      for (int j = 1; j < 16; j++) sc4[j]  = 4'($urandom);
      #1;
      // 8-bit groups
      c = 1'b0;
      for (int j = 0; j < 8; j++) begin
        if (j == 0 || !c) e8[j*8 +: 8] = snc8[j];
        else              e8[j*8 +: 8] = sc8[j];
        if (j > 0) begin
          if (c) sel_c++;
          else   sel_nc++;
        end
        c = g8[j] | (p8[j] & c);
      end
      if (c) couts++;
      checks += 2;
      if (sum8 !== e8) begin
        failures++;
        $display("FAIL 8-bit groups g=%h p=%h sum=%h exp=%h", g8, p8, sum8, e8);
      end
      if (cout8 !== c) begin
        failures++;
        $display("FAIL 8-bit groups g=%h p=%h cout=%b", g8, p8, cout8);
      end
      // 4-bit groups
      c = 1'b0;
      for (int j = 0; j < 16; j++) begin
        if (j == 0 || !c) e4[j*4 +: 4] = snc4[j];
        else              e4[j*4 +: 4] = sc4[j];
        c = g4[j] | (p4[j] & c);
      end
      checks += 2;
      if (sum4 !== e4) begin
        failures++;
        $display("FAIL 4-bit groups g=%h p=%h sum=%h exp=%h", g4, p4, sum4, e4);
      end
      if (cout4 !== c) begin
        failures++;
        $display("FAIL 4-bit groups g=%h p=%h cout=%b", g4, p4, cout4);
      end
    end
    checks += 3;
    if (sel_c == 0)  begin failures++; $display("FAIL carry-in-1 sum never selected"); end
    if (sel_nc == 0) begin failures++; $display("FAIL carry-in-0 sum never selected"); end
    if (couts == 0)  begin failures++; $display("FAIL carry out never set"); end
    $display("selected carry-in-1 sums: %0d, carry-in-0 sums: %0d, carry outs: %0d",
             sel_c, sel_nc, couts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
