// tb_gks_tree: checks the Grouped-Kogge-Stone carry tree in four shapes:
//   u4c : 4 columns, first level CM1, with carry-in tree (group adder shape)
//   u4n : 4 columns, first level CM1, no carry-in tree (lowest group)
//   u8n : 8 columns, first level CM3 (top level of the 64-bit adder)
//   u16c: 16 columns, first level CM2, with carry-in tree
// Column G/P are drawn at random (exhaustively for 4 columns) and the
// expected carries are found by rippling c = g | p & c column by column.
// Inputs and outputs are converted to and from the polarity each level
// uses (odd levels deliver inverted signals). Without the carry-in tree the
// group propagate is not formed and must read 0.
module tb_gks_tree;
  import hppa_pkg::*;

  int checks = 0, failures = 0;
  logic cin;

  // ---- reference ----
  function automatic logic [15:0] ripple(input logic [15:0] g, input logic [15:0] p,
                                         input int n, input logic c_in);
    logic [15:0] c;
    logic        cc;
    c  = '0;
    cc = c_in;
    for (int k = 0; k < n; k++) begin
      cc   = g[k] | (p[k] & cc);
      c[k] = cc;
    end
    return c;
  endfunction

  // ---- four instances ----
  logic [3:0]  g4, p4;
  logic [7:0]  g8, p8;
  logic [15:0] g16, p16;

  logic        ga4c, pa4c, ga4n, pa4n, ga8, pa8, ga16, pa16;
  logic [2:0]  c0_4c, c1_4c, c0_4n, c1_4n;
  logic [6:0]  c0_8, c1_8;
  logic [14:0] c0_16, c1_16;

  // input polarity: outputs of CM(FIRST_LEVEL-1); output polarity: CM(last)
  localparam bit IN1 = level_inverted(0), OUT1 = level_inverted(2);   // FIRST=1, N=4
  localparam bit IN3 = level_inverted(2), OUT3 = level_inverted(5);   // FIRST=3, N=8
  localparam bit IN2 = level_inverted(1), OUT2 = level_inverted(5);   // FIRST=2, N=16

  gks_tree #(.N(4), .FIRST_LEVEL(1), .CIN_TREE(1'b1)) u4c (
    .g_i(g4 ^ {4{IN1}}), .p_i(p4 ^ {4{IN1}}), .cin(cin),
    .g_all(ga4c), .p_all(pa4c), .c0(c0_4c), .c1(c1_4c));
  gks_tree #(.N(4), .FIRST_LEVEL(1), .CIN_TREE(1'b0)) u4n (
    .g_i(g4 ^ {4{IN1}}), .p_i(p4 ^ {4{IN1}}), .cin(cin),
    .g_all(ga4n), .p_all(pa4n), .c0(c0_4n), .c1(c1_4n));
  gks_tree #(.N(8), .FIRST_LEVEL(3), .CIN_TREE(1'b0)) u8n (
    .g_i(g8 ^ {8{IN3}}), .p_i(p8 ^ {8{IN3}}), .cin(cin),
    .g_all(ga8), .p_all(pa8), .c0(c0_8), .c1(c1_8));
  gks_tree #(.N(16), .FIRST_LEVEL(2), .CIN_TREE(1'b1)) u16c (
    .g_i(g16 ^ {16{IN2}}), .p_i(p16 ^ {16{IN2}}), .cin(cin),
    .g_all(ga16), .p_all(pa16), .c0(c0_16), .c1(c1_16));

  task automatic check(input string name, input int n, input bit has_cin,
                       input logic [15:0] g, input logic [15:0] p, input bit out_inv,
                       input logic ga, input logic pa,
                       input logic [14:0] c0, input logic [14:0] c1);
    logic [15:0] e0, e1;
    logic        ea, ep;
    e0 = ripple(g, p, n, 1'b0);
    e1 = ripple(g, p, n, cin);
    ea = e0[n-1];
    ep = &(p | ~((16'h1 << n) - 16'h1));
    for (int k = 0; k < n - 1; k++) begin
      checks++;
      if ((c0[k] ^ out_inv) !== e0[k]) begin
        failures++;
        $display("FAIL %s c0[%0d] g=%h p=%h", name, k, g, p);
      end
      if (has_cin) begin
        checks++;
        if ((c1[k] ^ out_inv) !== e1[k]) begin
          failures++;
          $display("FAIL %s c1[%0d] g=%h p=%h cin=%b", name, k, g, p, cin);
        end
      end
    end
    checks++;
    if ((ga ^ out_inv) !== ea) begin
      failures++;
      $display("FAIL %s g_all g=%h p=%h", name, g, p);
    end
    // the group propagate is formed only alongside the carry-in tree
    checks++;
    if (has_cin ? ((pa ^ out_inv) !== ep) : (pa !== 1'b0)) begin
      failures++;
      $display("FAIL %s p_all g=%h p=%h", name, g, p);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 4 columns: every g/p pattern and both carry-ins
    for (int i = 0; i < 512; i++) begin
      {cin, g4, p4} = i[8:0];
      g8 = '0; p8 = '0; g16 = '0; p16 = '0;
      #1;
      check("u4c", 4, 1'b1, {12'b0, g4}, {12'b0, p4}, OUT1, ga4c, pa4c, {12'b0, c0_4c}, {12'b0, c1_4c});
      check("u4n", 4, 1'b0, {12'b0, g4}, {12'b0, p4}, OUT1, ga4n, pa4n, {12'b0, c0_4n}, {12'b0, c1_4n});
    end
    // 8 and 16 columns: random, with few generates so long propagations occur
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] rg, rp;
      rg  = 16'($urandom) & 16'($urandom) & 16'($urandom);
      rp  = 16'($urandom) | 16'($urandom);
      cin = 1'($urandom);
      g8 = rg[7:0]; p8 = rp[7:0]; g16 = rg; p16 = rp;
      #1;
      check("u8n", 8, 1'b0, {8'b0, g8}, {8'b0, p8}, OUT3, ga8, pa8, {8'b0, c0_8}, {8'b0, c1_8});
      check("u16c", 16, 1'b1, g16, p16, OUT2, ga16, pa16, c0_16, c1_16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
