// tb_hppa64: end-to-end test of the 64-bit adder at its default sizes.
// Directed corner cases (carry through the whole word, carry into every
// group boundary, all-ones, zeros) and random operands are added and
// compared with a 65-bit integer sum (sum and carry out). The adder is
// combinational: the result is checked in the same clock cycle the
// operands are applied (zero cycles of latency).
// The mechanisms of the design are counted and each must occur:
//   - a group taking its carry-in-1 sum and a group taking its carry-in-0
//     sum (the top-level sum selection), in every group above the lowest;
//   - a carry passing through a group whose bits all propagate;
//   - a sub-group taking the carry-in-1 ripple sum inside a group;
//   - a carry out of the word.
module tb_hppa64;
  localparam int W  = 64;
  localparam int G  = 8;
  localparam int NG = W / G;

  logic [W-1:0] a, b, sum;
  logic         cout;
  logic         clk = 1'b0;
  int checks = 0, failures = 0, cycles = 0;
  int sel_c [NG];
  int sel_nc[NG];
  int grp_through = 0, sub_carry = 0, couts = 0;

  hppa64 dut (.a(a), .b(b), .sum(sum), .cout(cout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] e;
    logic [W:0] carries;   // carries[i] = carry into bit i
    int         c0;
    @(negedge clk);
    a  = x;
    b  = y;
    c0 = cycles;
    #1;
    e = {1'b0, x} + {1'b0, y};
    carries = e ^ {1'b0, x} ^ {1'b0, y};
    checks += 3;
    if (sum !== e[W-1:0] || cout !== e[W]) begin
      failures++;
      $display("FAIL %h + %h = %b_%h, expected %b_%h", x, y, cout, sum, e[W], e[W-1:0]);
    end
    // zero latency: the sum is there before the next clock edge
    if (cycles != c0) begin
      failures++;
      $display("FAIL result not checked in the cycle the operands were applied");
    end
    // independent cross-check with an explicit bit-level ripple
    begin
      logic c;
      logic [W-1:0] r;
      c = 1'b0;
      for (int i = 0; i < W; i++) begin
        r[i] = x[i] ^ y[i] ^ c;
        c    = (x[i] & y[i]) | ((x[i] ^ y[i]) & c);
      end
      if (r !== e[W-1:0] || c !== e[W]) begin
        failures++;
        $display("FAIL reference disagreement for %h + %h", x, y);
      end
    end
    // mechanism counters
    for (int j = 1; j < NG; j++) begin
      if (carries[j*G]) sel_c[j]++;
      else              sel_nc[j]++;
      if (carries[j*G] && ((x[j*G +: G] ^ y[j*G +: G]) == '1)) grp_through++;
    end
    for (int i = 2; i < W; i += 2)
      if ((i % G) != 0 && carries[i]) sub_carry++;
    if (e[W]) couts++;
  endtask

  initial begin
    a = '0;
    b = '0;
    foreach (sel_c[j]) begin
      sel_c[j]  = 0;
      sel_nc[j] = 0;
    end
    // directed cases
    apply('0, '0);
    apply('1, '0);
    apply('1, 64'd1);                       // carry through all 64 bits
    apply('1, '1);
    apply(64'h7fff_ffff_ffff_ffff, 64'd1);
    apply(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    for (int j = 0; j < NG; j++) begin
      // carry generated in group j, propagated through all groups above
      apply({W{1'b1}} << (j * G), 64'd1 << (j * G));
      apply(({W{1'b1}} >> ((NG - 1 - j) * G)), 64'd1);
    end
    for (int i = 0; i < W; i++) begin
      apply(64'd1 << i, 64'd1 << i);          // carry out of every single bit
      apply(~(64'd1 << i), 64'd1);            // long propagate stopped at bit i
    end
    // random operands, some with long propagate runs
    for (int n = 0; n < 20000; n++) begin
      logic [W-1:0] x, y;
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      if (n % 4 == 1) y = ~x ^ ({$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom});
      apply(x, y);
    end
    // every mechanism must have happened
    for (int j = 1; j < NG; j++) begin
      checks += 2;
      if (sel_c[j] == 0)  begin failures++; $display("FAIL group %0d never took its carry-in-1 sum", j); end
      if (sel_nc[j] == 0) begin failures++; $display("FAIL group %0d never took its carry-in-0 sum", j); end
    end
    checks += 3;
    if (grp_through == 0) begin failures++; $display("FAIL no carry passed through a whole group"); end
    if (sub_carry == 0)   begin failures++; $display("FAIL no sub-group carry inside a group"); end
    if (couts == 0)       begin failures++; $display("FAIL no carry out of the word"); end
    $display("group sum selections (carry-in-1 / carry-in-0) per group:");
    for (int j = 1; j < NG; j++) $display("  group %0d: %0d / %0d", j, sel_c[j], sel_nc[j]);
    $display("carries through a whole group: %0d, sub-group carries: %0d, carry outs: %0d",
             grp_through, sub_carry, couts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
