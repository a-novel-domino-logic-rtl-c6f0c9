// tb_ling_ks_adder16: end-to-end self-checking testbench of the 16-bit
// Kogge-Stone Ling adder at its default parameters.
// Stimulus: corner cases (all-propagate chains with and without carry-in,
// overflow, zero), walking ones, and random operands with random carry-in.
// Every result {cout, s} is compared with the integer sum a + b + cin.
// Besides the arithmetic, the run counts how often each mechanism of the
// design was exercised and fails if one never was:
//   - each 4-bit carry-select block selecting its pseudo-carry = 1 sum and
//     its pseudo-carry = 0 sum;
//   - a block whose pseudo-carry is 1 while its true carry-in is 0 (the
//     transmit below it is 0), the case that separates Ling's pseudo-carry
//     from a real carry;
//   - the carry-in reaching the top group through the tree;
//   - a carry-out.
// The adder is combinational: each result is checked one clock period after
// its operands are applied, i.e. with no pipeline latency.
module tb_ling_ks_adder16;
  localparam int unsigned W  = 16;
  localparam int unsigned NG = W / 4;
  logic [W-1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;
  int sel1 [NG];
  int sel0 [NG];
  int pseudo_only = 0, cin_to_top = 0, carry_out = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ling_ks_adder16 u_dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check_vec(input logic [W-1:0] va, input logic [W-1:0] vb, input logic ci);
    logic [W:0] expected;
    a = va; b = vb; cin = ci;
    @(posedge clk);
    expected = {1'b0, va} + {1'b0, vb} + (W+1)'(ci);
    checks++;
    if ({cout, s} !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %h expected %h", va, vb, ci, {cout, s}, expected);
    end
    for (int j = 0; j < NG; j++) begin
      if (u_dut.hc[j]) sel1[j]++; else sel0[j]++;
      if (j > 0 && u_dut.hc[j] && !u_dut.t[4*j-1]) pseudo_only++;
    end
    // The carry-in decides the top group's carry: flipping it changes the
    // carry into bit W-4.
    if (ci && (({1'b0, va} + {1'b0, vb}) ^ expected) >> (W-4) != 0) cin_to_top++;
    if (expected[W]) carry_out++;
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sel1[j]) begin sel1[j] = 0; sel0[j] = 0; end
    check_vec(16'h0000, 16'h0000, 1'b0);
    check_vec(16'hFFFF, 16'h0000, 1'b1);
    check_vec(16'h0000, 16'hFFFF, 1'b1);
    check_vec(16'hFFFF, 16'hFFFF, 1'b1);
    check_vec(16'hFFFF, 16'h0001, 1'b0);
    check_vec(16'h5555, 16'hAAAA, 1'b1);
    check_vec(16'h8000, 16'h8000, 1'b0);
    check_vec(16'h0888, 16'h0888, 1'b0);
    for (int i = 0; i < W; i++) begin
      check_vec(W'(1) << i, W'(1) << i, 1'b0);
      check_vec((W'(1) << i) - 1, W'(1), 1'b0);
      check_vec(~(W'(1) << i), W'(0), 1'b1);
    end
    for (int n = 0; n < 100000; n++) check_vec(W'($urandom), W'($urandom), 1'($urandom));

    for (int j = 0; j < NG; j++) begin
      checks++;
      if (sel1[j] == 0 || sel0[j] == 0) begin
        failures++;
        $display("FAIL block %0d never selected both sums", j);
      end
      $display("block %0d: pseudo-carry 1 selected %0d times, 0 selected %0d times", j, sel1[j], sel0[j]);
    end
    $display("pseudo-carry 1 with true carry 0: %0d, carry-in to top group: %0d, carry-out: %0d",
             pseudo_only, cin_to_top, carry_out);
    checks++;
    if (pseudo_only == 0) begin failures++; $display("FAIL pseudo-carry without carry never seen"); end
    checks++;
    if (cin_to_top == 0) begin failures++; $display("FAIL carry-in never reached the top group"); end
    checks++;
    if (carry_out == 0) begin failures++; $display("FAIL no carry-out produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
