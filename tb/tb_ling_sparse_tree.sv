// tb_ling_sparse_tree: self-checking testbench of the sparse Ling carry
// tree. Random and corner-case operands and carry-ins are turned into g and
// t; the expected pseudo-carry into each 4-bit group is worked out by
// running Ling's recurrence H_i = g_i + t_(i-1).H_(i-1) serially from
// H_(-1) = cin, t_(-1) = 1. As a second, independent check, t_(4j-1).hc[j]
// must equal the true carry into bit 4j taken from the integer sum
// a + b + cin.
module tb_ling_sparse_tree;
  localparam int unsigned W  = 16;
  localparam int unsigned NG = W / 4;
  logic [W-1:0]  g, t;
  logic          cin;
  logic [NG-1:0] hc;
  int checks = 0, failures = 0;
  int ones = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ling_sparse_tree u_dut (.g(g), .t(t), .cin(cin), .hc(hc));

  task automatic check_vec(input logic [W-1:0] a, input logic [W-1:0] b, input logic ci);
    logic [W-1:0] hser;
    logic         hprev, tprev;
    logic [W:0]   sum;
    logic [W:0]   carries;
    g = a & b; t = a | b; cin = ci;
    @(posedge clk);
    hprev = ci; tprev = 1'b1;
    for (int i = 0; i < W; i++) begin
      hser[i] = g[i] | (tprev & hprev);
      hprev = hser[i]; tprev = t[i];
    end
    sum = {1'b0, a} + {1'b0, b} + (W+1)'(ci);
    carries = sum ^ {1'b0, a} ^ {1'b0, b};  // carry into each bit
    for (int j = 0; j < NG; j++) begin
      logic eh, tb;
      eh = (j == 0) ? ci : hser[4*j-1];
      tb = (j == 0) ? 1'b1 : t[4*j-1];
      checks++;
      if (hc[j] !== eh || (tb & hc[j]) !== carries[4*j]) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b group %0d hc=%b expected %b", a, b, ci, j, hc[j], eh);
      end
      if (hc[j]) ones++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_vec(16'hFFFF, 16'h0000, 1'b1);
    check_vec(16'hFFFF, 16'h0000, 1'b0);
    check_vec(16'h0FFF, 16'h0001, 1'b0);
    check_vec(16'h00F0, 16'h0010, 1'b0);
    check_vec(16'h0000, 16'h0000, 1'b1);
    check_vec(16'hFFFF, 16'hFFFF, 1'b1);
    for (int n = 0; n < 20000; n++) check_vec(W'($urandom), W'($urandom), 1'($urandom));
    checks++;
    if (ones == 0) begin
      failures++;
      $display("FAIL no group pseudo-carry was ever 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
