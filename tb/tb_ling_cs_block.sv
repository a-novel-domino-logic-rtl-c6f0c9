// tb_ling_cs_block: exhaustive self-checking testbench of the 4-bit
// carry-select sum block. For every pair of 4-bit operands and every value
// of the transmit below the block and of the incoming pseudo-carry, the
// block's sum and carry out are compared with the integer sum
// a + b + (t_below & h_in): the carry into the block is the transmit below
// it times the pseudo-carry. Both selections of the multiplexer are counted.
module tb_ling_cs_block;
  localparam int unsigned B = 4;
  logic [B-1:0] g, t, p, s;
  logic t_below, h_in, cout;
  int checks = 0, failures = 0;
  int sel0 = 0, sel1 = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ling_cs_block u_dut (.g(g), .t(t), .p(p), .t_below(t_below), .h_in(h_in), .s(s), .cout(cout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [B:0] sum;
    for (int va = 0; va < 16; va++) begin
      for (int vb = 0; vb < 16; vb++) begin
        for (int c = 0; c < 4; c++) begin
          logic [B-1:0] xa, xb;
          xa = B'(va); xb = B'(vb);
          g = xa & xb; t = xa | xb; p = xa ^ xb;
          t_below = c[1]; h_in = c[0];
          @(posedge clk);
          sum = (B+1)'(va) + (B+1)'(vb) + (B+1)'(c[1] & c[0]);
          checks++;
          if ({cout, s} !== sum) begin
            failures++;
            $display("FAIL a=%h b=%h t_below=%b h=%b got %h expected %h", xa, xb, c[1], c[0], {cout, s}, sum);
          end
          if (h_in) sel1++; else sel0++;
        end
      end
    end
    checks++;
    if (sel0 == 0 || sel1 == 0) begin
      failures++;
      $display("FAIL a multiplexer selection was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
