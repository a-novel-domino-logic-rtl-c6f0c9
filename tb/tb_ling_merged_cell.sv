// tb_ling_merged_cell: self-checking testbench of the merged first Ling
// stage. Part 1 applies all 16 combinations of the four inputs and checks
// the OR of the generates and the AND of the transmits. Part 2 drives the
// cell from real bit pairs (all 2-bit operands a, b, with the transmit below
// the pair set to 1) and checks Ling's defining property: the carry out of
// the pair, taken from the integer sum a + b, equals t_(i) . H.
module tb_ling_merged_cell;
  import ling_pkg::*;
  logic g_hi, g_lo, t_lo, t_lo2;
  prefix_node_t y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ling_merged_cell u_dut (.g_hi(g_hi), .g_lo(g_lo), .t_lo(t_lo), .t_lo2(t_lo2), .y(y));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eh, et;
    for (int v = 0; v < 16; v++) begin
      {g_hi, g_lo, t_lo, t_lo2} = v[3:0];
      @(posedge clk);
      eh = (v[3:2] != 2'b00);
      et = (v[1:0] == 2'b11);
      checks++;
      if (y.h !== eh || y.t !== et) begin
        failures++;
        $display("FAIL inputs=%b y=%b%b", v[3:0], y.h, y.t);
      end
    end
    for (int va = 0; va < 4; va++) begin
      for (int vb = 0; vb < 4; vb++) begin
        logic [2:0] sum;
        logic t1;
        sum   = 3'(va) + 3'(vb);
        t1    = (va >= 2) || (vb >= 2);
        g_hi  = (va >= 2) && (vb >= 2);
        g_lo  = (va % 2 == 1) && (vb % 2 == 1);
        t_lo  = (va % 2 == 1) || (vb % 2 == 1);
        t_lo2 = 1'b1;
        @(posedge clk);
        checks++;
        if ((t1 & y.h) !== sum[2]) begin
          failures++;
          $display("FAIL pair a=%0d b=%0d H=%b carry=%b", va, vb, y.h, sum[2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
