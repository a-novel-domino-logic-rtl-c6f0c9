// tb_prefix_black_cell: exhaustive self-checking testbench of the full
// prefix operator. All 16 input combinations are applied; the expected group
// pseudo-carry and transmit come from a case analysis of the operator
// (the upper span decides unless it only transmits, in which case the lower
// span decides; a span transmits only if both halves do).
module tb_prefix_black_cell;
  import ling_pkg::*;
  prefix_node_t hi, lo, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  prefix_black_cell u_dut (.hi(hi), .lo(lo), .y(y));

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
      hi = '{h: v[3], t: v[2]};
      lo = '{h: v[1], t: v[0]};
      @(posedge clk);
      if (hi.h)      eh = 1'b1;
      else if (hi.t) eh = lo.h;
      else           eh = 1'b0;
      et = (hi.t == 1'b1 && lo.t == 1'b1);
      checks++;
      if (y.h !== eh || y.t !== et) begin
        failures++;
        $display("FAIL v=%b y=%b%b expected %b%b", v[3:0], y.h, y.t, eh, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
