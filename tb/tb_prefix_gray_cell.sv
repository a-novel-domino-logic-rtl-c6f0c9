// tb_prefix_gray_cell: exhaustive self-checking testbench of the reduced
// prefix operator (pseudo-carry only). All 8 input combinations are applied
// and compared with a case analysis of the operator.
module tb_prefix_gray_cell;
  import ling_pkg::*;
  prefix_node_t hi;
  logic lo_h, h;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  prefix_gray_cell u_dut (.hi(hi), .lo_h(lo_h), .h(h));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eh;
    for (int v = 0; v < 8; v++) begin
      hi   = '{h: v[2], t: v[1]};
      lo_h = v[0];
      @(posedge clk);
      if (v[2])      eh = 1'b1;
      else if (v[1]) eh = v[0];
      else           eh = 1'b0;
      checks++;
      if (h !== eh) begin
        failures++;
        $display("FAIL v=%b h=%b expected %b", v[2:0], h, eh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
