// tb_bit_ops: self-checking testbench of bit_ops.
// Drives random and corner-case 16-bit operands and checks every bit of g, t
// and p against a bit-by-bit truth table written with if statements. A
// watchdog ends the run with a failure if it does not finish in time.
module tb_bit_ops;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, g, t, p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  bit_ops u_dut (.a(a), .b(b), .g(g), .t(t), .p(p));

  task automatic check_vec(input logic [W-1:0] va, input logic [W-1:0] vb);
    logic eg, et, ep;
    a = va; b = vb;
    @(posedge clk);
    for (int i = 0; i < W; i++) begin
      if (va[i] && vb[i])       begin eg = 1; et = 1; ep = 0; end
      else if (va[i] || vb[i])  begin eg = 0; et = 1; ep = 1; end
      else                      begin eg = 0; et = 0; ep = 0; end
      checks++;
      if (g[i] !== eg || t[i] !== et || p[i] !== ep) begin
        failures++;
        $display("FAIL bit %0d a=%h b=%h g=%b t=%b p=%b", i, va, vb, g[i], t[i], p[i]);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_vec('0, '0);
    check_vec('1, '1);
    check_vec('1, '0);
    check_vec(16'hAAAA, 16'h5555);
    check_vec(16'hF0F0, 16'hFF00);
    for (int n = 0; n < 500; n++) check_vec(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
