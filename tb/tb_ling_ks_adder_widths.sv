// tb_ling_ks_adder_widths: checks that the Ling adder's structure holds at
// other widths than the reference 16 bits. Instances of 8, 32 and 64 bits
// (two, eight and sixteen 4-bit groups, so one, three and four Kogge-Stone
// levels over the groups) are driven with random operands and all-propagate
// chains and compared with the integer sum a + b + cin.
module tb_ling_ks_adder_widths;
  logic [7:0]  a8,  b8,  s8;
  logic [31:0] a32, b32, s32;
  logic [63:0] a64, b64, s64;
  logic cin, c8, c32, c64;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ling_ks_adder16 #(.WIDTH(8))  u_w8  (.a(a8),  .b(b8),  .cin(cin), .s(s8),  .cout(c8));
  ling_ks_adder16 #(.WIDTH(32)) u_w32 (.a(a32), .b(b32), .cin(cin), .s(s32), .cout(c32));
  ling_ks_adder16 #(.WIDTH(64)) u_w64 (.a(a64), .b(b64), .cin(cin), .s(s64), .cout(c64));

  task automatic check_vec(input logic [63:0] va, input logic [63:0] vb, input logic ci);
    logic [8:0]  e8;
    logic [32:0] e32;
    logic [64:0] e64;
    a8 = va[7:0]; b8 = vb[7:0];
    a32 = va[31:0]; b32 = vb[31:0];
    a64 = va; b64 = vb; cin = ci;
    @(posedge clk);
    e8  = {1'b0, va[7:0]} + {1'b0, vb[7:0]} + 9'(ci);
    e32 = {1'b0, va[31:0]} + {1'b0, vb[31:0]} + 33'(ci);
    e64 = {1'b0, va} + {1'b0, vb} + 65'(ci);
    checks += 3;
    if ({c8, s8} !== e8)    begin failures++; $display("FAIL 8-bit a=%h b=%h", va[7:0], vb[7:0]); end
    if ({c32, s32} !== e32) begin failures++; $display("FAIL 32-bit a=%h b=%h", va[31:0], vb[31:0]); end
    if ({c64, s64} !== e64) begin failures++; $display("FAIL 64-bit a=%h b=%h", va, vb); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_vec('1, '0, 1'b1);
    check_vec('1, '1, 1'b1);
    check_vec('0, '0, 1'b1);
    for (int n = 0; n < 30000; n++)
      check_vec({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
