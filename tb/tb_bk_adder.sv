// Self-checking testbench for the Brent-Kung adder.
// Instantiates the adder at 8, 16 and 32 bits (32 is the default) plus an odd width
// (13, which exercises the padded tree), drives corner cases (all ones plus carry in,
// alternating patterns, single carry chains) and random operands, and compares
// {cout, sum} with the integer sum a + b + cin worked out in the testbench.
module tb_bk_adder;
  logic [31:0] a32, b32, s32;  logic c32i, c32o;
  logic [15:0] a16, b16, s16;  logic c16i, c16o;
  logic [7:0]  a8,  b8,  s8;   logic c8i,  c8o;
  logic [12:0] a13, b13, s13;  logic c13i, c13o;
  int checks = 0;
  int failures = 0;

  bk_adder dut32 (.a(a32), .b(b32), .cin(c32i), .sum(s32), .cout(c32o));
  bk_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(c16i), .sum(s16), .cout(c16o));
  bk_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(c8i),  .sum(s8),  .cout(c8o));
  bk_adder #(.WIDTH(13)) dut13 (.a(a13), .b(b13), .cin(c13i), .sum(s13), .cout(c13o));

  task automatic apply(input logic [31:0] a, input logic [31:0] b, input logic ci);
    logic [32:0] e32;
    logic [16:0] e16;
    logic [8:0]  e8;
    logic [13:0] e13;
    a32 = a;        b32 = b;        c32i = ci;
    a16 = a[15:0];  b16 = b[15:0];  c16i = ci;
    a8  = a[7:0];   b8  = b[7:0];   c8i  = ci;
    a13 = a[12:0];  b13 = b[12:0];  c13i = ci;
    #1;
    e32 = {1'b0, a} + {1'b0, b} + 33'(ci);
    e16 = {1'b0, a[15:0]} + {1'b0, b[15:0]} + 17'(ci);
    e8  = {1'b0, a[7:0]} + {1'b0, b[7:0]} + 9'(ci);
    e13 = {1'b0, a[12:0]} + {1'b0, b[12:0]} + 14'(ci);
    checks += 4;
    if ({c32o, s32} !== e32) begin
      failures++;
      if (failures < 10) $display("FAIL 32: %h + %h + %b = %h, expected %h", a, b, ci, {c32o, s32}, e32);
    end
    if ({c16o, s16} !== e16) begin
      failures++;
      if (failures < 10) $display("FAIL 16: %h + %h + %b = %h, expected %h", a[15:0], b[15:0], ci, {c16o, s16}, e16);
    end
    if ({c8o, s8} !== e8) begin
      failures++;
      if (failures < 10) $display("FAIL 8: %h + %h + %b = %h, expected %h", a[7:0], b[7:0], ci, {c8o, s8}, e8);
    end
    if ({c13o, s13} !== e13) begin
      failures++;
      if (failures < 10) $display("FAIL 13: %h + %h + %b = %h, expected %h", a[12:0], b[12:0], ci, {c13o, s13}, e13);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, 32'd1, 1'b0);
    apply('1, '1, 1'b1);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    // a single carry travelling from bit k all the way to the top
    for (int k = 0; k < 32; k++) begin
      apply(32'hFFFF_FFFF << k, 32'd1 << k, 1'b0);
      apply(~(32'd1 << k), 32'd0, 1'b1);
    end
    for (int n = 0; n < 5000; n++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
