// Self-checking testbench for the digit-serial integer multiplier with Brent-Kung
// accumulation, at its default size (16 x 16 bits, 4-bit digits).
// Each operation loads B, then feeds A least significant digit first. Half of the
// operations insert random stall cycles (digit_valid low). The product is compared
// with a * b computed in the testbench; for operations without stalls the number of
// cycles from load to done must be ceil(N/W). Corner operands (0, 1, all ones) are
// included, and done must hold the product until the next load.
module tb_sipo_bk_multiplier;
  localparam int N = 16;
  localparam int W = 4;
  localparam int NDIG = (N + W - 1) / W;

  logic clk = 1'b0;
  logic rst_n;
  logic load;
  logic [N-1:0] b_in;
  logic digit_valid;
  logic [W-1:0] a_digit;
  logic ready, done;
  logic [2*N-1:0] product;
  int checks = 0;
  int failures = 0;
  int stalls = 0;

  sipo_bk_multiplier dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic multiply(input logic [N-1:0] a, input logic [N-1:0] b, input bit with_stalls);
    logic [2*N-1:0] expected;
    logic [NDIG*W-1:0] a_pad;
    int cycles;
    expected = (2*N)'(a) * (2*N)'(b);
    a_pad = (NDIG*W)'(a);
    @(negedge clk);
    load = 1'b1; b_in = b; digit_valid = 1'b0;
    @(negedge clk);
    load = 1'b0;
    cycles = 0;
    for (int j = 0; j < NDIG; j++) begin
      while (with_stalls && ($urandom_range(0, 2) == 0)) begin
        digit_valid = 1'b0;
        a_digit = W'($urandom);
        stalls++;
        @(negedge clk);
        cycles++;
      end
      check(ready && !done, "ready must be high while digits are outstanding");
      digit_valid = 1'b1;
      a_digit = a_pad[j*W +: W];
      @(negedge clk);
      cycles++;
    end
    digit_valid = 1'b0;
    check(done, "done after the last digit");
    check(!ready, "ready low once done");
    check(product == expected, $sformatf("%0d * %0d = %0d, expected %0d", a, b, product, expected));
    if (!with_stalls) check(cycles == NDIG, $sformatf("latency %0d cycles, expected %0d", cycles, NDIG));
    // the result must be held while more (ignored) digits arrive
    digit_valid = 1'b1; a_digit = '1;
    @(negedge clk);
    digit_valid = 1'b0;
    check(done && product == expected, "product held after done");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; b_in = '0; digit_valid = 1'b0; a_digit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!ready && !done, "idle after reset");
    multiply('0, '0, 1'b0);
    multiply('1, '1, 1'b0);
    multiply('1, 16'd1, 1'b0);
    multiply(16'd1, '1, 1'b1);
    multiply(16'h8000, 16'h8000, 1'b0);
    for (int n = 0; n < 2000; n++) multiply(N'($urandom), N'($urandom), n[0]);
    check(stalls > 0, "stalls exercised");
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
