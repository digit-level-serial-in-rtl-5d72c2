// Self-checking testbench for the symmetric redundant-basis SIPO multiplier at its
// default size (n = 19, so m = 9 independent coordinates, 4-bit digits: the last
// digit holds one coordinate and three padding positions driven with random values).
// Operands are random m-bit vectors expanded to symmetric n-coordinate form
// (x_0 = 0, x_i = x_(n-i)). The expected product is the full cyclic convolution
// c_k = XOR_i a_i b_((k-i) mod n), worked out bit by bit; the multiplier must return
// c_1 .. c_m. Half of the operations insert random stall cycles. Without stalls the
// load-to-done time must be ceil(m/W) cycles; done must hold the product.
module tb_rb_sipo_multiplier;
  localparam int N = 19;
  localparam int M = (N - 1) / 2;
  localparam int W = 4;
  localparam int NDIG = (M + W - 1) / W;

  logic clk = 1'b0;
  logic rst_n;
  logic load;
  logic [N-1:0] b_in;
  logic digit_valid;
  logic [W-1:0] a_digit;
  logic ready, done;
  logic [M-1:0] product;
  int checks = 0;
  int failures = 0;
  int stalls = 0;

  rb_sipo_multiplier dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N-1:0] expand(input logic [M-1:0] h);
    logic [N-1:0] x = '0;
    for (int i = 1; i <= M; i++) begin
      x[i] = h[i-1];
      x[N-i] = h[i-1];
    end
    return x;
  endfunction

  task automatic multiply(input logic [M-1:0] a, input logic [M-1:0] b, input bit with_stalls);
    logic [M-1:0] expected;
    logic [N-1:0] af, bf, cf;
    logic [NDIG*W-1:0] a_pad;
    int cycles;
    af = expand(a);
    bf = expand(b);
    cf = '0;
    for (int k = 0; k < N; k++)
      for (int i = 0; i < N; i++)
        cf[k] = cf[k] ^ (af[i] & bf[(k - i + N) % N]);
    check(cf == expand(cf[M:1]), "reference product is symmetric");
    expected = cf[M:1];
    a_pad = (NDIG*W)'({W'($urandom), a});
    @(negedge clk);
    load = 1'b1; b_in = bf; digit_valid = 1'b0;
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
    check(product == expected, $sformatf("%h * %h = %h, expected %h", a, b, product, expected));
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
    multiply('1, 9'd1, 1'b0);
    multiply(9'd1, '1, 1'b1);
    multiply(9'h100, 9'h100, 1'b0);
    multiply(9'h001, 9'h0A5, 1'b0);
    for (int n = 0; n < 2000; n++) multiply(M'($urandom), M'($urandom), n[0]);
    check(stalls > 0, "stalls exercised");
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
