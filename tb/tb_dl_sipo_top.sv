// End-to-end testbench of the top level at its default parameters.
// Both multipliers run at the same time from two independent driver processes.
// Each process performs a series of multiplications with random operands and checks
// every product against a value worked out in the testbench (a * b for the integer
// multiplier; for the redundant-basis one, the cyclic convolution over GF(2) of the
// operands in symmetric form).
// The mechanisms of the design are each forced to happen and counted:
//   stall        a cycle with ready high and digit_valid low;
//   restart      a load while a multiplication is still in progress;
//   back-to-back a load in the first cycle after done;
//   hold         digits offered after done, which must be ignored;
//   padding      random values on the unused coordinates of the last RB digit;
//   no-stall     operations timed from load to done (must be ceil(N/W) cycles).
// A mechanism that never happened counts as a failure.
module tb_dl_sipo_top;
  localparam int IN = 16, IW = 4, IDIG = (IN + IW - 1) / IW;
  localparam int RN = 19, RM = (RN - 1) / 2, RW = 4, RDIG = (RM + RW - 1) / RW;
  localparam int OPS = 1500;

  logic clk = 1'b0;
  logic rst_n;
  logic int_load, int_digit_valid, int_ready, int_done;
  logic [IN-1:0] int_b;
  logic [IW-1:0] int_a_digit;
  logic [2*IN-1:0] int_product;
  logic rb_load, rb_digit_valid, rb_ready, rb_done;
  logic [RN-1:0] rb_b;
  logic [RW-1:0] rb_a_digit;
  logic [RM-1:0] rb_product;

  int checks = 0;
  int failures = 0;
  int n_stall_int = 0, n_stall_rb = 0;
  int n_restart_int = 0, n_restart_rb = 0;
  int n_b2b_int = 0, n_b2b_rb = 0;
  int n_hold_int = 0, n_hold_rb = 0;
  int n_pad_rb = 0;
  int n_timed_int = 0, n_timed_rb = 0;

  dl_sipo_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // symmetric redundant form of m independent coordinates: x_0 = 0, x_i = x_(n-i)
  function automatic logic [RN-1:0] rb_expand(input logic [RM-1:0] h);
    logic [RN-1:0] x = '0;
    for (int i = 1; i <= RM; i++) begin
      x[i] = h[i-1];
      x[RN-i] = h[i-1];
    end
    return x;
  endfunction

  // cyclic convolution of the expanded operands; c_1 .. c_m
  function automatic logic [RM-1:0] rb_ref(input logic [RM-1:0] a, input logic [RM-1:0] b);
    logic [RN-1:0] af = rb_expand(a);
    logic [RN-1:0] bf = rb_expand(b);
    logic [RN-1:0] c = '0;
    for (int k = 0; k < RN; k++)
      for (int i = 0; i < RN; i++)
        c[k] ^= af[i] & bf[(k - i + RN) % RN];
    return c[RM:1];
  endfunction

  // ---------------- integer multiplier driver ----------------
  task automatic int_op(input bit stalls, input bit restart, input bit b2b);
    logic [IN-1:0] a, b;
    logic [2*IN-1:0] expected;
    int cycles;
    a = IN'($urandom); b = IN'($urandom);
    if ($urandom_range(0, 9) == 0) a = '1;
    if ($urandom_range(0, 9) == 0) b = '1;
    expected = (2*IN)'(a) * (2*IN)'(b);
    if (!b2b) @(negedge clk);
    if (restart) begin
      // start a different multiplication, feed part of it, then load again
      int_load = 1'b1; int_b = IN'($urandom); int_digit_valid = 1'b0;
      @(negedge clk);
      int_load = 1'b0;
      int_digit_valid = 1'b1; int_a_digit = IW'($urandom);
      @(negedge clk);
      int_digit_valid = 1'b0;
      if (int_ready) n_restart_int++;
    end
    int_load = 1'b1; int_b = b;
    @(negedge clk);
    int_load = 1'b0;
    cycles = 0;
    for (int j = 0; j < IDIG; j++) begin
      while (stalls && $urandom_range(0, 2) == 0) begin
        int_digit_valid = 1'b0;
        int_a_digit = IW'($urandom);
        if (int_ready) n_stall_int++;
        @(negedge clk);
        cycles++;
      end
      int_digit_valid = 1'b1;
      int_a_digit = a[j*IW +: IW];
      @(negedge clk);
      cycles++;
    end
    int_digit_valid = 1'b0;
    check(int_done && int_product == expected,
          $sformatf("int %0d * %0d = %0d, expected %0d", a, b, int_product, expected));
    if (!stalls) begin
      check(cycles == IDIG, $sformatf("int latency %0d, expected %0d", cycles, IDIG));
      n_timed_int++;
    end
    if ($urandom_range(0, 3) == 0) begin
      int_digit_valid = 1'b1; int_a_digit = IW'($urandom);
      @(negedge clk);
      int_digit_valid = 1'b0;
      check(int_done && int_product == expected, "int product held after done");
      n_hold_int++;
    end
  endtask

  // ---------------- redundant-basis multiplier driver ----------------
  task automatic rb_op(input bit stalls, input bit restart, input bit b2b);
    logic [RM-1:0] a, b, expected;
    logic [RDIG*RW-1:0] a_pad;
    int cycles;
    a = RM'($urandom); b = RM'($urandom);
    expected = rb_ref(a, b);
    a_pad = (RDIG*RW)'({RW'($urandom), a});
    if (a_pad[RDIG*RW-1:RM] != '0) n_pad_rb++;
    if (!b2b) @(negedge clk);
    if (restart) begin
      rb_load = 1'b1; rb_b = rb_expand(RM'($urandom)); rb_digit_valid = 1'b0;
      @(negedge clk);
      rb_load = 1'b0;
      rb_digit_valid = 1'b1; rb_a_digit = RW'($urandom);
      @(negedge clk);
      rb_digit_valid = 1'b0;
      if (rb_ready) n_restart_rb++;
    end
    rb_load = 1'b1; rb_b = rb_expand(b);
    @(negedge clk);
    rb_load = 1'b0;
    cycles = 0;
    for (int j = 0; j < RDIG; j++) begin
      while (stalls && $urandom_range(0, 2) == 0) begin
        rb_digit_valid = 1'b0;
        rb_a_digit = RW'($urandom);
        if (rb_ready) n_stall_rb++;
        @(negedge clk);
        cycles++;
      end
      rb_digit_valid = 1'b1;
      rb_a_digit = a_pad[j*RW +: RW];
      @(negedge clk);
      cycles++;
    end
    rb_digit_valid = 1'b0;
    check(rb_done && rb_product == expected,
          $sformatf("rb %h * %h = %h, expected %h", a, b, rb_product, expected));
    if (!stalls) begin
      check(cycles == RDIG, $sformatf("rb latency %0d, expected %0d", cycles, RDIG));
      n_timed_rb++;
    end
    if ($urandom_range(0, 3) == 0) begin
      rb_digit_valid = 1'b1; rb_a_digit = RW'($urandom);
      @(negedge clk);
      rb_digit_valid = 1'b0;
      check(rb_done && rb_product == expected, "rb product held after done");
      n_hold_rb++;
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
    rst_n = 1'b0;
    int_load = 1'b0; int_b = '0; int_digit_valid = 1'b0; int_a_digit = '0;
    rb_load = 1'b0;  rb_b = '0;  rb_digit_valid = 1'b0;  rb_a_digit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!int_ready && !int_done && !rb_ready && !rb_done, "idle after reset");
    fork
      for (int n = 0; n < OPS; n++) begin
        automatic bit b2b = ($urandom_range(0, 3) == 0);
        if (b2b && int_done) n_b2b_int++;
        int_op($urandom_range(0, 1) == 1, $urandom_range(0, 7) == 0, b2b);
      end
      for (int n = 0; n < OPS; n++) begin
        automatic bit b2b = ($urandom_range(0, 3) == 0);
        if (b2b && rb_done) n_b2b_rb++;
        rb_op($urandom_range(0, 1) == 1, $urandom_range(0, 7) == 0, b2b);
      end
    join
    $display("int: stalls=%0d restarts=%0d back_to_back=%0d holds=%0d timed=%0d",
             n_stall_int, n_restart_int, n_b2b_int, n_hold_int, n_timed_int);
    $display("rb:  stalls=%0d restarts=%0d back_to_back=%0d holds=%0d timed=%0d padded=%0d",
             n_stall_rb, n_restart_rb, n_b2b_rb, n_hold_rb, n_timed_rb, n_pad_rb);
    check(n_stall_int > 0, "int stall never happened");
    check(n_stall_rb > 0, "rb stall never happened");
    check(n_restart_int > 0, "int restart never happened");
    check(n_restart_rb > 0, "rb restart never happened");
    check(n_b2b_int > 0, "int back-to-back never happened");
    check(n_b2b_rb > 0, "rb back-to-back never happened");
    check(n_hold_int > 0, "int hold never happened");
    check(n_hold_rb > 0, "rb hold never happened");
    check(n_pad_rb > 0, "rb padding never happened");
    check(n_timed_int > 0, "int latency never timed");
    check(n_timed_rb > 0, "rb latency never timed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
