// Top level: the digit-level serial-in parallel-out multipliers.
//
// Two independent multipliers share the clock and reset and nothing else:
//   int_*  the digit-serial integer multiplier whose partial products are summed by
//          Brent-Kung parallel-prefix adders (N = 16 bit operands, 32-bit product,
//          4-bit digits of A per clock);
//   rb_*   the digit-level symmetric redundant-basis multiplier over GF(2)
//          (n = 19 coordinates, of which m = 9 are independent and form the
//          product; 4-bit digits), whose additions are carry-free XORs.
// Each has the same handshake: a one-cycle load with B in parallel, then the digits
// of A on cycles with digit_valid && ready, lowest digit first; done is high and the
// product valid from the edge that takes the last digit until the next load. A load
// at any time restarts that multiplier. Without stalls each product is ready
// ceil(N/W) (integer) or ceil(m/W) (redundant basis) cycles after its load
// cycle: 4 and 3 cycles at the defaults.
module dl_sipo_top #(
  parameter int INT_N = 16,
  parameter int INT_W = 4,
  parameter int RB_N  = 19,
  parameter int RB_W  = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // integer multiplier with Brent-Kung accumulation
  input  logic               int_load,
  input  logic [INT_N-1:0]   int_b,
  input  logic               int_digit_valid,
  input  logic [INT_W-1:0]   int_a_digit,
  output logic               int_ready,
  output logic               int_done,
  output logic [2*INT_N-1:0] int_product,
  // redundant-basis GF(2) multiplier
  input  logic               rb_load,
  input  logic [RB_N-1:0]    rb_b,
  input  logic               rb_digit_valid,
  input  logic [RB_W-1:0]    rb_a_digit,
  output logic               rb_ready,
  output logic               rb_done,
  output logic [(RB_N-1)/2-1:0] rb_product
);
  sipo_bk_multiplier #(.N(INT_N), .W(INT_W)) u_int_mul (
    .clk, .rst_n,
    .load       (int_load),
    .b_in       (int_b),
    .digit_valid(int_digit_valid),
    .a_digit    (int_a_digit),
    .ready      (int_ready),
    .done       (int_done),
    .product    (int_product)
  );

  rb_sipo_multiplier #(.N(RB_N), .W(RB_W)) u_rb_mul (
    .clk, .rst_n,
    .load       (rb_load),
    .b_in       (rb_b),
    .digit_valid(rb_digit_valid),
    .a_digit    (rb_a_digit),
    .ready      (rb_ready),
    .done       (rb_done),
    .product    (rb_product)
  );
endmodule
