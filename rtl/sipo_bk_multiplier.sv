// Digit-level serial-in parallel-out integer multiplier with Brent-Kung accumulation.
//
// Operand B (N bits) is loaded in parallel; operand A enters serially, W bits (one
// digit) per accepted cycle, least significant digit first. Each accepted digit
// forms W partial-product rows, row t = a_digit[t] ? (B << (digit_index*W + t)) : 0,
// with a layer of W x 2N AND gates. The rows are added to the 2N-bit accumulator by a
// chain of W Brent-Kung adders (a multi-operand adder whose stages all use the
// parallel-prefix adder), and the result is written back to the accumulator
// flip-flops. B is held in a 2N-bit shift register that moves W places left per
// digit, so the rows need no barrel shifter. After ceil(N/W) digits the full
// 2N-bit product is on `product` in parallel.
//
// Interface and timing (clk rising edge, rst_n active-low synchronous reset):
//   load          one-cycle pulse; b_in is captured, the accumulator cleared.
//   ready         high while a digit can be accepted (state RUN).
//   digit_valid   a_digit is accepted on an edge where digit_valid && ready. A cycle
//                 with digit_valid low is a stall: nothing changes.
//   done          high from the edge that accepts the last digit until the next load;
//                 product is valid while done is high.
// With no stalls a multiplication takes ceil(N/W) cycles after the load cycle.
//
// The Brent-Kung adder, the AND layer and the flip-flop accumulation loop follow the
// source design. N = 16 follows its 16-bit operands, so the accumulator adder is the
// 32-bit Brent-Kung adder of its final design. The digit size W = 4, the
// handshake, LSB-first digit order and the row-per-adder chaining are this design's
// own choices.
module sipo_bk_multiplier
  import sipo_pkg::*;
#(
  parameter int N = 16,   // operand width
  parameter int W = 4     // digit size: bits of A per cycle
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [N-1:0]   b_in,
  input  logic           digit_valid,
  input  logic [W-1:0]   a_digit,
  output logic           ready,
  output logic           done,
  output logic [2*N-1:0] product
);
  localparam int NDIG = (N + W - 1) / W;          // digits per operand A
  localparam int CW   = $clog2(NDIG + 1);
  localparam int PW   = 2 * N;                    // product / accumulator width

  sipo_state_e     state;
  logic [CW-1:0]   dig_cnt;
  logic [PW-1:0]   b_sh;      // B shifted to the weight of the current digit
  logic [PW-1:0]   acc;       // accumulation flip-flops
  logic            take;

  // Partial-product rows and the chain of Brent-Kung adders
  logic [PW-1:0]   row [W];
  logic [PW-1:0]   psum [W+1];

  assign take = digit_valid && (state == SIPO_RUN);

  always_comb begin
    for (int t = 0; t < W; t++) begin
      row[t] = (b_sh << t) & {PW{a_digit[t]}};
    end
  end

  assign psum[0] = acc;
  for (genvar t = 0; t < W; t++) begin : g_add
    logic unused_cout;
    bk_adder #(.WIDTH(PW)) u_bk (
      .a   (psum[t]),
      .b   (row[t]),
      .cin (1'b0),
      .sum (psum[t+1]),
      .cout(unused_cout)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= SIPO_IDLE;
      dig_cnt <= '0;
      b_sh    <= '0;
      acc     <= '0;
    end else if (load) begin
      state   <= SIPO_RUN;
      dig_cnt <= '0;
      b_sh    <= PW'(b_in);
      acc     <= '0;
    end else if (take) begin
      acc     <= psum[W];
      b_sh    <= b_sh << W;
      dig_cnt <= dig_cnt + 1'b1;
      if (dig_cnt == CW'(NDIG - 1)) state <= SIPO_DONE;
    end
  end

  assign ready   = (state == SIPO_RUN);
  assign done    = (state == SIPO_DONE);
  assign product = acc;

  // The product never exceeds 2N bits, so no digit may carry out of the accumulator.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    take |-> !(psum[W] < acc))
    else $error("accumulator overflow");
  a_ready_done_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(ready && done));
endmodule
