// Digit-level serial-in parallel-out multiplier in symmetric redundant-basis (RB)
// representation over GF(2).
//
// Representation. With n = 2m+1 and beta an n-th root of unity, an element is the
// vector (x_0 .. x_{n-1}) of coefficients of beta^0 .. beta^(n-1). In the symmetric
// form x_0 = 0 and x_i = x_{n-i}, so only x_1 .. x_m are independent. The product
// is the cyclic convolution c_k = XOR_i a_i b_((k-i) mod n), which needs no modular
// reduction, and is again symmetric. Pairing a_i with a_{n-i} gives, for k = 1..m,
//   c_k = XOR over i = 1..m of a_i AND ( b_((k-i) mod n) XOR b_((k+i) mod n) ).
//
// Datapath (W independent coordinates of A per clock, i = t*W + j + 1 in digit t):
//   * n-bit circular shift register, loaded with all n coordinates of B and rotated
//     W places per digit, so in digit t it holds r[x] = b_((x - t*W) mod n);
//   * wire expansion, W*(n-1) wires: for module k (output c_(k+1)) and digit
//     position j, the two taps r[(k - j) mod n] = b_(k+1-i) and
//     r[(-k-j-2) mod n] = b_(-(k+1+i)) = b_(k+1+i), the last by symmetry of B;
//   * m = (n-1)/2 modules, each with W structures of two AND gates whose second
//     input is the digit bit a_digit[j], and two accumulation units (an XOR gate and
//     a flip-flop fed back to the XOR) per structure: W*m structures in all;
//   * an XOR network adding the 2W accumulator outputs of each module into c_(k+1).
//
// Interface and timing (rising clk, synchronous active-low rst_n):
//   load         one-cycle pulse: b_in (all n coordinates, symmetric, b_in[0] = 0)
//                is loaded into the shift register and the accumulators are cleared.
//   a_digit[j]   coordinate a_(t*W+j+1) of A in digit t, accepted on an edge with
//                digit_valid && ready; positions past m in the last digit are ignored.
//   done         rises on the edge that takes digit ceil(m/W)-1 and holds until the
//                next load; product[k] = c_(k+1), k = 0..m-1, is valid while done.
//   Latency without stalls: ceil(m/W) cycles after the load cycle. A load at any
//   time restarts the multiplication.
//
// The register, wire expansion, module/structure organisation, per-gate
// accumulation and XOR network follow the source design. The default n = 19
// (m = 9, GF(2^9)), digit size W = 4, the handshake, and masking of the padding
// positions are this design's own choices.
module rb_sipo_multiplier
  import sipo_pkg::*;
#(
  parameter int N = 19,   // RB length n = 2m+1 (odd)
  parameter int W = 4     // digit size
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [N-1:0]         b_in,
  input  logic                 digit_valid,
  input  logic [W-1:0]         a_digit,
  output logic                 ready,
  output logic                 done,
  output logic [(N-1)/2-1:0]   product
);
  localparam int M    = (N - 1) / 2;        // independent coordinates, modules
  localparam int NDIG = (M + W - 1) / W;
  localparam int CW   = $clog2(NDIG + 1);

  sipo_state_e         state;
  logic [CW-1:0]       dig_cnt;
  logic [N-1:0]        b_reg;              // circular shift register
  logic [W-1:0]        a_bits;             // digit with padding positions masked
  logic [M-1:0][W-1:0] tap_lo, tap_hi;     // wire-expansion outputs
  logic [M-1:0][W-1:0] acc_lo, acc_hi;     // accumulation flip-flops, two per structure
  logic                take;

  assign take = digit_valid && (state == SIPO_RUN);

  always_comb begin
    for (int j = 0; j < W; j++)
      a_bits[j] = a_digit[j] && ((int'(dig_cnt) * W + j) < M);
  end

  // Wire expansion: fixed taps of the rotating register
  always_comb begin
    for (int k = 0; k < M; k++) begin
      for (int j = 0; j < W; j++) begin
        tap_lo[k][j] = b_reg[(k - j + N * W) % N];
        tap_hi[k][j] = b_reg[(2 * N * W - k - j - 2) % N];
      end
    end
  end

  function automatic bit is_symmetric(input logic [N-1:0] x);
    bit ok = (x[0] == 1'b0);
    for (int i = 1; i < N; i++) ok &= (x[i] == x[N-i]);
    return ok;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= SIPO_IDLE;
      dig_cnt <= '0;
      b_reg   <= '0;
      acc_lo  <= '0;
      acc_hi  <= '0;
    end else if (load) begin
      state   <= SIPO_RUN;
      dig_cnt <= '0;
      b_reg   <= b_in;
      acc_lo  <= '0;
      acc_hi  <= '0;
    end else if (take) begin
      for (int k = 0; k < M; k++) begin
        for (int j = 0; j < W; j++) begin
          acc_lo[k][j] <= acc_lo[k][j] ^ (tap_lo[k][j] & a_bits[j]);
          acc_hi[k][j] <= acc_hi[k][j] ^ (tap_hi[k][j] & a_bits[j]);
        end
      end
      b_reg   <= {b_reg[N-1-W:0], b_reg[N-1 -: W]};   // rotate left by W
      dig_cnt <= dig_cnt + 1'b1;
      if (dig_cnt == CW'(NDIG - 1)) state <= SIPO_DONE;
    end
  end

  // Bottom XOR network: 2W accumulator outputs per module
  always_comb begin
    for (int k = 0; k < M; k++) product[k] = ^{acc_lo[k], acc_hi[k]};
  end

  assign ready = (state == SIPO_RUN);
  assign done  = (state == SIPO_DONE);

  a_ready_done_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(ready && done));
  // B must be in symmetric form: b_0 = 0 and b_i = b_(n-i)
  a_b_symmetric: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> is_symmetric(b_in))
    else $error("b_in is not in symmetric redundant form");
endmodule
