// Brent-Kung parallel prefix adder, WIDTH bits, combinational.
//
// Three stages, as in the classic construction:
//   1. Pre-processing: per bit, propagate P = A xor B and generate G = A and B.
//      The carry input is folded into bit 0's generate (G0 | P0 & cin).
//   2. Carry generation: a Brent-Kung prefix tree. An up-sweep of log2 levels
//      combines pairs of groups at distances 1, 2, 4, ... (positions 2^(l+1)-1 modulo
//      2^(l+1)); a down-sweep of log2-1 levels then fills in the remaining carries.
//      A combination whose group reaches bit 0 is a gray cell (generate only); every
//      other combination is a black cell (generate and propagate).
//   3. Post-processing: sum[i] = P[i] xor carry into bit i.
// The tree is built on the next power of two at or above WIDTH; padding bits carry
// G = P = 0 and are left unused. Logic depth is 2*log2(WIDTH)-1 prefix levels.
//
// Ports: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout. No clock.
// The default WIDTH of 32 is the size of the final design; the 8- and 16-bit
// versions are the same module at other WIDTHs. The carry input is this design's
// own addition, used so that adders can be chained.
module bk_adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int L  = (WIDTH < 2) ? 1 : $clog2(WIDTH);  // up-sweep levels
  localparam int PW = 1 << L;                           // padded tree width
  localparam int NS = 2 * L - 1;                        // prefix stages

  logic [WIDTH-1:0] p_bit;
  logic [WIDTH:0]   carry;

  for (genvar s = 0; s <= NS; s++) begin : st
    logic [PW-1:0] g;
    logic [PW-1:0] p;
    if (s == 0) begin : pre
      // Pre-processing stage, eq. (1) and (2)
      for (genvar i = 0; i < PW; i++) begin : bitp
        if (i == 0) begin : b0
          assign p[i] = a[0] ^ b[0];
          assign g[i] = (a[0] & b[0]) | ((a[0] ^ b[0]) & cin);
        end else if (i < WIDTH) begin : bn
          assign p[i] = a[i] ^ b[i];
          assign g[i] = a[i] & b[i];
        end else begin : pad
          assign p[i] = 1'b0;
          assign g[i] = 1'b0;
        end
      end
    end else begin : tree
      localparam bit UP   = (s <= L);
      localparam int LVL  = UP ? (s - 1) : (2 * L - 1 - s);
      localparam int DIST = 1 << LVL;
      for (genvar i = 0; i < PW; i++) begin : bitc
        localparam bit UP_NODE = UP && (((i + 1) % (2 * DIST)) == 0);
        localparam bit DN_NODE = !UP && (((i + 1) % (2 * DIST)) == DIST) && (i >= 3 * DIST - 1);
        localparam bit REACHES_0 = UP ? ((i + 1) == 2 * DIST) : 1'b1;
        if ((UP_NODE || DN_NODE) && REACHES_0) begin : gray
          bk_gray_cell u_cell (
            .g_hi (st[s-1].g[i]),
            .p_hi (st[s-1].p[i]),
            .g_lo (st[s-1].g[i-DIST]),
            .g_out(g[i])
          );
          assign p[i] = st[s-1].p[i];
        end else if (UP_NODE || DN_NODE) begin : black
          bk_black_cell u_cell (
            .g_hi (st[s-1].g[i]),
            .p_hi (st[s-1].p[i]),
            .g_lo (st[s-1].g[i-DIST]),
            .p_lo (st[s-1].p[i-DIST]),
            .g_out(g[i]),
            .p_out(p[i])
          );
        end else begin : pass
          assign g[i] = st[s-1].g[i];
          assign p[i] = st[s-1].p[i];
        end
      end
    end
  end

  // Post-processing stage: carry into bit i+1 is the group generate of bits [i:0]
  assign p_bit    = st[0].p[WIDTH-1:0];
  assign carry[0] = cin;
  assign carry[WIDTH:1] = st[NS].g[WIDTH-1:0];
  assign sum  = p_bit ^ carry[WIDTH-1:0];
  assign cout = carry[WIDTH];
endmodule
