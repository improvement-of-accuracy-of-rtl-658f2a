// ksa_adder: Kogge-Stone parallel-prefix adder, WIDTH bits, with carry-in and
// carry-out.
//
// Three stages. Pre-processing forms g_i = a_i & b_i and p_i = a_i ^ b_i; the
// carry-in is folded into bit 0 as g_0 | (p_0 & cin). The prefix stage has
// ceil(log2 WIDTH) levels; level k combines every bit i with bit i - 2^(k-1).
// A gray_cell is used where the result group already reaches bit 0 (its
// generate is then the final carry out of bit i), a black_cell elsewhere, and
// bits below the span are passed down unchanged. Post-processing forms
// sum_i = p_i ^ c_i with c_0 = cin and c_(i+1) = G(i:0).
//
// Purely combinational; the carry path is log2(WIDTH) cell delays deep. The
// default width of 16 bits is the size of the reference adder; the multiplier
// core instantiates it at its own width. The gray/black placement follows the
// classic Kogge-Stone tree; folding the carry-in into bit 0 is a choice of
// this implementation. The propagate outputs of the last level are never
// read (only the group generates become carries).
module ksa_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 0;

  logic [WIDTH-1:0] g0, p0;    // pre-processing: bit generate / propagate
  logic [WIDTH-1:0] g_last;    // G(i:0) after the last prefix level
  logic [WIDTH:0]   c;

  // Pre-processing stage
  always_comb begin
    g0    = a & b;
    g0[0] = (a[0] & b[0]) | ((a[0] ^ b[0]) & cin);
    p0    = a ^ b;
  end

  // Prefix computation stage: level k reads level k-1 (level 0 is g0/p0).
  for (genvar k = 1; k <= LEVELS; k++) begin : g_level
    localparam int unsigned D = 1 << (k - 1);
    logic [WIDTH-1:0] g_in, p_in, g_out, p_out;

    if (k == 1) begin : g_from_pre
      assign g_in = g0;
      assign p_in = p0;
    end else begin : g_from_level
      assign g_in = g_level[k-1].g_out;
      assign p_in = g_level[k-1].p_out;
    end

    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i < D) begin : g_pass
        assign g_out[i] = g_in[i];
        assign p_out[i] = p_in[i];
      end else if (i < 2 * D) begin : g_gray
        gray_cell u_gc (
          .gi(g_in[i]), .pi(p_in[i]), .gj(g_in[i-D]), .go(g_out[i])
        );
        // Group reaches bit 0: its propagate is never used again.
        assign p_out[i] = 1'b0;
      end else begin : g_black
        black_cell u_bc (
          .gi(g_in[i]), .pi(p_in[i]), .gj(g_in[i-D]), .pj(p_in[i-D]),
          .go(g_out[i]), .po(p_out[i])
        );
      end
    end
  end

  if (LEVELS == 0) begin : g_no_prefix
    assign g_last = g0;
  end else begin : g_prefix_out
    assign g_last = g_level[LEVELS].g_out;
  end

  // Final processing stage
  assign c    = {g_last, cin};
  assign sum  = p0 ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];
endmodule
