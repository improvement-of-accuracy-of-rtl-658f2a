// fwbm_core: low-error fixed-width radix-4 Booth multiplier, L x L -> L bits.
//
// The full 2L-bit product of two's complement X and Y is a Q = L/2 row Booth
// partial-product array. Columns L..2L-1 are the main part (MP); columns
// 0..L-1 are the truncation part, of which only its most significant column
// L-1 (TP_ma) is kept. The rest (TP_mi) is not built: in column L-2 each row
// contributes its nonzero code nz_i instead of its partial-product bit, a cheap
// estimate of the carry that TP_mi would have sent upwards, and everything below
// column L-2 is dropped (including the +1 of negative rows, which always falls
// at column 2i <= L-2). A rounding constant completes the estimate.
//
// The kept columns L-2..2L-1 (L+2 bits) form Q+1 rows: the Q partial-product
// rows and one constant row holding the sign-extension constant and the
// rounding bit. A CSA tree reduces them to two rows and a Kogge-Stone adder adds
// those; the output Pd is the sum's top L bits (columns L..2L-1).
//
// Input `sh` is the data-scaling shift: the multiplicand has been multiplied
// by 2^sh and the caller will shift Pd right by sh. The rounding bit is placed
// at 2^(L-1+sh), so the final, shifted result is rounded once, to nearest,
// rather than rounded here and truncated again afterwards. With sh = 0 it is
// 2^(L-1), plain round-to-nearest of Pd.
//
// Purely combinational. The row structure, MP / TP_ma / TP_mi split, CSA tree
// and parallel-prefix adder follow the reference architecture; the nz-based
// compensation and the use of `s` for the rounding bit are this design's
// choices. L must be even and at least 4, DSB at most L.
module fwbm_core
  import fwbm_pkg::*;
#(
  parameter int unsigned L   = 8,
  parameter int unsigned DSB = 1,   // largest scaling shift the caller applies
  localparam int unsigned SW = (DSB > 0) ? $clog2(DSB + 1) : 1
) (
  input  logic [L-1:0]  x,
  input  logic [L-1:0]  y,
  input  logic [SW-1:0] sh,
  output logic [L-1:0]  pd
);
  localparam int unsigned Q    = L / 2;   // partial-product rows
  localparam int unsigned W    = L + 2;   // kept columns L-2 .. 2L-1
  localparam int unsigned BASE = L - 2;   // column of window bit 0

  // -2^L * sum_{i<Q} 4^i (mod 2^2L): replaces the sign extension of all rows.
  function automatic logic [2*L-1:0] sign_const();
    logic [2*L-1:0] acc;
    acc = '0;
    for (int i = 0; i < Q; i++) acc += (2*L)'(1) << (2 * i);
    return -(acc << L);
  endfunction

  localparam logic [2*L-1:0] SIGN_CONST = sign_const();
  localparam logic [W-1:0]   CONST_WIN  = W'(SIGN_CONST >> BASE);

  logic [L:0]            y_ext;   // {Y, y(-1) = 0}
  booth_code_t           code  [Q];
  logic [L:0]            pp    [Q];
  logic [Q:0][W-1:0]     rows;
  logic [W-1:0]          cs_sum, cs_carry, total;
  logic                  unused_cout;

  // Elaboration-time parameter checks
  if (L % 2 != 0 || L < 4) begin : g_bad_l
    $error("fwbm_core: L must be even and at least 4");
  end
  if (DSB > L) begin : g_bad_dsb
    $error("fwbm_core: DSB must not exceed L");
  end

  assign y_ext = {y, 1'b0};

  for (genvar i = 0; i < Q; i++) begin : g_row
    booth_encoder u_enc (
      .grp (y_ext[2*i+2 : 2*i]),
      .code(code[i])
    );
    booth_pp_row #(.L(L)) u_pp (
      .x   (x),
      .code(code[i]),
      .row (pp[i])
    );

    // Place row i (bit j at column 2i+j) into the window of columns BASE..2L-1.
    logic [W-1:0] win;
    always_comb begin
      win = '0;
      for (int col = BASE + 1; col < 2 * L; col++) begin
        if (col >= 2 * i && col - 2 * i <= L) win[col-BASE] = pp[i][col-2*i];
      end
      // Column L-2 (TP_mi's top column): nonzero code as the carry estimate.
      win[0] = code[i].nz;
    end
    assign rows[i] = win;
  end

  // Constant row: sign-extension constant plus the rounding bit 2^(L-1+sh),
  // which is window bit 1+sh.
  assign rows[Q] = CONST_WIN + (W'(2) << sh);

  csa_tree #(.N(Q + 1), .W(W)) u_csa (
    .rows (rows),
    .sum  (cs_sum),
    .carry(cs_carry)
  );

  ksa_adder #(.WIDTH(W)) u_ksa (
    .a   (cs_sum),
    .b   (cs_carry),
    .cin (1'b0),
    .sum (total),
    .cout(unused_cout)
  );

  assign pd = total[W-1:2];
endmodule
