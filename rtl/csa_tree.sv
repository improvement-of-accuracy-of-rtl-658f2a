// csa_tree: carry-save adder tree reducing N rows of W bits to two rows.
//
// Wallace-style: each level groups its rows in threes, replaces every group by
// the sum and carry rows of a csa_3to2, and passes the one or two left-over
// rows on, so a level with n rows feeds 2*floor(n/3) + n mod 3 rows to the
// next. Levels are added until two rows (or one, for N = 1) remain; 5 rows take
// three levels. Result: sum + carry == sum of all rows (mod 2^W). Purely
// combinational. The tree shape is a choice of this implementation.
module csa_tree #(
  parameter int unsigned N = 5,
  parameter int unsigned W = 10
) (
  input  logic [N-1:0][W-1:0] rows,
  output logic [W-1:0]        sum,
  output logic [W-1:0]        carry
);
  // Rows present at tree level k (level 0 = the inputs).
  function automatic int unsigned rows_at(int unsigned k);
    int unsigned n = N;
    for (int unsigned j = 0; j < k; j++) begin
      if (n > 2) n = 2 * (n / 3) + n % 3;
    end
    return n;
  endfunction

  // Number of reduction levels.
  function automatic int unsigned num_levels();
    int unsigned n = N;
    int unsigned lv = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      lv++;
    end
    return lv;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  for (genvar k = 0; k <= LEVELS; k++) begin : g_lvl
    localparam int unsigned NK = rows_at(k);
    logic [NK-1:0][W-1:0] r;

    if (k == 0) begin : g_in
      assign r = rows;
    end else begin : g_reduce
      localparam int unsigned NP     = rows_at(k - 1);
      localparam int unsigned GROUPS = NP / 3;
      localparam int unsigned REST   = NP % 3;

      for (genvar j = 0; j < GROUPS; j++) begin : g_csa
        csa_3to2 #(.W(W)) u_csa (
          .a    (g_lvl[k-1].r[3*j]),
          .b    (g_lvl[k-1].r[3*j+1]),
          .c    (g_lvl[k-1].r[3*j+2]),
          .sum  (r[2*j]),
          .carry(r[2*j+1])
        );
      end
      for (genvar q = 0; q < REST; q++) begin : g_rest
        assign r[2*GROUPS+q] = g_lvl[k-1].r[3*GROUPS+q];
      end
    end
  end

  if (rows_at(LEVELS) == 1) begin : g_single
    assign sum   = g_lvl[LEVELS].r[0];
    assign carry = '0;
  end else begin : g_pair
    assign sum   = g_lvl[LEVELS].r[0];
    assign carry = g_lvl[LEVELS].r[1];
  end
endmodule
