// Wallace tree of 3:2 carry-save counters.
//
// Reduces N W-bit rows to a sum row and a carry row. At every level the rows
// are taken three at a time through a csa; the one or two rows left over pass
// to the next level unchanged, so a level turns n rows into
// 2*floor(n/3) + n mod 3. Thirty-two rows take eight levels, sixteen rows
// six. Level l is the generate block g_lvl[l] with its own row array, fed from
// the rows of g_lvl[l-1]; the row counts are worked out at elaboration.
// Combinational; all sums are modulo 2^W.
module wallace_tree #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 62
) (
  input  logic [W-1:0] rows [N],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  function automatic int unsigned rows_at(int unsigned level);
    int unsigned n = N;
    for (int unsigned l = 0; l < level; l++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = N;
    int unsigned l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LV = num_levels();

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    localparam int unsigned NI = rows_at(l);
    logic [W-1:0] r [NI];
    if (l == 0) begin : g_in
      for (genvar k = 0; k < NI; k++) begin : g_row
        assign r[k] = rows[k];
      end
    end else begin : g_red
      localparam int unsigned NP = rows_at(l - 1);
      localparam int unsigned NG = NP / 3;
      for (genvar g = 0; g < NG; g++) begin : g_csa
        csa #(.W(W)) u_csa (
          .a (g_lvl[l-1].r[3*g]), .b (g_lvl[l-1].r[3*g+1]), .c (g_lvl[l-1].r[3*g+2]),
          .ci (1'b0), .s (r[2*g]), .co (r[2*g+1])
        );
      end
      for (genvar k = 3 * NG; k < NP; k++) begin : g_pass
        assign r[2*NG + k - 3*NG] = g_lvl[l-1].r[k];
      end
    end
  end

  assign sum   = g_lvl[LV].r[0];
  if (rows_at(LV) > 1) begin : g_c
    assign carry = g_lvl[LV].r[1];
  end else begin : g_c0
    assign carry = '0;
  end
endmodule
