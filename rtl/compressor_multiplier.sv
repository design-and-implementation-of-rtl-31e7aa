// Area-efficient unsigned N x N multiplier built on the vertical-and-crosswise (Urdhva
// Tiryakbhyam) rule with one compressor per product column.
//
// Column k of the product collects all partial products x[i] & y[k-i] (the crosswise terms of
// the Vedic rule) together with every carry bit produced by column k-1. A column_compressor
// sized to exactly that number of bits turns them into product bit p[k] and floor(bits/2)
// carries, which all move to column k+1 at once. Product bit k therefore depends only on the
// inputs of its own column and on the carries of the column just before it; carries never ripple
// through several columns one at a time. For N = 8 the columns hold 1, 2, 4, 6, 8, 10, 12, 14,
// 14, 13, 11, 9, 7, 5, 3, 1 bits (from p[0] up), which fixes the compressor used at each
// position. The carries leaving the top column are dropped: the product always fits in 2N bits.
//
// Interface: x, y unsigned N-bit operands; p the 2N-bit product. Purely combinational, no clock,
// one product per evaluation. N = 8 is the main size; 16 is the second size evaluated.
module compressor_multiplier
  import mac_pkg::*;
#(
  parameter int N = DEFAULT_WIDTH
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int MAXC = max_carries(N);

  if (N < 2) begin : g_bad_n
    $error("compressor_multiplier needs N >= 2, got %0d", N);
  end

  // col_carry[k] holds the carries column k sends to column k+1 (low bits used, rest zero).
  logic [MAXC-1:0] col_carry [2*N];

  for (genvar k = 0; k < 2 * N; k++) begin : g_col
    localparam int NPP = pp_count(N, k);
    localparam int NCI = carries_in(N, k);
    localparam int NB  = NPP + NCI;
    localparam int LO  = (k < N) ? 0 : k - N + 1;   // lowest index i of x[i] in this column

    if (NB == 0) begin : g_empty
      assign p[k]         = 1'b0;
      assign col_carry[k] = '0;
    end else begin : g_bits
      logic [NB-1:0] bits;
      // Crosswise partial products of this column.
      for (genvar m = 0; m < NPP; m++) begin : g_pp
        assign bits[m] = x[LO+m] & y[k-LO-m];
      end
      // Carries handed over from the previous column.
      if (NCI > 0) begin : g_cin
        assign bits[NB-1:NPP] = col_carry[k-1][NCI-1:0];
      end

      if (NB == 1) begin : g_wire
        assign p[k]         = bits[0];
        assign col_carry[k] = '0;
      end else begin : g_comp
        logic [NB/2-1:0] c;
        column_compressor #(.N(NB)) u_comp (.in(bits), .sum(p[k]), .carry(c));
        if (NB / 2 < MAXC) begin : g_pad
          assign col_carry[k] = {{(MAXC - NB / 2){1'b0}}, c};
        end else begin : g_full
          assign col_carry[k] = c;
        end
      end
    end
  end
endmodule
