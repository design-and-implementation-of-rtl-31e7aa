// Higher-order column compressor (the 5:2, 6:2, 7:2 ... 11:2 compressors and larger ones of the
// multiplier). It adds N bits that all have the same weight and returns one sum bit of that
// weight and floor(N/2) carry bits of the next weight:
//     in[0] + ... + in[N-1] = sum + 2 * (carry[0] + ... + carry[N/2-1])
// Every carry leaves the column; none is fed back into it, so the next column only waits for
// this column's carries, never for a chain running through several columns.
//
// Structure: a chain of classic 4:2 compressors. The first takes in[0..4] (its carry-in pin
// takes a fifth bit of the same column); each following one takes the running sum bit and four
// new inputs. Each 4:2 stage emits two carries. The 1 to 4 bits left at the end are closed by a
// wire (1 bit), a half adder (2), a full adder (3) or a full adder and a half adder (4).
// The use of 4:2 compressors, full adders and half adders as building blocks follows the
// description of the higher-order compressors; the exact arrangement of the chain is this
// design's own choice, since only its function (N bits in, a sum and carries out) is fixed.
//
// Combinational, no clock. N must be at least 2.
module column_compressor #(
  parameter int N = 7
) (
  input  logic [N-1:0]   in,
  output logic           sum,
  output logic [N/2-1:0] carry
);
  // Number of 4:2 stages and number of bits left for the tail.
  localparam int K = (N >= 5) ? (N - 1) / 4 : 0;
  localparam int R = N - 4 * K;

  if (N < 2) begin : g_bad_n
    $error("column_compressor needs N >= 2, got %0d", N);
  end

  // Running sum bit after each 4:2 stage.
  logic [K:0] chain;
  assign chain[0] = in[0];

  for (genvar j = 0; j < K; j++) begin : g_stage
    compressor_4_2 u_c42 (
      .x1   (chain[j]),
      .x2   (in[4*j+1]),
      .x3   (in[4*j+2]),
      .x4   (in[4*j+3]),
      .cin  (in[4*j+4]),
      .sum  (chain[j+1]),
      .carry(carry[2*j]),
      .cout (carry[2*j+1])
    );
  end

  // Tail: t[0] is the running sum bit, t[i] for i >= 1 are the remaining inputs.
  logic [R-1:0] t;
  assign t[0] = chain[K];
  for (genvar i = 1; i < R; i++) begin : g_tail
    assign t[i] = in[4*K+i];
  end

  if (R == 1) begin : g_r1
    assign sum = t[0];
  end else if (R == 2) begin : g_r2
    half_adder u_ha (.a(t[0]), .b(t[1]), .s(sum), .c(carry[2*K]));
  end else if (R == 3) begin : g_r3
    full_adder u_fa (.a(t[0]), .b(t[1]), .ci(t[2]), .s(sum), .co(carry[2*K]));
  end else begin : g_r4
    logic s_fa;
    full_adder u_fa (.a(t[0]), .b(t[1]), .ci(t[2]), .s(s_fa), .co(carry[2*K]));
    half_adder u_ha (.a(s_fa), .b(t[3]), .s(sum), .c(carry[2*K+1]));
  end
endmodule
