// N x N unsigned column-bypassing array multiplier (combinational).
//
// Structure: partial products a[i]&b[k]. Row k = 1..N-1 is a carry-save row
// of N-1 full adders; FA(k,i) adds the partial product a[i]b[k] (side input),
// an "upper" bit and the carry of FA(k-1,i) (its upper-right neighbour). The
// upper bit is a[i+1]b[0] in row 1, and in later rows the sum of FA(k-1,i+1),
// or a[N-1]b[k-1] for the leftmost cell. Sums go down, carries go to the
// lower-left cell, so every FA of diagonal i sees multiplicand bit a[i].
// p[0] = a[0]b[0], p[k] = sum of FA(k,0), and a final ripple-carry row of
// N-1 full adders (carry-in 0) adds the last carry-save row into
// p[2N-2:N], its carry-out being p[2N-1].
//
// Column bypassing: when a[i] = 0, the partial product and the incoming carry
// of every FA in diagonal i are 0, so a 2:1 multiplexer selected by a[i]
// passes the upper bit straight down as the sum, and the carry leaving the
// diagonal is forced to 0 (an AND with a[i]). The ripple row is not bypassed.
// The array, the sum multiplexers and the carry gating of the last
// carry-save row follow the published 4 x 4 circuit; gating the carries
// of every row (not only the last) is this design's choice and is
// functionally neutral.
//
// Timing: no clock; the delay shrinks as more multiplicand bits are 0,
// which is what the adaptive hold logic predicts.
module cb_mult #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,   // multiplicand (selects the bypass)
  input  logic [N-1:0]   b,   // multiplier
  output logic [2*N-1:0] p    // product
);
  // Row k, cell i. Row 0 is unused so indices match the description above.
  logic [N-2:0] up   [1:N-1];  // upper input of FA(k,i)
  logic [N-2:0] cin  [1:N-1];  // carry input of FA(k,i)
  logic [N-2:0] fs   [1:N-1];  // raw FA sum
  logic [N-2:0] fc   [1:N-1];  // raw FA carry
  logic [N-2:0] sum  [1:N-1];  // sum after the bypass multiplexer
  logic [N-2:0] cout [1:N-1];  // carry after gating
  logic [N-2:0] rc;            // ripple-row carries
  logic [N-2:0] rs;            // ripple-row sums

  for (genvar k = 1; k < N; k++) begin : g_row
    for (genvar i = 0; i < N - 1; i++) begin : g_cell
      if (k == 1) begin : g_first
        assign up[k][i]  = a[i+1] & b[0];
        assign cin[k][i] = 1'b0;
      end else begin : g_next
        if (i == N - 2) begin : g_left
          assign up[k][i] = a[N-1] & b[k-1];
        end else begin : g_inner
          assign up[k][i] = sum[k-1][i+1];
        end
        assign cin[k][i] = cout[k-1][i];
      end
      full_adder u_fa (
        .x (a[i] & b[k]),
        .y (up[k][i]),
        .ci(cin[k][i]),
        .s (fs[k][i]),
        .co(fc[k][i])
      );
      // Bypass: "1" input is the FA sum, "0" input the upper bit.
      assign sum[k][i]  = a[i] ? fs[k][i] : up[k][i];
      assign cout[k][i] = a[i] & fc[k][i];
    end
  end

  // Final ripple-carry row.
  for (genvar j = 0; j < N - 1; j++) begin : g_ripple
    logic top_bit, ci_bit;
    if (j == 0) begin : g_cin0
      assign ci_bit = 1'b0;
    end else begin : g_cin
      assign ci_bit = rc[j-1];
    end
    if (j == N - 2) begin : g_msb
      assign top_bit = a[N-1] & b[N-1];
    end else begin : g_lsb
      assign top_bit = sum[N-1][j+1];
    end
    full_adder u_fa (
      .x (top_bit),
      .y (cout[N-1][j]),
      .ci(ci_bit),
      .s (rs[j]),
      .co(rc[j])
    );
  end

  always_comb begin
    p[0] = a[0] & b[0];
    for (int k = 1; k < N; k++) p[k] = sum[k][0];
    p[2*N-2:N] = rs;
    p[2*N-1]   = rc[N-2];
  end
endmodule
