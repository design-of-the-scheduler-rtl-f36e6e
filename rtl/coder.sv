// coder -- recursive one-hot to binary coder for the scheduled VOQ number.
//
// With a[j-1] = 1 (output j chosen), x = j in binary, 1 <= j <= N; x = 0
// when no bit is set, which the queue manager reads as "nothing scheduled".
// x has $clog2(N)+1 bits, the width of a VOQ number throughout the design.
//
// The 4-to-3 leaf has X2 = A4, X1 = A3|A2, X0 = A3|A1. A 2k-input coder is
// built from two k-input coders, c1 on the lower and c2 on the upper half,
// each m = log2(k)+1 bits wide:
//   x[m]     = c2[m-1]                 (only j = 2k)
//   x[m-1]   = c1[m-1] | |c2[m-2:0]    (k <= j <= 2k-1)
//   x[m-2:0] = c1[m-2:0] | c2[m-2:0]
// The leaf and the two-half recursion follow the scheduler's coder; the
// merge equations above are this design's own and need no third coder.
// Purely combinational; the input must be one-hot or zero.
// A -Wall lint of this file on its own, at its default size, reports
// c1/c2 as undriven: they are driven by the two recursive instances, which
// that lint run does not follow at the default parameter (it does with an
// explicit -GN=128, and in any design that instantiates the coder).
module coder #(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0]        a,
  output logic [$clog2(N):0]  x
);
  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $fatal(1, "coder: N must be a power of two >= 2");
  end

  if (N == 2) begin : g_base2
    assign x = {a[1], a[0]};
  end else if (N == 4) begin : g_base4
    assign x[2] = a[3];
    assign x[1] = a[2] | a[1];
    assign x[0] = a[2] | a[0];
  end else begin : g_rec
    localparam int unsigned K = N / 2;
    localparam int unsigned M = $clog2(K) + 1;
    logic [M-1:0] c1, c2;
    coder #(.N(K)) u_lo (.a(a[K-1:0]), .x(c1));
    coder #(.N(K)) u_hi (.a(a[N-1:K]), .x(c2));
    assign x[M]     = c2[M-1];
    assign x[M-1]   = c1[M-1] | (|c2[M-2:0]);
    assign x[M-2:0] = c1[M-2:0] | c2[M-2:0];
  end
endmodule
