// output_selector -- recursive N x N output selector of one input module.
//
// D[j] is 1 when the input has an unscheduled cell for output j+1 and that
// output is still free for the target time slot. The selector raises the
// single Q bit of the lowest-numbered set D bit (fixed priority, earlier
// outputs first) when E is 1; Q is all zero when E is 0 or no D bit is set.
// C is 1 when any D bit is set.
//
// Structure: a (2k)-port selector is two k-port selectors plus one basic
// 2-port selector. The two halves report their C bits as D1/D2 of the basic
// selector, whose Q1/Q2 enable the lower or upper half. The recursion ends
// in os_basic2 at N = 2. This is the structure of the scheduler's output
// selector; N must be a power of two. Purely combinational.
// Bit j of d/q stands for output j+1.
// A -Wall lint of this file on its own, at its default size, reports
// q, c_lo and c_hi as undriven: they are driven by the recursive instances,
// which that lint run does not follow at the default parameter (it does with
// an explicit -GN=128, and in any design that instantiates the selector).
module output_selector #(
  parameter int unsigned N = 128
) (
  input  logic         e,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic         c
);
  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $fatal(1, "output_selector: N must be a power of two >= 2");
  end

  if (N == 2) begin : g_base
    os_basic2 u_basic (.e(e), .d1(d[0]), .d2(d[1]), .q1(q[0]), .q2(q[1]), .c(c));
  end else begin : g_rec
    localparam int unsigned K = N / 2;
    logic e_lo, e_hi, c_lo, c_hi;
    output_selector #(.N(K)) u_lo (.e(e_lo), .d(d[K-1:0]), .q(q[K-1:0]), .c(c_lo));
    output_selector #(.N(K)) u_hi (.e(e_hi), .d(d[N-1:K]), .q(q[N-1:K]), .c(c_hi));
    os_basic2 u_top (.e(e), .d1(c_lo), .d2(c_hi), .q1(e_lo), .q2(e_hi), .c(c));
  end

  always_comb begin
    assert ($onehot0(q)) else $error("output_selector: more than one Q bit set");
  end
endmodule
