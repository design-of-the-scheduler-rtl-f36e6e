// os_basic2 -- the basic 2x2 output selector.
//
// Picks the first of two requested outputs: Q1 = E & D1, Q2 = E & ~D1 & D2.
// C reports that at least one D bit is set, independent of E, so that a
// parent selector can decide which half to enable. Purely combinational.
// The equations are those of the basic selector of the SGS scheduler; the
// module is the leaf of the recursive output_selector.
module os_basic2 (
  input  logic e,   // enable: outputs valid only when 1
  input  logic d1,  // request for output 1 (higher priority)
  input  logic d2,  // request for output 2
  output logic q1,  // output 1 chosen
  output logic q2,  // output 2 chosen
  output logic c    // some request present
);
  always_comb begin
    q1 = e & d1;
    q2 = e & ~d1 & d2;
    c  = d1 | d2;
  end
endmodule
