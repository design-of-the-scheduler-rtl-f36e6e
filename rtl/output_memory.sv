// output_memory -- delay line for scheduled VOQ numbers.
//
// Input module i chooses, in time slot k, the output it will use in slot
// k + N + 3 - i. The VOQ number chosen (0 = none) is shifted in at the end
// of slot k and appears on dout during slot k + DEPTH, where the queue
// manager reads it as the VOQ to send a cell from. DEPTH = N + 3 - i is at
// least 3, the shortest tap distance of the block-RAM shift register the
// scheduler uses for this memory. Here it is a register array shifted once
// per slot when `shift` is high. Reset clears every stage to 0.
module output_memory #(
  parameter int unsigned DEPTH = 130,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,  // one pulse per time slot
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < DEPTH; s++) stage[s] <= '0;
    end else if (shift) begin
      stage[0] <= din;
      for (int s = 1; s < DEPTH; s++) stage[s] <= stage[s-1];
    end
  end

  assign dout = stage[DEPTH-1];
endmodule
