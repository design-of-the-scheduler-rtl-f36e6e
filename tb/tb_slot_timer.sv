// tb_slot_timer -- checks that the phase steps 0,1,...,5,0,... one per
// cycle from reset and that slot_end is high exactly in phase 5, i.e. once
// every six cycles.
module tb_slot_timer;
  import sgs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  phase_t phase;
  logic slot_end;
  int checks = 0, failures = 0, ends = 0;

  slot_timer dut (.clk, .rst_n, .phase, .slot_end);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (phase !== PH_ARR_RD) begin failures++; $display("FAIL reset phase %0d", phase); end
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      checks++;
      if (int'(phase) != t % 6 || slot_end !== (t % 6 == 5)) begin
        failures++;
        $display("FAIL cycle %0d phase=%0d slot_end=%b", t, phase, slot_end);
      end
      if (slot_end) ends++;
      @(posedge clk);
      #1;
    end
    checks++;
    if (ends != 100) begin failures++; $display("FAIL %0d slot ends in 600 cycles", ends); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
