// tb_output_memory -- checks that a value shifted in appears at the output
// exactly DEPTH shifts later, for the default depth (input 1 of a 128-port
// switch, 130 slots) and for the shortest depth, 3, with shifts on random
// cycles and reset to zero.
module tb_output_memory;
  logic clk = 1'b0, rst_n = 1'b0, shift;
  logic [7:0] din, dout, dout3;
  logic [7:0] hist [$];
  int checks = 0, failures = 0;

  output_memory dut (.clk, .rst_n, .shift, .din, .dout);
  output_memory #(.DEPTH(3), .WIDTH(8)) dut3 (.clk, .rst_n, .shift, .din, .dout(dout3));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 1'b0;
    din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (dout !== 0 || dout3 !== 0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 2000; t++) begin
      shift = ($urandom % 3) == 0;
      din = 8'($urandom);
      @(posedge clk);
      if (shift) hist.push_front(din);
      #1;
      checks++;
      if (dout !== (hist.size() >= 130 ? hist[129] : 8'd0)) begin
        failures++;
        $display("FAIL t=%0d dout=%0d", t, dout);
      end
      checks++;
      if (dout3 !== (hist.size() >= 3 ? hist[2] : 8'd0)) begin
        failures++;
        $display("FAIL t=%0d dout3=%0d", t, dout3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
