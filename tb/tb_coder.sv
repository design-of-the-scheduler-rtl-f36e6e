// tb_coder -- checks the one-hot to binary coder at 128, 8, 4 and 2 inputs:
// every one-hot input must give its 1-based position, all-zero gives 0.
module tb_coder;
  logic [127:0] a;   logic [7:0] x;
  logic [7:0]   a8;  logic [3:0] x8;
  logic [3:0]   a4;  logic [2:0] x4;
  logic [1:0]   a2;  logic [1:0] x2;
  int checks = 0, failures = 0;

  coder #(.N(128)) dut   (.a(a),  .x(x));
  coder #(.N(8))   dut8  (.a(a8), .x(x8));
  coder #(.N(4))   dut4  (.a(a4), .x(x4));
  coder #(.N(2))   dut2  (.a(a2), .x(x2));

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; a8 = '0; a4 = '0; a2 = '0;
    #1;
    chk(x, 0, "N128 zero"); chk(x8, 0, "N8 zero"); chk(x4, 0, "N4 zero"); chk(x2, 0, "N2 zero");
    for (int j = 1; j <= 128; j++) begin
      a = 128'(1) << (j - 1);
      #1 chk(x, j, $sformatf("N128 j=%0d", j));
    end
    for (int j = 1; j <= 8; j++) begin
      a8 = 8'(1) << (j - 1);
      #1 chk(x8, j, $sformatf("N8 j=%0d", j));
    end
    for (int j = 1; j <= 4; j++) begin
      a4 = 4'(1) << (j - 1);
      #1 chk(x4, j, $sformatf("N4 j=%0d", j));
    end
    for (int j = 1; j <= 2; j++) begin
      a2 = 2'(1) << (j - 1);
      #1 chk(x2, j, $sformatf("N2 j=%0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
