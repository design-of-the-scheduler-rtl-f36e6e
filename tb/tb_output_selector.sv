// tb_output_selector -- checks the recursive output selector at 128 and 4
// ports. Random request vectors (sparse and dense) and single-bit vectors
// are applied; the expected Q is the lowest set D bit (one-hot) when E = 1
// and zero otherwise, C is "any D bit".
module tb_output_selector;
  localparam int unsigned N = 128;
  logic         e;
  logic [N-1:0] d, q;
  logic         c;
  logic         e4, c4;
  logic [3:0]   d4, q4;
  int checks = 0, failures = 0;

  output_selector #(.N(N)) dut (.e, .d, .q, .c);
  output_selector #(.N(4)) dut4 (.e(e4), .d(d4), .q(q4), .c(c4));

  function automatic logic [N-1:0] lowest(input logic [N-1:0] v);
    for (int j = 0; j < N; j++) if (v[j]) return N'(1) << j;
    return '0;
  endfunction

  task automatic check_one();
    logic [N-1:0] exp_q;
    #1;
    exp_q = e ? lowest(d) : '0;
    checks++;
    if (q !== exp_q || c !== (d != '0)) begin
      failures++;
      $display("FAIL e=%b d=%h q=%h exp=%h c=%b", e, d, q, exp_q, c);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = 1'b1;
    d = '0;
    check_one();
    for (int j = 0; j < N; j++) begin
      d = N'(1) << j;  e = 1'b1; check_one();
      e = 1'b0; check_one();
    end
    for (int t = 0; t < 2000; t++) begin
      for (int w = 0; w < N / 32; w++) d[w*32 +: 32] = $urandom;
      if (t % 3 == 1) d = d & (N'(1) << ($urandom % N)) | (N'(1) << ($urandom % N));
      if (t % 3 == 2) d = d & ~(d - 1'b1) & ~(N'(1)) | (d << ($urandom % N) << 1);
      e = ($urandom % 8) != 0;
      check_one();
    end
    for (int v = 0; v < 32; v++) begin
      logic [3:0] exp4;
      {e4, d4} = 5'(v);
      #1;
      exp4 = '0;
      if (e4) for (int j = 3; j >= 0; j--) if (d4[j]) exp4 = 4'(1) << j;
      checks++;
      if (q4 !== exp4 || c4 !== (d4 != 0)) begin
        failures++;
        $display("FAIL N=4 e=%b d=%b q=%b", e4, d4, q4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
