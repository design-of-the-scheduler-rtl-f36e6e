// tb_sdp_ram -- checks the simple dual-port memory against an array model:
// random writes and reads at the default size, read data one cycle after
// the address, and old data when reading the address written in the same
// cycle.
module tb_sdp_ram;
  localparam int unsigned DEPTH = 128, WIDTH = 7;
  logic clk = 1'b0;
  logic we;
  logic [6:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] exp;
    we = 1'b1;
    raddr = '0;
    for (int i = 0; i < DEPTH; i++) begin
      waddr = 7'(i);
      wdata = 7'($urandom);
      model[i] = wdata;
      @(posedge clk);
      #1;
    end
    for (int t = 0; t < 3000; t++) begin
      we    = $urandom % 2 == 1;
      waddr = 7'($urandom);
      raddr = (t % 5 == 0) ? waddr : 7'($urandom);
      wdata = 7'($urandom);
      exp   = model[raddr];          // old data, also when raddr == waddr
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL t=%0d raddr=%0d rdata=%0d exp=%0d", t, raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
