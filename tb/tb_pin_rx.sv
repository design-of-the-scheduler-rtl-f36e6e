// tb_pin_rx -- checks that pin_rx rebuilds a word sent as lower half in
// phases 0-2 and upper half in phases 3-5, at 128 bits and at an odd width
// of 7 bits. The bench drives the pins itself from the slot phase and
// compares the word in the last phase with what it sent.
module tb_pin_rx;
  import sgs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  phase_t phase;
  logic slot_end;
  logic [63:0]  pins;
  logic [127:0] word, sent;
  logic [3:0]   pins7;
  logic [6:0]   word7, sent7;
  int checks = 0, failures = 0;

  slot_timer u_t (.clk, .rst_n, .phase, .slot_end);
  pin_rx dut (.clk, .rst_n, .phase, .pins, .word);
  pin_rx #(.W(7)) dut7 (.clk, .rst_n, .phase, .pins(pins7), .word(word7));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pins = '0; pins7 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 500; s++) begin
      sent  = {$urandom, $urandom, $urandom, $urandom};
      sent7 = 7'($urandom);
      for (int p = 0; p < 6; p++) begin
        checks++;
        if (int'(phase) != p) begin failures++; $display("FAIL phase alignment"); end
        pins  = (p < 3) ? sent[63:0] : sent[127:64];
        pins7 = (p < 3) ? sent7[3:0] : {1'b0, sent7[6:4]};
        if (p == 5) begin
          #1;
          checks += 2;
          if (word !== sent) begin failures++; $display("FAIL slot %0d word %h sent %h", s, word, sent); end
          if (word7 !== sent7) begin failures++; $display("FAIL slot %0d word7 %h sent %h", s, word7, sent7); end
        end
        @(posedge clk);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
