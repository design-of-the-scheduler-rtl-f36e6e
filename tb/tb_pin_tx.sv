// tb_pin_tx -- checks that pin_tx drives the lower half of its word in
// phases 0-2 and the upper half (zero-padded for odd widths) in phases 3-5,
// at 128 bits and 7 bits, for every phase value.
module tb_pin_tx;
  import sgs_pkg::*;
  phase_t phase;
  logic [127:0] word;
  logic [63:0]  pins;
  logic [6:0]   word7;
  logic [3:0]   pins7;
  int checks = 0, failures = 0;

  pin_tx dut (.phase, .word, .pins);
  pin_tx #(.W(7)) dut7 (.phase, .word(word7), .pins(pins7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      word  = {$urandom, $urandom, $urandom, $urandom};
      word7 = 7'($urandom);
      for (int p = 0; p < 6; p++) begin
        phase = phase_t'(p);
        #1;
        checks += 2;
        if (pins !== ((p < 3) ? word[63:0] : word[127:64])) begin
          failures++; $display("FAIL phase %0d pins %h word %h", p, pins, word);
        end
        if (pins7 !== ((p < 3) ? word7[3:0] : {1'b0, word7[6:4]})) begin
          failures++; $display("FAIL phase %0d pins7 %h word7 %h", p, pins7, word7);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
