// tb_rom_decoder: checks that every address raises exactly its own word
// line, for the default 4-bit decoder and a 6-bit one.
module tb_rom_decoder;
  int checks = 0, failures = 0;
  logic [3:0]  a4;
  logic [15:0] w4;
  logic [5:0]  a6;
  logic [63:0] w6;

  rom_decoder dut4 (.addr(a4), .word_line(w4));
  rom_decoder #(.ADDR_W(6)) dut6 (.addr(a6), .word_line(w6));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a4 = 4'(i);
      #1;
      checks++;
      if (w4 !== (16'd1 << i)) begin
        failures++;
        $display("FAIL addr %0d word_line %h", i, w4);
      end
    end
    for (int i = 0; i < 64; i++) begin
      a6 = 6'(i);
      #1;
      checks++;
      if (w6 !== (64'd1 << i)) begin
        failures++;
        $display("FAIL addr6 %0d word_line %h", i, w6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
