// tb_mux_n: exhaustive select check of the 1-of-8 (default) and 1-of-16
// multiplexers with random data words.
module tb_mux_n;
  int checks = 0, failures = 0;
  logic [7:0]  d8;
  logic [2:0]  s8;
  logic        y8;
  logic [15:0] d16;
  logic [3:0]  s16;
  logic        y16;

  mux_n dut8 (.d(d8), .sel(s8), .y(y8));
  mux_n #(.SEL_W(4)) dut16 (.d(d16), .sel(s16), .y(y16));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      d8  = 8'($urandom);
      d16 = 16'($urandom);
      for (int s = 0; s < 16; s++) begin
        s8  = 3'(s);
        s16 = 4'(s);
        #1;
        checks++;
        if (y8 !== d8[s % 8] || y16 !== d16[s]) begin
          failures++;
          $display("FAIL sel %0d: y8 %b y16 %b", s, y8, y16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
