// tb_mux4: exhaustive check of the 1-of-4 multiplexer (16 data patterns x
// 4 selects).
module tb_mux4;
  int checks = 0, failures = 0;
  logic [3:0] d;
  logic [1:0] sel;
  logic       y;

  mux4 dut (.d(d), .sel(sel), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int s = 0; s < 4; s++) begin
        d   = 4'(i);
        sel = 2'(s);
        #1;
        checks++;
        if (y !== ((i >> s) & 1)) begin
          failures++;
          $display("FAIL d=%b sel=%0d y=%b", d, sel, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
