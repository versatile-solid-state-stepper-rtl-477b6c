// tb_rom: programs a 32 x 7 ROM with word i = (37*i + 11) mod 128 and
// reads every location back; also checks the all-zero default image.
module tb_rom;
  int checks = 0, failures = 0;

  function automatic logic [32*7-1:0] image();
    logic [32*7-1:0] img;
    for (int i = 0; i < 32; i++) img[i*7 +: 7] = 7'((37 * i + 11) % 128);
    return img;
  endfunction

  logic [4:0] addr;
  logic [6:0] data;
  logic [3:0] addr0;
  logic [3:0] data0;

  rom #(.ADDR_W(5), .DATA_W(7), .CONTENT(image())) dut (.addr(addr), .data(data));
  rom dut0 (.addr(addr0), .data(data0));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < 32; i++) begin
        addr  = pass == 0 ? 5'(i) : 5'(31 - i);
        addr0 = 4'(i);
        #1;
        checks++;
        if (data !== 7'((37 * addr + 11) % 128)) begin
          failures++;
          $display("FAIL addr %0d data %h", addr, data);
        end
        checks++;
        if (data0 !== 4'd0) begin
          failures++;
          $display("FAIL default image addr %0d data %h", addr0, data0);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
