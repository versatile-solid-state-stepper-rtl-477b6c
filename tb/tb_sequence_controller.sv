// tb_sequence_controller: the default program (four clockwise full steps,
// six counter-clockwise half steps back home) must wait on its last pattern
// until start, then play all ten patterns on ten steps, hold the last one
// while start is low, and play again on the next start. A second instance
// with a 3-entry program checks a different length.
module tb_sequence_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, preset = 0, start = 0;
  logic [3:0] pattern, pattern3;
  logic busy, busy3;

  localparam logic [3:0] PROG [10] = '{4'b1001, 4'b1010, 4'b0110, 4'b0101, 4'b0100,
                                       4'b0110, 4'b0010, 4'b1010, 4'b1000, 4'b1001};

  always #5 clk = ~clk;

  sequence_controller dut (.clk, .rst_n, .step, .preset, .start, .pattern, .busy);
  sequence_controller #(.LEN(3), .PROGRAM({52'd0, 4'b0011, 4'b0001, 4'b1111}))
    dut3 (.clk, .rst_n, .step, .preset, .start, .pattern(pattern3), .busy(busy3));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic [3:0] p, input logic b, input logic [3:0] p3,
                            input logic b3, input string what);
    checks++;
    if (pattern !== p || busy !== b || pattern3 !== p3 || busy3 !== b3) begin
      failures++;
      $display("FAIL %s: %b/%b busy %b/%b | %b/%b busy %b/%b", what, pattern, p, busy, b,
               pattern3, p3, busy3, b3);
    end
  endtask

  task automatic pulse_step();
    @(negedge clk) step = 1;
    @(negedge clk) step = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    preset = 1;
    @(negedge clk) preset = 0;
    expect_out(4'b1001, 0, 4'b0011, 0, "idle after preset");
    repeat (3) begin
      pulse_step();
      expect_out(4'b1001, 0, 4'b0011, 0, "idle holds without start");
    end
    for (int run = 0; run < 2; run++) begin
      start = 1;
      pulse_step();
      start = 0;
      for (int i = 0; i < 10; i++) begin
        logic [3:0] p3;
        logic       b3;
        p3 = i == 0 ? 4'b1111 : (i == 1 ? 4'b0001 : 4'b0011);
        b3 = i < 2;
        expect_out(PROG[i], i < 9, p3, b3, $sformatf("run %0d entry %0d", run, i));
        if (i < 9) pulse_step();
      end
      repeat (2) begin
        pulse_step();
        expect_out(4'b1001, 0, 4'b0011, 0, "hold after sequence");
      end
    end
    // start held during the sequence does not restart it
    start = 1;
    pulse_step();
    pulse_step();
    expect_out(PROG[1], 1, 4'b0001, 1, "start ignored mid-sequence");
    start = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
