// tb_preset_dff_reg: random step/preset/data stimulus against a behavioural
// model; checks q, q_n, preset priority and reset.
module tb_preset_dff_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, preset = 0;
  logic [5:0] pv = '0, d = '0, q, q_n, model;
  int n_preset = 0, n_step = 0, n_hold = 0;

  always #5 clk = ~clk;

  preset_dff_reg dut (.clk, .rst_n, .step, .preset, .preset_val(pv), .d, .q, .q_n);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== 6'd0) begin failures++; $display("FAIL reset q=%b", q); end
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      step   = ($urandom % 3) == 0;
      preset = ($urandom % 7) == 0;
      pv     = 6'($urandom);
      d      = 6'($urandom);
      if (preset)    begin model = pv; n_preset++; end
      else if (step) begin model = d;  n_step++;   end
      else n_hold++;
      @(posedge clk);
      #1;
      checks++;
      if (q !== model || q_n !== ~model) begin
        failures++;
        $display("FAIL cycle %0d q=%b q_n=%b model=%b", i, q, q_n, model);
      end
    end
    checks++;
    if (n_preset == 0 || n_step == 0 || n_hold == 0) failures++;
    rst_n = 0;
    #1;
    checks++;
    if (q !== 6'd0) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
