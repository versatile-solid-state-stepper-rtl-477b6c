// tb_usmc_preset_rom: the preset word of every motor select code must be
// the motor's first bit pattern (P5..P0), and the spare codes must read zero.
module tb_usmc_preset_rom;
  import smc_tb_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] sel;
  logic [5:0] pv;

  usmc_preset_rom dut (.motor_sel(sel), .preset_val(pv));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      #1;
      checks++;
      if (pv !== (s < 5 ? REF_PRESET[s] : 6'd0)) begin
        failures++;
        $display("FAIL select %0d preset %b", s, pv);
      end
      if (s < 5) begin
        checks++;
        if (pv !== REF_SEQ[s][0]) begin
          failures++;
          $display("FAIL select %0d preset is not the first row", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
