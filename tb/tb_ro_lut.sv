// Testbench for ro_lut: applies all four input combinations and compares
// LO with the enable-gated inverter it must implement (LO low only when
// EN and LI are both high).
`timescale 1ns / 1ps
module tb_ro_lut;
  logic en, li, lo;
  int   checks = 0, failures = 0;

  ro_lut dut (.en(en), .li(li), .lo(lo));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 4; i++) begin
        logic exp_lo;
        {en, li} = 2'(i);
        #1;
        exp_lo = (en == 1'b1 && li == 1'b1) ? 1'b0 : 1'b1;
        checks++;
        if (lo !== exp_lo) begin
          failures++;
          $display("FAIL en=%0b li=%0b lo=%0b expected %0b", en, li, lo, exp_lo);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
