// tb_level_decoder: exhaustive check of the level decoder.
//
// Applies every value of the 3-bit signed level and checks that exactly the
// select line of that level is set for -2..+2 and none outside.
module tb_level_decoder;
  import hcc_pkg::*;
  level_t     level;
  logic [4:0] sel;
  int checks = 0, failures = 0;

  level_decoder #(.N_LEVELS(5)) dut (.level, .sel);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -4; v <= 3; v++) begin
      logic [4:0] exp;
      level = level_t'(v);
      #1;
      exp = (v >= -2 && v <= 2) ? 5'(1 << (v + 2)) : 5'b0;
      checks++;
      if (sel !== exp) begin
        failures++;
        $display("FAIL level %0d: sel=%b expected %b", v, sel, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
