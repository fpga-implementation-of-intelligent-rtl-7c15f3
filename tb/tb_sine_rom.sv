// Checks all 64 entries of the carrier table against
// 32 + round(31*cos(2*pi*k/64)) computed in floating point.
module tb_sine_rom;
  import tb_model_pkg::*;

  logic [5:0] addr;
  logic [5:0] data;
  int checks = 0, failures = 0;

  sine_rom dut (.addr, .data);

  initial begin
    for (int k = 0; k < 64; k++) begin
      addr = 6'(k);
      #1;
      checks++;
      if (int'(data) != cos_sample(k)) begin
        failures++;
        $display("FAIL: rom[%0d] = %0d, expected %0d", k, data, cos_sample(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
