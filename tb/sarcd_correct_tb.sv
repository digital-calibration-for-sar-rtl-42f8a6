// Testbench of the XNOR bit correction. For every value x of N bits a folding
// reference (independent of the correction rule) produces the raw stage
// decisions of an input of x + 1/2 LSB: u[k] = (v > 2^k), v = |v - 2^k|.
// The corrected word must equal x. A second instance with N = 4 checks the
// 4-bit example of the algorithm the same way.
module sarcd_correct_tb;
  import tdc_calib_pkg::*;

  localparam int unsigned N = ADC_BITS;
  logic [N-1:0] u, b;
  logic [3:0]   u4, b4;
  int checks = 0, failures = 0;

  sarcd_correct #(.N(N)) dut (.u(u), .b(b));
  sarcd_correct #(.N(4)) dut4 (.u(u4), .b(b4));

  function automatic logic [15:0] fold(int x, int n);
    logic [15:0] r = '0;
    real v;
    v = real'(x) + 0.5;
    for (int k = n - 1; k >= 0; k--) begin
      real w;
      w = real'(1 << k);
      r[k] = (v > w);
      v = (v > w) ? v - w : w - v;
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << N); x++) begin
      u = N'(fold(x, N));
      #1;
      checks++;
      if (b !== N'(x)) begin
        failures++;
        if (failures < 8) $display("u=%b -> b=%0d, expected %0d", u, b, x);
      end
    end
    for (int x = 0; x < 16; x++) begin
      u4 = 4'(fold(x, 4));
      #1;
      checks++;
      if (b4 !== 4'(x)) begin
        failures++;
        $display("4-bit: u=%b -> b=%0d, expected %0d", u4, b4, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
