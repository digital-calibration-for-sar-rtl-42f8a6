// Testbench of the ideal VTC model: on each 34 ns clock the pulse must be
// vin * 31.5 ns / 1024 wide (within 1 ps) and start 200 ps after the edge; a
// clear pulse must precede it; a zero input gives no pulse (each level is
// held for two clocks, so five non-zero levels give ten pulses).
module vtc_model_tb;
  timeunit 1ps; timeprecision 1ps;

  logic clk = 1'b0, pulse, clr;
  logic [9:0] vin = '0;
  int checks = 0, failures = 0, clears = 0, pulses = 0;
  realtime t_edge, t_r, t_f, t_clr;

  vtc_model #(.W(10)) dut (.clk(clk), .vin(vin), .pulse(pulse), .clr(clr));

  always #17000 clk = ~clk;
  always @(posedge clk) t_edge = $realtime;
  always @(posedge pulse) begin t_r = $realtime; pulses++; end
  always @(negedge pulse) t_f = $realtime;
  always @(posedge clr) begin t_clr = $realtime; clears++; end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes[6] = '{1, 100, 512, 777, 1023, 0};
    foreach (codes[i]) begin
      @(negedge clk) vin = 10'(codes[i]);
      @(posedge clk);
      @(negedge clk);
      @(posedge clk) #1;
      if (codes[i] != 0) begin
        real w;
        w = real'(codes[i]) * 31500.0 / 1024.0;
        checks++;
        if ((t_f - t_r) > w + 1.0 || (t_f - t_r) < w - 1.0) begin
          failures++;
          $display("code %0d: width %0.1f expected %0.1f", codes[i], t_f - t_r, w);
        end
        checks++;
        if ((t_r - (t_edge - 34000.0)) != 200.0) begin failures++; $display("launch %0.1f", t_r - (t_edge - 34000.0)); end
        checks++;
        if (t_clr > t_r) failures++;
      end
    end
    checks++;
    if (pulses != 10) begin failures++; $display("%0d pulses", pulses); end
    checks++;
    if (clears < 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
