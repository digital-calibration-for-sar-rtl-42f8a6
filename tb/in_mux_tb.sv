// Testbench of the input multiplexer: random external and calibration levels
// with both select values; the output must be the calibration level when
// sel = 1 and the external level otherwise.
module in_mux_tb;
  localparam int unsigned W = 10;
  logic sel;
  logic [W-1:0] a, c, y;
  int checks = 0, failures = 0;

  in_mux #(.W(W)) dut (.sel(sel), .ext_in(a), .cal_in(c), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = W'($urandom);
      c = W'($urandom);
      sel = 1'($urandom);
      #1;
      checks++;
      if (y !== (sel ? c : a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
