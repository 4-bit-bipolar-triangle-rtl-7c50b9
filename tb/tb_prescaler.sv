// Testbench of the prescaler: random pulse trains; the output must pulse
// exactly on every 8th input pulse (three T flip-flop stages).
module tb_prescaler;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pin = 1'b0;
  logic pout;
  int   checks = 0;
  int   failures = 0;
  int   nin = 0;
  int   nout = 0;

  prescaler dut (.clk(clk), .rst_n(rst_n), .pulse_i(pin), .pulse_o(pout));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      pin = 1'($urandom_range(0, 1));
      if (pin) nin++;
      #1;
      checks++;
      if (pout !== (pin && (nin % 8 == 0))) begin
        failures++;
        $display("input pulse %0d: out=%0b", nin, pout);
      end
      if (pout) nout++;
    end
    checks++;
    if (nout != nin / 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
