// Testbench of the SFQ/DC converter: random pulses; the level must toggle
// in the cycle after each pulse and hold otherwise.
module tb_sfqdc;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pin = 1'b0;
  logic dc;
  logic ref_dc = 1'b0;
  int   checks = 0;
  int   failures = 0;

  sfqdc dut (.clk(clk), .rst_n(rst_n), .pulse_i(pin), .dc_o(dc));

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
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (dc !== ref_dc) begin
        failures++;
        $display("cycle %0d: level %0b expected %0b", n, dc, ref_dc);
      end
      pin = 1'($urandom_range(0, 1));
      if (pin) ref_dc = ~ref_dc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
