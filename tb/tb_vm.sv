// Testbench of the voltage multiplier model: random input pulses; the
// flux-quantum count must grow by 5 per pulse, one cycle after it.
module tb_vm;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        pin = 1'b0;
  logic [31:0] q;
  longint      npulse = 0;
  int          checks = 0;
  int          failures = 0;

  vm dut (.clk(clk), .rst_n(rst_n), .pulse_i(pin), .quanta_o(q));

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
      if (q !== 32'(5 * npulse)) begin
        failures++;
        $display("cycle %0d: %0d quanta after %0d pulses", n, q, npulse);
      end
      pin = 1'($urandom_range(0, 1));
      if (pin) npulse++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
