// Testbench of the DC/SFQ converter: drives a random level, held for random
// stretches, and checks that a one-cycle pulse follows each rising edge
// with the converter's fixed latency (level seen by clock edge c-2, pulse
// after clock edge c) and that no other pulse occurs.
module tb_dcsfq;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic dc = 1'b0;
  logic pulse;
  int   checks = 0;
  int   failures = 0;
  int   edges = 0;
  int   pulses = 0;
  logic hist [0:3];

  dcsfq dut (.clk(clk), .rst_n(rst_n), .dc_i(dc), .pulse_o(pulse));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) hist[i] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      // hist[0] is the level that the coming clock edge samples
      if (n % 3 == 0) dc = 1'($urandom_range(0, 1));
      for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = dc;
      if (hist[0] && !hist[1]) edges++;
      @(posedge clk);
      #1;
      checks++;
      if (pulse !== (hist[2] && !hist[3])) begin
        failures++;
        $display("cycle %0d: pulse=%0b expected %0b", n, pulse, hist[2] && !hist[3]);
      end
      if (pulse) pulses++;
    end
    checks++;
    if (edges < 20 || pulses + 2 < edges) begin
      failures++;
      $display("edges=%0d pulses=%0d", edges, pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
