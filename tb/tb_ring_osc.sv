// Testbench of the ring oscillator. The testbench plays the variable
// counter: it starts the oscillator, counts its pulses and gives the stop
// pulse with the k-th one, for random k including 0 (stop with start). It
// checks that exactly k pulses come, one per cycle starting the cycle
// after the start, and that the oscillator is idle afterwards.
module tb_ring_osc;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic stop = 1'b0;
  logic pulse;
  logic running;
  int   checks = 0;
  int   failures = 0;

  ring_osc dut (.clk(clk), .rst_n(rst_n), .start_i(start), .stop_i(stop),
                .pulse_o(pulse), .running_o(running));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    int seen;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      k = $urandom_range(0, 9);
      @(negedge clk);
      start = 1'b1;
      stop  = (k == 0);
      checks++;
      if (pulse) begin
        failures++;
        $display("pulse while idle");
      end
      @(negedge clk);
      start = 1'b0;
      stop  = 1'b0;
      seen  = 0;
      for (int c = 0; c < 12; c++) begin
        checks++;
        if (pulse !== (c < k)) begin
          failures++;
          $display("train %0d k=%0d cycle %0d: pulse=%0b", t, k, c, pulse);
        end
        if (pulse) seen++;
        stop = pulse && (seen == k);
        @(negedge clk);
        stop = 1'b0;
      end
      checks++;
      if (seen != k || running) begin
        failures++;
        $display("train %0d: %0d pulses for k=%0d, running=%0b", t, seen, k, running);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
