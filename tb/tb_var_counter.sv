// Testbench of the variable counter. It writes random codes, starts a
// count and then feeds one oscillator pulse per cycle, as the ring does
// until stopped. It checks that stop comes with the start for code 0 and
// otherwise with exactly the code-th pulse, that busy is high while pulses
// are owed, and that a code written during a count only affects the next.
module tb_var_counter;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       code_wr = 1'b0;
  logic [2:0] code_in = '0;
  logic       start = 1'b0;
  logic       pulse = 1'b0;
  logic       stop;
  logic [2:0] code_q;
  logic       busy;
  int         checks = 0;
  int         failures = 0;

  var_counter dut (.clk(clk), .rst_n(rst_n), .code_wr_i(code_wr), .code_i(code_in),
                   .start_i(start), .pulse_i(pulse), .stop_o(stop),
                   .code_o(code_q), .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s", what);
    end
  endtask

  initial begin
    int l;
    int next;
    int n;
    logic running;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(code_q == 3'd0 && !busy, "reset state");
    l = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      start = 1'b1;
      #1;
      chk(stop == (l == 0), $sformatf("stop at start for code %0d", l));
      @(negedge clk);
      start = 1'b0;
      // write the next code in the middle of this count
      next = $urandom_range(0, 7);
      code_wr = 1'b1;
      code_in = 3'(next);
      running = (l != 0);
      n = 0;
      while (running) begin
        pulse = 1'b1;
        n++;
        #1;
        chk(stop == (n == l), $sformatf("code %0d pulse %0d stop=%0b", l, n, stop));
        chk(busy, "busy during count");
        if (stop || n > 8) running = 1'b0;
        @(negedge clk);
        code_wr = 1'b0;
        pulse = 1'b0;
      end
      if (l == 0) @(negedge clk);
      code_wr = 1'b0;
      @(negedge clk);
      chk(!busy, "idle after count");
      chk(code_q == 3'(next), "code register");
      l = next;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
