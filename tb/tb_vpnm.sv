// Testbench of the variable-pulse number multiplier. Start pulses come 8 to
// 12 cycles apart, codes are written at random moments (also during a
// burst) and the working port is switched at random between bursts. A
// reference model predicts, cycle by cycle, a burst of exactly l pulses in
// the cycles after each start on the port selected at that time, with l
// the code held when the start came.
module tb_vpnm;
  import sfq_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in = 1'b0;
  logic       wr = 1'b0;
  logic [2:0] code_in = '0;
  logic       s1 = 1'b0;
  logic       s2 = 1'b0;
  logic       o1;
  logic       o2;
  logic [2:0] code_q;
  port_sel_e  sel;
  logic       busy;
  int         checks = 0;
  int         failures = 0;
  int         hist [0:7];
  int         nswitch = 0;

  vpnm dut (.clk(clk), .rst_n(rst_n), .in_i(in), .code_wr_i(wr), .code_i(code_in),
            .to_vm1_i(s1), .to_vm2_i(s2), .out1_o(o1), .out2_o(o2),
            .code_o(code_q), .sel_o(sel), .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int        code_ref = 0;
    int        rem = 0;
    int        got = 0;
    int        burst_l = 0;
    port_sel_e sel_ref = SEL_VM1;
    int        gap = 4;
    bit        exp_p;
    for (int i = 0; i < 8; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      in = (gap == 0);
      gap = in ? $urandom_range(7, 11) : gap - 1;
      wr = ($urandom_range(0, 5) == 0);
      code_in = 3'($urandom_range(0, 7));
      s1 = 1'b0;
      s2 = 1'b0;
      if (rem == 0 && $urandom_range(0, 7) == 0) begin
        if ($urandom_range(0, 1) == 0) s1 = 1'b1; else s2 = 1'b1;
      end
      #1;
      exp_p = (rem > 0);
      checks++;
      if (o1 !== (exp_p && sel_ref == SEL_VM1) || o2 !== (exp_p && sel_ref == SEL_VM2)) begin
        failures++;
        $display("cycle %0d: out %0b%0b, expected pulse=%0b on %s", n, o1, o2, exp_p, sel_ref.name());
      end
      if (o1 || o2) got++;
      if (exp_p) rem--;
      if (in) begin
        if (n > 0) hist[burst_l]++;
        checks++;
        if (got != burst_l) begin
          failures++;
          $display("cycle %0d: burst had %0d pulses for code %0d", n, got, burst_l);
        end
        got = 0;
        burst_l = code_ref;
        rem = code_ref;
      end
      if (wr) code_ref = int'(code_in);
      if (s1 && sel_ref != SEL_VM1) nswitch++;
      if (s2 && sel_ref != SEL_VM2) nswitch++;
      if (s1) sel_ref = SEL_VM1;
      if (s2) sel_ref = SEL_VM2;
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (hist[i] == 0) begin
        failures++;
        $display("code %0d never used", i);
      end
    end
    checks++;
    if (nswitch < 10) failures++;
    $display("bursts per code: %0d %0d %0d %0d %0d %0d %0d %0d, %0d port switches",
             hist[0], hist[1], hist[2], hist[3], hist[4], hist[5], hist[6], hist[7], nswitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
