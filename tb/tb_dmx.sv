// Testbench of the demultiplexer: random input pulses and select pulses.
// A reference port state, VM1 after reset, is kept by the testbench; each
// cycle the outputs must carry the input pulse on that port only.
module tb_dmx;
  import sfq_pkg::*;
  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      pin = 1'b0;
  logic      s1 = 1'b0;
  logic      s2 = 1'b0;
  logic      o1;
  logic      o2;
  port_sel_e sel;
  port_sel_e ref_sel;
  int        checks = 0;
  int        failures = 0;
  int        n1 = 0;
  int        n2 = 0;

  dmx dut (.clk(clk), .rst_n(rst_n), .pulse_i(pin), .to_vm1_i(s1), .to_vm2_i(s2),
           .out1_o(o1), .out2_o(o2), .sel_o(sel));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    ref_sel = SEL_VM1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      pin = 1'($urandom_range(0, 1));
      r = $urandom_range(0, 9);
      s1 = (r == 0);
      s2 = (r == 1);
      #1;
      checks++;
      if (o1 !== (pin && ref_sel == SEL_VM1) || o2 !== (pin && ref_sel == SEL_VM2)
          || sel !== ref_sel) begin
        failures++;
        $display("cycle %0d: in=%0b o1=%0b o2=%0b ref=%s", n, pin, o1, o2, ref_sel.name());
      end
      if (o1) n1++;
      if (o2) n2++;
      if (s1) ref_sel = SEL_VM1;
      else if (s2) ref_sel = SEL_VM2;
    end
    checks++;
    if (n1 < 100 || n2 < 100) begin
      failures++;
      $display("ports not both exercised: %0d %0d", n1, n2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
