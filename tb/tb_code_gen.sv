// Testbench of the code generator. V-PNM_IN pulses come every 6 cycles and
// CG_IN pulses at random points, sometimes in the same cycle as a V-PNM_IN
// pulse. A reference D flip-flop predicts the CG events (a stored CG_IN
// pulse released by the next V-PNM_IN pulse). After k events the code must
// be the k-th entry of the triangle 0,1,..,7,6,..,1 (period 14), written
// one cycle after the event; a select pulse must come only when the code
// goes from 0 to 1, to VM2 and VM1 in turn, starting with VM2.
module tb_code_gen;
  import sfq_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       vp = 1'b0;
  logic       cg = 1'b0;
  logic       code_wr;
  logic [2:0] code;
  logic       to1;
  logic       to2;
  logic       evt;
  logic       skip;
  int         checks = 0;
  int         failures = 0;
  int         nsw1 = 0;
  int         nsw2 = 0;

  code_gen dut (.clk(clk), .rst_n(rst_n), .vpnm_in_i(vp), .cg_in_i(cg),
                .code_wr_o(code_wr), .code_o(code), .to_vm1_o(to1), .to_vm2_o(to2),
                .event_o(evt), .skip_o(skip));

  always #5 clk = ~clk;

  // Table of the multiplication factor after k CG events.
  function automatic int tri_code(int k);
    int p;
    if (k == 0) return 0;
    p = (k - 1) % 14 + 1;
    return (p <= 7) ? p : 14 - p;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s", what);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pending = 0;
    bit evt_ref;
    bit prev_evt = 0;
    int k = 0;
    int gap = 3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      vp = (n % 6 == 0);
      cg = 1'b0;
      if (gap == 0) begin
        cg  = 1'b1;
        gap = $urandom_range(3, 14);
        if ($urandom_range(0, 4) == 0) gap = 6 - (n % 6);  // land on a V-PNM_IN pulse
      end else begin
        gap--;
      end
      #1;
      evt_ref = vp && pending;
      chk(evt == evt_ref, $sformatf("cycle %0d: event=%0b expected %0b", n, evt, evt_ref));
      chk(skip == (evt_ref && (k % 14 == 7 || k % 14 == 0)),
          $sformatf("cycle %0d: skip=%0b after %0d events", n, skip, k));
      chk(code == 3'(tri_code(k)),
          $sformatf("cycle %0d: code %0d after %0d events, expected %0d", n, code, k, tri_code(k)));
      chk(code_wr == prev_evt, $sformatf("cycle %0d: code write strobe", n));
      chk(to2 == (prev_evt && k % 28 == 1) && to1 == (prev_evt && k % 28 == 15),
          $sformatf("cycle %0d: select pulses %0b %0b after %0d events", n, to1, to2, k));
      if (to1) nsw1++;
      if (to2) nsw2++;
      pending  = cg || (pending && !vp);
      prev_evt = evt_ref;
      if (evt_ref) k++;
    end
    chk(nsw1 >= 2 && nsw2 >= 2, "both switch directions exercised");
    $display("%0d CG events, %0d switches to VM1, %0d to VM2", k, nsw1, nsw2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
