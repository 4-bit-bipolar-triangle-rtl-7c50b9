// Workload testbench: the high-speed measurement of the generator, seen
// only through the top-level ports. V-PNM_IN runs at 505 MHz (20 ring
// periods of 99 ps, the nearest to the measured 500 MHz) and CG_IN is
// 25,000 times slower. The testbench integrates V1 - V2 over each CG_IN
// period from the two multipliers' flux-quantum counts, turns it into a
// voltage, and checks:
//   - peak-to-peak 2 * PHI0 * 505 MHz * 7 * 5 (73.1 uV; 72 uV measured),
//   - the period of the bipolar wave: 28 CG_IN periods, i.e. 35.7 Hz for
//     the measured 1 kHz CG_IN, found from its rising zero crossings,
//   - every window's voltage against l(t) * PHI0 * f * 5 within the one
//     burst per window that still uses the previous code.
module tb_highspeed;
  import sfq_pkg::*;

  localparam real PHI0   = 2.067833848e-15;
  localparam real F_RING = 10.1e9;
  localparam int  VP     = 20;      // cycles per V-PNM_IN period
  localparam int  R      = 25000;   // V-PNM_IN periods per CG_IN period
  localparam int  NWIN   = 62;      // CG_IN periods simulated

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        vin = 1'b0;
  logic        cgin = 1'b0;
  logic        count1;
  logic        count2;
  logic [31:0] q1;
  logic [31:0] q2;
  logic [2:0]  code;
  port_sel_e   sel;
  int          checks = 0;
  int          failures = 0;
  real         v [0:NWIN-1];

  tri_wavegen_top dut (
    .clk(clk), .rst_n(rst_n), .vpnm_in_i(vin), .cg_in_i(cgin),
    .count1_o(count1), .count2_o(count2), .v1_quanta_o(q1), .v2_quanta_o(q2),
    .code_o(code), .sel_o(sel)
  );

  always #5 clk = ~clk;

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tri_code(int k);
    int p;
    if (k == 0) return 0;
    p = (k - 1) % 14 + 1;
    return (p <= 7) ? p : 14 - p;
  endfunction

  initial begin
    logic [31:0] s1;
    logic [31:0] s2;
    longint      t = 0;
    real         step;
    real         vmax = 0.0;
    real         vmin = 0.0;
    real         vexp;
    int          rises [$];
    int          sgn;
    int          last_sgn = 0;
    int          k;

    step = PHI0 * F_RING / real'(VP) * real'(VM_FACTOR);   // volts per unit of l
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    s1 = '0;
    s2 = '0;
    for (int w = 0; w < NWIN; w++) begin
      // one CG_IN period; its rising edge lies mid V-PNM_IN period
      for (int i = 0; i < R * VP; i++) begin
        vin  = ((t % VP) < VP / 2);
        cgin = (i >= VP / 2) && (i < VP / 2 + R * VP / 2);
        t++;
        @(negedge clk);
      end
      v[w] = PHI0 * real'(int'(q1 - s1) - int'(q2 - s2)) * F_RING / real'(R * VP);
      s1 = q1;
      s2 = q2;
    end
    // window w starts with CG event w+1 and holds the code after it, apart
    // from its first burst
    for (int w = 0; w < NWIN; w++) begin
      k = tri_code(w + 1);
      vexp = (((w / 14) % 2 == 0) ? -1.0 : 1.0) * step * real'(k);
      checks++;
      if (v[w] - vexp > 1.5 * step / real'(R) * 7.0 || vexp - v[w] > 1.5 * step / real'(R) * 7.0) begin
        failures++;
        $display("window %0d: %f uV, expected %f uV", w, v[w] * 1e6, vexp * 1e6);
      end
      if (v[w] > vmax) vmax = v[w];
      if (v[w] < vmin) vmin = v[w];
      sgn = (v[w] > 0.0) ? 1 : (v[w] < 0.0) ? -1 : 0;
      if (sgn == 1 && last_sgn == -1) rises.push_back(w);
      if (sgn != 0) last_sgn = sgn;
    end
    checks++;
    if (vmax - vmin < 0.99 * 14.0 * step || vmax - vmin > 1.01 * 14.0 * step) begin
      failures++;
      $display("peak-to-peak %f uV, expected %f uV", (vmax - vmin) * 1e6, 14.0 * step * 1e6);
    end
    checks++;
    if (rises.size() < 2 || rises[1] - rises[0] != 28) begin
      failures++;
      $display("bipolar period not 28 CG_IN periods (%0d rising crossings)", rises.size());
    end else begin
      $display("period %0d CG_IN periods: %0.1f Hz at a 1 kHz CG_IN", rises[1] - rises[0],
               1000.0 / real'(rises[1] - rises[0]));
    end
    $display("V1-V2: %0.1f uV to %0.1f uV, %0.1f uVpp (%0.2f mVpp after a x100 amplifier)",
             vmin * 1e6, vmax * 1e6, (vmax - vmin) * 1e6, (vmax - vmin) * 1e5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
