// End-to-end testbench of the whole waveform generator, at its default
// parameters. One model clock cycle stands for one ring oscillator period
// (10.1 GHz). Three drive settings are run, each from reset through two
// full bipolar periods (58 CG_IN periods):
//   A  V-PNM_IN every 16 cycles, 8 V-PNM_IN periods per CG_IN period
//      (the 8:1 ratio of the low-speed measurement),
//   B  V-PNM_IN every 20 cycles (505 MHz, close to the 500 MHz of the
//      high-speed measurement), 1000 V-PNM_IN periods per CG_IN period,
//   C  V-PNM_IN every 8 cycles (1.26 GHz, the designed maximum) with a
//      CG_IN edge in every V-PNM_IN period (CG_IN also at its maximum).
// The testbench predicts, from the drive edges alone, which CG event each
// V-PNM_IN pulse follows, and so the burst length l and the working
// multiplier. It checks every burst (flux quanta added to VM1 and VM2),
// the COUNT1/COUNT2 transitions (one per 8 pulses of that multiplier, and
// l per CG_IN period in setting A, as in the low-speed measurement), and
// the per-CG-period differential voltage, whose peak-to-peak value in
// setting B is compared with the measured 72 uV. It also counts how often
// each mechanism occurred: retimed CG events, skips of the binary counter,
// port switches, zero and full-scale bursts, and both output polarities.
module tb_tri_wavegen_top;
  import sfq_pkg::*;

  localparam real PHI0   = 2.067833848e-15;  // flux quantum, Wb
  localparam real F_RING = 10.1e9;           // ring oscillator frequency, Hz
  localparam int  NCG    = 58;               // CG_IN periods per setting

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

  int checks = 0;
  int failures = 0;
  // mechanism counters, over all settings
  int n_events = 0;
  int n_skips = 0;
  int n_switch = 0;
  int n_zero = 0;
  int n_full = 0;
  int n_pos = 0;
  int n_neg = 0;

  tri_wavegen_top dut (
    .clk(clk), .rst_n(rst_n), .vpnm_in_i(vin), .cg_in_i(cgin),
    .count1_o(count1), .count2_o(count2), .v1_quanta_o(q1), .v2_quanta_o(q2),
    .code_o(code), .sel_o(sel)
  );

  always #5 clk = ~clk;

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Multiplication factor after k CG events (the 14-step triangle).
  function automatic int tri_code(int k);
    int p;
    if (k == 0) return 0;
    p = (k - 1) % 14 + 1;
    return (p <= 7) ? p : 14 - p;
  endfunction

  // Working multiplier after k CG events: VM1 at reset, VM2 from the first
  // event, then alternating every 14 events.
  function automatic port_sel_e port_of(int k);
    if (k == 0) return SEL_VM1;
    return (((k - 1) / 14) % 2 == 0) ? SEL_VM2 : SEL_VM1;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%s", what);
    end
  endtask

  task automatic run_setting(input string name, input int vp, input int r);
    int        t;
    int        pc;
    int        j;
    int        e;
    int        e_done;
    int        l;
    int        dq1;
    int        dq2;
    int        tog1;
    int        tog2;
    int        tot1;
    int        tot2;
    int        ttog1;
    int        ttog2;
    int        win_q1;
    int        win_q2;
    int        win_t1;
    int        win_t2;
    int        ncycles;
    logic [31:0] last_q1;
    logic [31:0] last_q2;
    logic      last_c1;
    logic      last_c2;
    logic [2:0] last_code;
    port_sel_e last_sel;
    port_sel_e p;
    real       v;
    real       vmax;
    real       vmin;
    real       vpp_expect;

    rst_n = 1'b0;
    vin   = 1'b0;
    cgin  = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    last_q1 = '0; last_q2 = '0; last_c1 = 1'b0; last_c2 = 1'b0;
    last_code = '0; last_sel = SEL_VM1;
    tog1 = 0; tog2 = 0; tot1 = 0; tot2 = 0; ttog1 = 0; ttog2 = 0;
    win_q1 = 0; win_q2 = 0; win_t1 = 0; win_t2 = 0;
    e_done = 0;
    vmax = -1.0; vmin = 1.0;
    ncycles = (NCG * r + 2) * vp + 12;
    for (t = 0; t < ncycles; t++) begin
      // t is the index of the coming clock edge; pc edges have passed
      pc   = t - 1;
      vin  = ((t % vp) < vp / 2);
      cgin = (t >= vp / 2) && (((t - vp / 2) % (r * vp)) < (r * vp) / 2);
      // observe the outputs left by the previous edges
      if (count1 != last_c1) tog1++;
      if (count2 != last_c2) tog2++;
      last_c1 = count1;
      last_c2 = count2;
      if (sel != last_sel) n_switch++;
      if (code != last_code && ((last_code == 3'd7 && code == 3'd6) ||
                                (last_code == 3'd0 && code == 3'd1))) n_skips++;
      last_sel  = sel;
      last_code = code;
      // burst j (V-PNM_IN edge presented to clock edge j*vp) is complete
      // after clock edge j*vp + 10, before the next burst starts
      if (pc >= 10 && (pc - 10) % vp == 0) begin
        j   = (pc - 10) / vp;
        e   = (j <= 1) ? 0 : (j - 1 + r - 1) / r;   // CG events before pulse j
        l   = tri_code(e);
        p   = port_of(e);
        dq1 = int'(q1 - last_q1);
        dq2 = int'(q2 - last_q2);
        last_q1 = q1;
        last_q2 = q2;
        tot1 += dq1 / VM_FACTOR;
        tot2 += dq2 / VM_FACTOR;
        ttog1 += tog1;
        ttog2 += tog2;
        chk(dq1 == ((p == SEL_VM1) ? VM_FACTOR * l : 0) &&
            dq2 == ((p == SEL_VM2) ? VM_FACTOR * l : 0),
            $sformatf("%s burst %0d: quanta %0d/%0d, expected l=%0d on %s",
                      name, j, dq1, dq2, l, p.name()));
        chk(ttog1 == tot1 / 8 && ttog2 == tot2 / 8,
            $sformatf("%s burst %0d: COUNT transitions %0d/%0d for %0d/%0d pulses",
                      name, j, ttog1, ttog2, tot1, tot2));
        if (l == 0) n_zero++;
        if (l == 7) n_full++;
        // close the CG window of code index e_done when burst j starts a new one
        if (e != e_done) begin
          chk(e == e_done + 1, $sformatf("%s: CG event sequence", name));
          if (e_done >= 1) begin
            l = tri_code(e_done);
            p = port_of(e_done);
            chk(win_q1 - win_q2 == ((p == SEL_VM1) ? 1 : -1) * VM_FACTOR * r * l,
                $sformatf("%s CG period %0d: differential %0d quanta, l=%0d",
                          name, e_done, win_q1 - win_q2, l));
            if (r % 8 == 0)
              chk(win_t1 == ((p == SEL_VM1) ? r * l / 8 : 0) &&
                  win_t2 == ((p == SEL_VM2) ? r * l / 8 : 0),
                  $sformatf("%s CG period %0d: COUNT transitions %0d/%0d, l=%0d",
                            name, e_done, win_t1, win_t2, l));
            v = PHI0 * real'(win_q1 - win_q2) * F_RING / real'(r * vp);
            if (v > vmax) vmax = v;
            if (v < vmin) vmin = v;
            if (win_q1 > win_q2) n_pos++;
            if (win_q1 < win_q2) n_neg++;
          end
          n_events++;
          e_done = e;
          win_q1 = 0; win_q2 = 0; win_t1 = 0; win_t2 = 0;
        end
        win_q1 += dq1;
        win_q2 += dq2;
        win_t1 += tog1;
        win_t2 += tog2;
        tog1 = 0;
        tog2 = 0;
      end
      @(negedge clk);
    end
    vpp_expect = 2.0 * PHI0 * real'(VM_FACTOR) * 7.0 * F_RING / real'(vp);
    chk(e_done >= 2 * 28, $sformatf("%s: only %0d CG periods completed", name, e_done));
    chk(vmax - vmin > 0.99 * vpp_expect && vmax - vmin < 1.01 * vpp_expect,
        $sformatf("%s: Vpp %f uV, expected %f uV", name, (vmax - vmin) * 1e6, vpp_expect * 1e6));
    $display("%s: V-PNM_IN %0.1f MHz, %0d per CG_IN period; Vpp %0.1f uV (V1-V2, before the x100 amplifier), waveform period %0d CG_IN periods",
             name, F_RING / real'(vp) / 1e6, r, (vmax - vmin) * 1e6, 28);
  endtask

  initial begin
    run_setting("A", 16, 8);
    run_setting("B", 20, 1000);
    run_setting("C", 8, 1);
    // setting B stands for the high-speed measurement: 72 uVpp at 500 MHz
    $display("events %0d, counter skips %0d, port switches %0d, zero bursts %0d, full-scale bursts %0d, positive/negative CG periods %0d/%0d",
             n_events, n_skips, n_switch, n_zero, n_full, n_pos, n_neg);
    chk(n_events > 0, "no CG event");
    chk(n_skips > 0, "binary counter never skipped a state");
    chk(n_switch > 0, "output port never switched");
    chk(n_zero > 0, "no zero-length burst");
    chk(n_full > 0, "no full-scale burst");
    chk(n_pos > 0 && n_neg > 0, "output not bipolar");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
