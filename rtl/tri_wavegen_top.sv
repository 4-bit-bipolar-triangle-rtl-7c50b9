// 4-bit bipolar triangle voltage waveform generator (whole chip).
//
// Two DC drive levels run the chip. Each rising edge of vpnm_in_i becomes a
// V-PNM_IN pulse; the variable-pulse number multiplier answers it with l(t)
// pulses, where l(t) is the code from the code generator. Each rising edge
// of cg_in_i becomes a CG_IN pulse that, at the next V-PNM_IN pulse, steps
// l(t) along the triangle 0,1,...,7,...,1 (14 steps) and, each time l goes
// from 0 to 1, switches the pulse train to the other voltage multiplier.
// VM1 and VM2 therefore each carry one unipolar triangle in turn, and
// their difference V1 - V2 is a bipolar triangle with a period of 28 CG_IN
// periods.
//
// Outputs: v1_quanta_o and v2_quanta_o are the flux quanta passed by the two
// 5-fold voltage multipliers (the integrals of V1 and V2, in flux quanta);
// the off-chip differential amplifier that forms V1 - V2 is not part of
// the chip and is left to the user. count1_o and count2_o are the
// low-speed monitors: each VM's pulse train divided by 8 and turned into a
// toggling level. code_o and sel_o show the code held by the V-PNM and the
// working port.
//
// The block structure and wiring follow the published circuit; timing is
// in cycles of the ring oscillator (see sfq_pkg), and V-PNM_IN edges must be
// at least 8 cycles apart plus the converter's latency jitter.
module tri_wavegen_top
  import sfq_pkg::*;
#(
  parameter int unsigned PHASE_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vpnm_in_i,    // V-PNM_IN drive level
  input  logic                 cg_in_i,      // CG_IN drive level
  output logic                 count1_o,     // COUNT1 monitor level
  output logic                 count2_o,     // COUNT2 monitor level
  output logic [PHASE_W-1:0]   v1_quanta_o,  // integral of V1 in flux quanta
  output logic [PHASE_W-1:0]   v2_quanta_o,  // integral of V2 in flux quanta
  output logic [CODE_BITS-1:0] code_o,       // code held by the V-PNM
  output port_sel_e            sel_o         // working voltage multiplier
);

  logic                 vpnm_pulse;
  logic                 cg_pulse;
  logic                 code_wr;
  logic [CODE_BITS-1:0] code;
  logic                 to_vm1;
  logic                 to_vm2;
  logic                 out1;
  logic                 out2;
  logic                 pre1;
  logic                 pre2;

  dcsfq u_dcsfq_vpnm (.clk(clk), .rst_n(rst_n), .dc_i(vpnm_in_i), .pulse_o(vpnm_pulse));
  dcsfq u_dcsfq_cg   (.clk(clk), .rst_n(rst_n), .dc_i(cg_in_i),   .pulse_o(cg_pulse));

  code_gen u_cg (
    .clk      (clk),
    .rst_n    (rst_n),
    .vpnm_in_i(vpnm_pulse),
    .cg_in_i  (cg_pulse),
    .code_wr_o(code_wr),
    .code_o   (code),
    .to_vm1_o (to_vm1),
    .to_vm2_o (to_vm2),
    .event_o  (),
    .skip_o   ()
  );

  vpnm u_vpnm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_i     (vpnm_pulse),
    .code_wr_i(code_wr),
    .code_i   (code),
    .to_vm1_i (to_vm1),
    .to_vm2_i (to_vm2),
    .out1_o   (out1),
    .out2_o   (out2),
    .code_o   (code_o),
    .sel_o    (sel_o),
    .busy_o   ()
  );

  vm #(.PHASE_W(PHASE_W)) u_vm1 (.clk(clk), .rst_n(rst_n), .pulse_i(out1), .quanta_o(v1_quanta_o));
  vm #(.PHASE_W(PHASE_W)) u_vm2 (.clk(clk), .rst_n(rst_n), .pulse_i(out2), .quanta_o(v2_quanta_o));

  prescaler u_pre1 (.clk(clk), .rst_n(rst_n), .pulse_i(out1), .pulse_o(pre1));
  prescaler u_pre2 (.clk(clk), .rst_n(rst_n), .pulse_i(out2), .pulse_o(pre2));

  sfqdc u_sfqdc1 (.clk(clk), .rst_n(rst_n), .pulse_i(pre1), .dc_o(count1_o));
  sfqdc u_sfqdc2 (.clk(clk), .rst_n(rst_n), .pulse_i(pre2), .dc_o(count2_o));

endmodule
