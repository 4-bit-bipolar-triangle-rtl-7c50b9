// Variable-pulse number multiplier (V-PNM), 3-bit, with output demultiplexer.
//
// For every V-PNM_IN pulse the multiplier emits a burst of l pulses, where l
// is the code last written by the code generator, so the mean output rate is
// l times the input rate. The burst is produced by a ring oscillator that
// the input pulse starts and the variable counter stops after l
// oscillations, and it leaves through the output port (VM1 or VM2) that the
// demultiplexer has enabled.
//
// Timing: an input pulse in cycle t gives burst pulses in cycles
// t+1 .. t+l (ring period of one cycle). Input pulses must therefore be at
// least 2**CODE_BITS cycles apart; this matches the circuit, whose 10.1 GHz
// oscillator allows about 8 pulses per period of the 1.26 GHz maximum input.
// A code write takes effect from the next input pulse. The structure (ring
// oscillator, variable counter, demultiplexer) follows the circuit
// description; the cycle timing is this model's.
module vpnm
#(
  parameter int unsigned CODE_BITS = sfq_pkg::CODE_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_i,       // V-PNM_IN pulse
  input  logic                 code_wr_i,  // code write strobe
  input  logic [CODE_BITS-1:0] code_i,     // multiplication factor l
  input  logic                 to_vm1_i,   // select pulse: VM1 works
  input  logic                 to_vm2_i,   // select pulse: VM2 works
  output logic                 out1_o,     // pulse train to VM1
  output logic                 out2_o,     // pulse train to VM2
  output logic [CODE_BITS-1:0] code_o,     // code currently held
  output sfq_pkg::port_sel_e            sel_o,      // working port
  output logic                 busy_o      // a burst is in progress
);

  logic ring_pulse;
  logic stop;
  logic running;
  logic cnt_busy;

  ring_osc u_ring (
    .clk      (clk),
    .rst_n    (rst_n),
    .start_i  (in_i),
    .stop_i   (stop),
    .pulse_o  (ring_pulse),
    .running_o(running)
  );

  var_counter #(.CODE_BITS(CODE_BITS)) u_cnt (
    .clk      (clk),
    .rst_n    (rst_n),
    .code_wr_i(code_wr_i),
    .code_i   (code_i),
    .start_i  (in_i),
    .pulse_i  (ring_pulse),
    .stop_o   (stop),
    .code_o   (code_o),
    .busy_o   (cnt_busy)
  );

  dmx u_dmx (
    .clk     (clk),
    .rst_n   (rst_n),
    .pulse_i (ring_pulse),
    .to_vm1_i(to_vm1_i),
    .to_vm2_i(to_vm2_i),
    .out1_o  (out1_o),
    .out2_o  (out2_o),
    .sel_o   (sel_o)
  );

  assign busy_o = running | cnt_busy;

  // The port may only change between bursts, or a burst would be split.
  a_switch_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                  (to_vm1_i || to_vm2_i) |-> !busy_o)
    else $error("DMX port switched during a burst");

endmodule
