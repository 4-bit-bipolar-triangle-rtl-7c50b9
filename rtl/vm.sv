// Behavioural model of a voltage multiplier (a double-flux-quantum amplifier
// with a fixed multiplication factor N).
//
// The real part is an analog Josephson-junction stack: for every input SFQ
// pulse it passes N flux quanta, so its mean output voltage is
// V = PHI0 * f * N for an input rate f. The model keeps the running number
// of flux quanta that have passed (the time integral of the output voltage
// in units of the flux quantum PHI0): it adds N in the cycle after each
// input pulse. The difference of two such counts over a window, divided by
// the window length, is the differential voltage in units of PHI0 per cycle.
// N = 5 is the circuit's value; the counter width is this model's choice
// and the count wraps modulo 2**PHASE_W.
module vm #(
  parameter int unsigned N       = sfq_pkg::VM_FACTOR,
  parameter int unsigned PHASE_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pulse_i,   // SFQ pulse from the V-PNM
  output logic [PHASE_W-1:0] quanta_o   // flux quanta passed so far
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quanta_o <= '0;
    end else if (pulse_i) begin
      quanta_o <= quanta_o + PHASE_W'(N);
    end
  end

endmodule
