// Ring oscillator of the variable-pulse number multiplier.
//
// A start pulse sets the oscillator running; while it runs it emits one
// pulse every PERIOD cycles, the first one in the cycle after the start. A
// stop pulse, given by the variable counter in the same cycle as the last
// wanted pulse, halts it so that no further pulse follows. A start and a
// stop in the same cycle (a zero code) leave it idle. In the circuit the
// loop is closed through an NDRO cell that the counter resets; here that
// cell is the running flag.
//
// The start/stop behaviour follows the circuit description; PERIOD = 1, one
// oscillation per model clock cycle, is the model's time base.
module ring_osc #(
  parameter int unsigned PERIOD = sfq_pkg::RING_PERIOD
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,    // pulse from V-PNM_IN
  input  logic stop_i,     // pulse from the variable counter
  output logic pulse_o,    // oscillation pulses
  output logic running_o
);

  localparam int unsigned PW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic          running_q;
  logic [PW-1:0] phase_q;

  assign pulse_o   = running_q && (phase_q == '0);
  assign running_o = running_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q <= 1'b0;
      phase_q   <= '0;
    end else begin
      if (start_i) begin
        running_q <= ~stop_i;
        phase_q   <= '0;
      end else begin
        if (stop_i) running_q <= 1'b0;
        if (running_q) begin
          phase_q <= (phase_q == PW'(PERIOD - 1)) ? '0 : phase_q + 1'b1;
        end
      end
    end
  end

endmodule
