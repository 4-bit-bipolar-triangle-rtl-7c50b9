// Prescaler of STAGES T flip-flops for low-speed observation.
//
// The T flip-flops form a ripple counter; the last one emits a pulse on
// every 2**STAGES-th input pulse (8 with the circuit's three stages). In
// the model the carry ripples through within the cycle, so the output
// pulse comes in the same cycle as the input pulse that completes the
// count. The three-stage structure follows the circuit; the reset state
// (all stages cleared) is this model's choice.
module prescaler #(
  parameter int unsigned STAGES = sfq_pkg::PRESCALE_STAGES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse_i,
  output logic pulse_o
);

  logic [STAGES-1:0] tff_q;

  assign pulse_o = pulse_i && (&tff_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tff_q <= '0;
    end else if (pulse_i) begin
      tff_q <= tff_q + 1'b1;
    end
  end

endmodule
