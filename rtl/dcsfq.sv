// DC/SFQ converter.
//
// Turns every rising edge of an external DC drive level into one SFQ pulse,
// a one-cycle strobe. The drive levels of the chip (V-PNM_IN and CG_IN) are
// asynchronous to the model's clock, so the level first passes through a
// SYNC_STAGES-deep synchroniser (at least 2); the pulse appears SYNC_STAGES + 1 cycles
// after the edge. A falling edge gives no pulse, as in the real converter,
// which only resets its storing loop on the falling half of the drive.
//
// Only the converter's role comes from the circuit description; the
// synchroniser and its depth are choices of this model.
module dcsfq #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic dc_i,     // external drive level
  output logic pulse_o   // one-cycle pulse per rising edge of dc_i
);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q  <= '0;
      last_q  <= 1'b0;
      pulse_o <= 1'b0;
    end else begin
      sync_q  <= {sync_q[SYNC_STAGES-2:0], dc_i};
      last_q  <= sync_q[SYNC_STAGES-1];
      pulse_o <= sync_q[SYNC_STAGES-1] & ~last_q;
    end
  end

endmodule
