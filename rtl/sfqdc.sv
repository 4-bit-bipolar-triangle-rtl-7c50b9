// SFQ/DC converter.
//
// Each input pulse toggles the output level, so that a pulse train becomes
// a square wave that room-temperature equipment can observe; the number of
// output transitions equals the number of pulses. The level changes in the
// cycle after the pulse and is low after reset (this model's choice).
module sfqdc (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse_i,
  output logic dc_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc_o <= 1'b0;
    end else if (pulse_i) begin
      dc_o <= ~dc_o;
    end
  end

endmodule
