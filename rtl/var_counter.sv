// Variable counter of the variable-pulse number multiplier, with the code
// register (the bit1..bit3 NDRO cells) in front of it.
//
// The code generator writes a CODE_BITS-wide code l with a one-cycle write
// strobe; the register keeps it until the next write. A start pulse
// (V-PNM_IN) loads the current code into a pulse counter; each ring
// oscillator pulse counts one down, and the pulse that brings it to zero
// also raises stop_o, so the ring oscillator emits exactly l pulses. For
// l = 0 stop_o is raised with the start pulse itself and nothing is emitted.
//
// The circuit builds this from three resettable T flip-flops preset by the
// code; the simplest equivalent, a loadable down counter, is used here.
// busy_o is high while pulses are still owed. A new start while busy would
// corrupt the train in the circuit; an assertion flags it.
module var_counter #(
  parameter int unsigned CODE_BITS = sfq_pkg::CODE_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 code_wr_i,  // write strobe from the code generator
  input  logic [CODE_BITS-1:0] code_i,     // new code l
  input  logic                 start_i,    // V-PNM_IN pulse
  input  logic                 pulse_i,    // ring oscillator pulse
  output logic                 stop_o,     // stops the ring oscillator
  output logic [CODE_BITS-1:0] code_o,     // code currently held
  output logic                 busy_o
);

  logic [CODE_BITS-1:0] code_q;
  logic [CODE_BITS-1:0] rem_q;

  assign code_o = code_q;
  assign busy_o = (rem_q != '0);
  assign stop_o = start_i ? (code_q == '0)
                          : (pulse_i && rem_q == CODE_BITS'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_q <= '0;
      rem_q  <= '0;
    end else begin
      if (code_wr_i) code_q <= code_i;
      if (start_i) begin
        rem_q <= code_q;
      end else if (pulse_i && rem_q != '0) begin
        rem_q <= rem_q - 1'b1;
      end
    end
  end

  // A train must be complete before the next V-PNM_IN pulse arrives.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 start_i |-> !busy_o)
    else $error("V-PNM_IN pulse while %0d pulses are still owed", rem_q);

endmodule
