// Demultiplexer (DMX) of the variable-pulse number multiplier.
//
// Two NDRO cells, one per output port, hold which port is enabled. A
// select pulse to_vm1_i or to_vm2_i from the code generator enables that
// port and disables the other; the state persists until the next select
// pulse. Every input pulse leaves, in the same cycle, through the enabled
// port only. After reset VM1 is enabled.
//
// The two-port structure and its control by the select signal follow the
// circuit description; the reset state is this model's choice.
module dmx
  import sfq_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      pulse_i,    // pulse train from the ring oscillator
  input  logic      to_vm1_i,   // select pulse: route to VM1
  input  logic      to_vm2_i,   // select pulse: route to VM2
  output logic      out1_o,     // to VM1
  output logic      out2_o,     // to VM2
  output port_sel_e sel_o       // enabled port
);

  port_sel_e sel_q;

  assign sel_o  = sel_q;
  assign out1_o = pulse_i && (sel_q == SEL_VM1);
  assign out2_o = pulse_i && (sel_q == SEL_VM2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= SEL_VM1;
    end else if (to_vm1_i) begin
      sel_q <= SEL_VM1;
    end else if (to_vm2_i) begin
      sel_q <= SEL_VM2;
    end
  end

  a_one_select: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(to_vm1_i && to_vm2_i))
    else $error("both DMX ports selected at once");

endmodule
