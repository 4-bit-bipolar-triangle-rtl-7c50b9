// Binary counter of the code generator, with state skipping.
//
// A W-bit ripple counter of T flip-flops advances by one on each inc_i
// pulse. Whenever its top bit toggles, the top stage also feeds one extra
// pulse back into the lowest stage, so the counter jumps over the state in
// which the top bit has just changed and the lower bits are all zero. With
// W = 4 it therefore runs 1, 2, ... 7, 9, 10, ... 15, 1, ...: 14 states, and
// folding the lower bits with the top bit (done in the code generator)
// yields the triangle 1..7..0 without repeating the peak or the zero.
//
// wrap_o and skip_o are combinational with inc_i: wrap_o marks the step in
// which the top bit falls (15 -> 1), skip_o every step with an extra pulse.
// After reset the counter holds all ones, the state just before a wrap.
// The counter, its stages and the 14-step sequence follow the circuit;
// the feedback path is read from the block diagram and the reset value is
// this model's choice.
module bin_counter #(
  parameter int unsigned W = sfq_pkg::CNT_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc_i,   // count pulse
  output logic [W-1:0] cnt_o,
  output logic         wrap_o,  // top bit falls in this step
  output logic         skip_o   // top bit toggles in this step
);

  logic [W-1:0] cnt_q;
  logic [W-1:0] plus1;

  assign cnt_o  = cnt_q;
  assign plus1  = cnt_q + 1'b1;
  assign skip_o = inc_i && (plus1[W-1] != cnt_q[W-1]);
  assign wrap_o = skip_o && cnt_q[W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '1;
    end else if (inc_i) begin
      cnt_q <= skip_o ? plus1 + 1'b1 : plus1;
    end
  end

endmodule
