// Code generator (CG).
//
// Produces the code l(t) that sets the V-PNM multiplication factor and the
// select signal that chooses the working voltage multiplier. Each CG_IN
// pulse is stored in a D flip-flop clocked by V-PNM_IN, so a code change
// happens only at a V-PNM_IN pulse (a "CG event"). A CG event advances the
// skipping binary counter; the code is its lower CODE_BITS bits XORed with
// its top bit, which turns the 14-state count into the triangle sequence
//   0 (after reset), 1, 2, 3, 4, 5, 6, 7, 6, 5, 4, 3, 2, 1, 0, 1, ...
// Each time the counter wraps, which is exactly when l goes from 0 to 1, a
// select T flip-flop toggles and a select pulse moves the output to the
// other voltage multiplier, so the two multipliers take turns carrying one
// whole unipolar triangle each.
//
// Timing: a CG event in cycle t (the V-PNM_IN pulse cycle) gives code_wr_o,
// the new code and any select pulse in cycle t+1, so the V-PNM pulse of
// cycle t still uses the old code. After reset l = 0 and VM1 is selected;
// the first CG event gives l = 1 on VM2. The counter, XOR folding, retiming
// DFF and select T flip-flop follow the circuit; reset values and the
// one-cycle timing are this model's.
module code_gen
#(
  parameter int unsigned CODE_BITS = sfq_pkg::CODE_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vpnm_in_i,  // V-PNM_IN pulse (clock of the retiming DFF)
  input  logic                 cg_in_i,    // CG_IN pulse
  output logic                 code_wr_o,  // code write strobe
  output logic [CODE_BITS-1:0] code_o,     // code l(t)
  output logic                 to_vm1_o,   // select pulse: VM1 works
  output logic                 to_vm2_o,   // select pulse: VM2 works
  output logic                 event_o,    // CG event (retimed CG_IN pulse)
  output logic                 skip_o      // counter skipped a state at this event
);

  localparam int unsigned W = CODE_BITS + 1;

  logic         pending_q;
  logic         evt;
  logic [W-1:0] cnt;
  logic         wrap;
  logic         skip;
  logic         evt_q;
  logic         toggled_q;
  sfq_pkg::port_sel_e    sel_q;

  // Retiming DFF: CG_IN is stored and released by the next V-PNM_IN pulse.
  assign evt     = vpnm_in_i && pending_q;
  assign event_o = evt;
  assign skip_o  = skip;

  bin_counter #(.W(W)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .inc_i (evt),
    .cnt_o (cnt),
    .wrap_o(wrap),
    .skip_o(skip)
  );

  // Fold: the XOR gates invert the lower bits while the top bit is set.
  assign code_o    = cnt[W-2:0] ^ {(W-1){cnt[W-1]}};
  assign code_wr_o = evt_q;
  assign to_vm1_o  = evt_q && toggled_q && (sel_q == sfq_pkg::SEL_VM1);
  assign to_vm2_o  = evt_q && toggled_q && (sel_q == sfq_pkg::SEL_VM2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q <= 1'b0;
      evt_q     <= 1'b0;
      toggled_q <= 1'b0;
      sel_q     <= sfq_pkg::SEL_VM1;
    end else begin
      pending_q <= cg_in_i || (pending_q && !vpnm_in_i);
      evt_q     <= evt;
      toggled_q <= wrap;
      if (wrap) sel_q <= (sel_q == sfq_pkg::SEL_VM1) ? sfq_pkg::SEL_VM2 : sfq_pkg::SEL_VM1;
    end
  end

endmodule
