// Shared constants and types of the 4-bit bipolar triangle waveform generator.
//
// The generator is modelled cycle by cycle: one cycle of the system clock
// stands for one period of the on-chip ring oscillator (designed for about
// 10.1 GHz), and a single-flux-quantum (SFQ) pulse is a signal that is high
// for exactly one cycle. DC levels (the external drive signals and the
// low-speed monitor outputs) are ordinary levels.
//
// The numbers here are those of the published circuit: a 4-bit code
// generator counter driving a 3-bit variable-pulse number multiplier, two
// 5-fold voltage multipliers and 3-stage T flip-flop prescalers.
package sfq_pkg;

  // Bits of the digital code that sets the multiplication factor l(t).
  localparam int unsigned CODE_BITS = 3;
  // Bits of the code generator's binary counter (code bits plus the fold bit).
  localparam int unsigned CNT_BITS = CODE_BITS + 1;
  // Fixed multiplication factor N of each voltage multiplier.
  localparam int unsigned VM_FACTOR = 5;
  // T flip-flops in each low-speed prescaler (divide by 2**3 = 8).
  localparam int unsigned PRESCALE_STAGES = 3;
  // Ring oscillator period in system clock cycles.
  localparam int unsigned RING_PERIOD = 1;

  // Output port of the demultiplexer, i.e. which voltage multiplier is working.
  typedef enum logic {
    SEL_VM1 = 1'b0,
    SEL_VM2 = 1'b1
  } port_sel_e;

endpackage
