// rsfq_pkg: timing constants shared by the pulse-level model of the 8x8
// modulo-256 RSFQ multiplier.
//
// Every module of the model runs on one clock whose period is one 12.5-ps
// micro-step (80 GHz). An SFQ pulse is a 1 on a wire for one cycle; no pulse
// is a 0. A multiply operation occupies four micro-steps on each partial
// product line (the 50-ps, 20-GHz operation cycle of the document); the
// latencies below are those of this model, counted in micro-steps.
package rsfq_pkg;
  // Micro-steps per operation: four PP slots, 12.5 ps apart.
  localparam int unsigned SLOTS_PER_OP   = 4;
  // Partial product generator: PP slot 0 leaves one micro-step after rdy.
  localparam int unsigned PPG_LATENCY    = 1;
  // [4:2] compressor: four counting micro-steps plus two adding micro-steps.
  localparam int unsigned COMP_LATENCY   = 6;
  // 3-bit ripple-carry adder including the output alignment register.
  localparam int unsigned RCA_LATENCY    = 5;
  // Whole multiplier, rdy to product.
  localparam int unsigned MULT_LATENCY   = PPG_LATENCY + 2 * COMP_LATENCY + RCA_LATENCY;
endpackage
