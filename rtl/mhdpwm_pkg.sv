// Shared sizes of the modified hybrid DPWM (MHDPWM) and its triple-modular
// redundant wrapper.
//
// The 10-bit duty word is split into two 5-bit fields: the upper field drives
// the counter-based part (one PWM period is 2^NC clock cycles) and the lower
// field drives the delay-line part (a ring of 2^ND flip-flops). The 5 + 5 split
// follows the published design; which field is upper is this design's choice.
package mhdpwm_pkg;
  localparam int unsigned NC_DEFAULT = 5;  // counter-part resolution, bits
  localparam int unsigned ND_DEFAULT = 5;  // delay-line-part resolution, bits
  localparam int unsigned TMR_WAYS   = 3;  // number of redundant generators
endpackage
