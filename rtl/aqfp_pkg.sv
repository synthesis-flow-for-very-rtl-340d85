// aqfp_pkg: types and constants shared by the AQFP cell models and circuits.
//
// An AQFP (adiabatic quantum-flux-parametron) gate is clocked by its ac
// excitation current: every gate is a Boolean function followed by a storage
// element that takes a new value once per excitation cycle, in the phase the
// gate is wired to. The synthesizable RTL of this design therefore uses one
// fast clock edge per excitation phase ("phase tick") and a one-hot strobe
// ex[NPHASE-1:0] telling which phase is being excited. A gate in logic level L
// is excited in phase (PHASE0 + L) mod NPHASE.
//
// The 4-phase scheme (two ac clocks plus a dc bias) is the default; the older
// 3-phase scheme is kept as a parameter value. The gate function list follows
// the cell library (buffer, NOT, constant, AND, OR, majority, NAND, NOR are
// buffer/AND/OR with inverted inputs or output). aqfp_sig_t is the two-state
// form of the multi-value encoding used by the event-driven timing model.
package aqfp_pkg;

  // Default number of excitation phases per ac cycle.
  localparam int unsigned NPHASE_DEFAULT = 4;

  // Boolean core of a cell; inversions are applied separately.
  typedef enum logic [2:0] {
    GF_BUF    = 3'd0,  // buffer (NOT = buffer with inverted input)
    GF_AND    = 3'd1,  // majority with a constant-0 third input
    GF_OR     = 3'd2,  // majority with a constant-1 third input
    GF_MAJ    = 3'd3,  // 3-input majority
    GF_CONST0 = 3'd4,  // buffer whose input is tied to ground
    GF_CONST1 = 3'd5   // buffer whose input is tied to the source
  } gate_func_e;

  // Two-state form of the multi-value encoding: on=0 is "no current"
  // (the 'z' state), on=1 carries a positive (val=1) or negative (val=0)
  // current.
  typedef struct packed {
    logic on;
    logic val;
  } aqfp_sig_t;

  // Kinds of timing violation reported by the timing-window model.
  typedef enum logic [1:0] {
    TV_NONE   = 2'd0,  // data arrived inside the window
    TV_EARLY  = 2'd1,  // excitation came too soon after the data
    TV_LATE   = 2'd2,  // excitation came too long after the data
    TV_NODATA = 2'd3   // excitation came with no input current present
  } timing_viol_e;

  // Latency in phases of ks_adder: generate/propagate level, log2(W) prefix
  // levels and the sum level.
  function automatic int unsigned ks_latency(int unsigned width);
    return $clog2(width) + 2;
  endfunction

  // Collatz ring: feedback control, parity/path select, processing units
  // (adder latency), termination check, then the feedback buffers. The
  // feedback chain is padded so that the ring length is a whole number of
  // ac cycles, which keeps every stage in its own phase.
  function automatic int unsigned cz_fb_depth(int unsigned width, int unsigned nphase,
                                              int unsigned fb_min);
    int unsigned core;
    core = 3 + ks_latency(width) + fb_min;
    return fb_min + ((nphase - (core % nphase)) % nphase);
  endfunction

endpackage
