// aqfp_top: the AQFP demonstration circuits side by side on one clock tree.
//
// A single multi-phase excitation generator (4-phase by default) drives
// three synchronous AQFP circuits, each placed with its first logic level in
// phase 0:
//   - collatz_proc: the pipelined 16-bit Collatz (3n+1) processor,
//   - decoder16:    the 4-to-16 decoder with enable (latency 5 phases),
//   - ks_adder:     the 8-bit Kogge-Stone adder with carry-in
//                   (latency 5 phases, 9-bit result).
// Beside them sits the timing-window model of one majority gate
// (aqfp_maj_timing) with its own ports and its own fine time-base clock
// tm_tclk; it checks the gate-level timing the phase-level circuits assume.
//
// Interface: clk has one rising edge per excitation phase; ex/phase show the
// excited phase, ac1/ac2 the digitised ac clocks. Inputs of the decoder and adder are captured on the edge
// where ex[0] is high. See each block for its handshake and timing.
module aqfp_top
  import aqfp_pkg::*;
#(
  parameter int unsigned NPHASE = NPHASE_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [NPHASE-1:0] ex,
  output logic [1:0]        phase,
  output logic              ac1,
  output logic              ac2,
  // Collatz processor
  input  logic              loop_en,
  input  logic              cz_in_valid,
  input  logic [15:0]       cz_in_n,
  output logic              cz_in_ready,
  output logic              cz_out_valid,
  output logic [15:0]       cz_out_n0,
  output logic [9:0]        cz_out_steps,
  output logic              cz_out_err,
  // 4-to-16 decoder
  input  logic [3:0]        dec_bin,
  input  logic              dec_en,
  output logic [15:0]       dec_out,
  // 8-bit Kogge-Stone adder
  input  logic [7:0]        ks_a,
  input  logic [7:0]        ks_b,
  input  logic              ks_cin,
  output logic [8:0]        ks_sum,
  // Timing model of one majority gate
  input  logic              tm_tclk,
  input  aqfp_sig_t         tm_a,
  input  aqfp_sig_t         tm_b,
  input  aqfp_sig_t         tm_c,
  input  logic              tm_xin,
  output aqfp_sig_t         tm_d,
  output logic              tm_xout,
  output logic              tm_err,
  output timing_viol_e      tm_viol
);
  aqfp_clkgen #(.NPHASE(NPHASE)) u_clk (
    .clk, .rst_n, .ex, .phase, .ac1, .ac2);

  collatz_proc #(.WIDTH(16), .STEP_W(10), .NPHASE(NPHASE), .FB_STAGES(3)) u_collatz (
    .clk, .rst_n, .ex, .loop_en,
    .in_valid(cz_in_valid), .in_n(cz_in_n), .in_ready(cz_in_ready),
    .out_valid(cz_out_valid), .out_n0(cz_out_n0), .out_steps(cz_out_steps), .out_err(cz_out_err));

  decoder16 #(.NPHASE(NPHASE), .PHASE0(0)) u_dec (
    .clk, .rst_n, .ex, .bin(dec_bin), .en(dec_en), .dec_out);

  ks_adder #(.WIDTH(8), .NPHASE(NPHASE), .PHASE0(0)) u_ks (
    .clk, .rst_n, .ex, .a(ks_a), .b(ks_b), .cin(ks_cin), .sum(ks_sum));

  aqfp_maj_timing u_tm (
    .tclk(tm_tclk), .rst_n, .a(tm_a), .b(tm_b), .c(tm_c), .xin(tm_xin),
    .d(tm_d), .xout(tm_xout), .err(tm_err), .viol(tm_viol));
endmodule
