// aqfp_clkgen: digitised multi-phase ac excitation for AQFP circuits.
//
// In 4-phase operation two ac clocks, 90 degrees apart, are combined with a
// dc bias. A gate whose bias line runs with the dc current is excited at the
// positive peak of its ac clock, one whose line runs against it at the
// negative peak, so the two ac lines give four excitation phases per cycle:
//   phase 0: ac1 positive peak, phase 1: ac2 negative peak,
//   phase 2: ac1 negative peak, phase 3: ac2 positive peak.
// With NPHASE = 3 the earlier scheme of three ac clocks 120 degrees apart is
// produced instead (phase k = positive peak of ac clock k).
//
// Interface: clk has one rising edge per excitation phase. ex is a one-hot
// strobe naming the phase excited at the next clk edge; every AQFP stage
// registers its data on the edge where its own ex bit is high. ac1/ac2 are
// the digitised sign of the two ac currents (4-phase mode; ac2 is the second
// clock of the 3-phase mode), and `phase` is the phase index. After rst_n
// the first excited phase is phase 0.
// The phase order and peak assignment follow the described clocking scheme;
// the digitisation to one tick per phase is this design's choice.
module aqfp_clkgen #(
  parameter int unsigned NPHASE = aqfp_pkg::NPHASE_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [NPHASE-1:0] ex,
  output logic [1:0]        phase,
  output logic              ac1,
  output logic              ac2
);
  initial begin
    assert (NPHASE == 3 || NPHASE == 4)
      else $error("aqfp_clkgen: NPHASE must be 3 or 4");
  end

  logic [1:0] ph_q;

  always_ff @(posedge clk) begin
    if (!rst_n)                          ph_q <= 2'd0;
    else if (ph_q == 2'(NPHASE - 1))     ph_q <= 2'd0;
    else                                 ph_q <= ph_q + 2'd1;
  end

  assign phase = ph_q;

  always_comb begin
    ex = '0;
    ex[ph_q] = 1'b1;
  end

  // Sign of the digitised ac currents at the current phase.
  always_comb begin
    if (NPHASE == 4) begin
      // ac1 = cos, ac2 = sin over the four quarter cycles.
      ac1 = (ph_q == 2'd0) || (ph_q == 2'd3);
      ac2 = (ph_q == 2'd2) || (ph_q == 2'd3);
    end else begin
      ac1 = (ph_q == 2'd0);
      ac2 = (ph_q == 2'd1);
    end
  end

  // Exactly one phase is excited at a time.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ex));
endmodule
