// aqfp_splitter: AQFP fanout cell (buffer followed by a 1-to-N branch).
//
// An AQFP gate can drive only one receiving gate, so every net with several
// loads gets a splitter: one buffer whose output current is divided over a
// 1-2, 1-3 or 1-4 branch. Like every AQFP cell it is clocked: the input is
// captured on the clk edge where ex[PHASE] is high and appears on all FANOUT
// outputs one phase later. rst_n clears the outputs.
// Fanout 2..4 follows the cell library; the register form is this design's
// RT-level abstraction.
module aqfp_splitter #(
  parameter int unsigned NPHASE = aqfp_pkg::NPHASE_DEFAULT,
  parameter int unsigned PHASE  = 0,
  parameter int unsigned FANOUT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic              a,
  output logic [FANOUT-1:0] y
);
  initial begin
    assert (FANOUT >= 2 && FANOUT <= 4)
      else $error("aqfp_splitter: FANOUT must be 2, 3 or 4");
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                    y <= '0;
    else if (ex[PHASE % NPHASE])   y <= {FANOUT{a}};
  end
endmodule
