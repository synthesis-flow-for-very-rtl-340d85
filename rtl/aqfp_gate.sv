// aqfp_gate: one clocked AQFP logic cell.
//
// Every AQFP cell is built from buffers merged by a branch, so its logic is a
// (weighted) majority of its inputs, and it holds its result from one
// excitation to the next like a latch. This module is that cell at the RT
// level: a Boolean core selected by FUNC (buffer, AND, OR, 3-input majority,
// constant 0/1), free inversion of any input (INV, the "_bi"/"_bb" cells that
// negate a coupling transformer) and of the output (OUT_INV: NOT, NAND, NOR),
// followed by a register that loads on the clk edge where ex[PHASE] is high.
//
// Interface: a, b, c are the inputs (b and c unused by some functions),
// y is the output, valid from the tick after the gate's phase until the gate
// is excited again one ac cycle later. rst_n clears the output (the dc-bias
// initialisation of the cell models). Latency: one phase.
// The function set and the free inversions follow the cell library; the
// register-with-phase-enable form is this design's RT-level abstraction.
module aqfp_gate
  import aqfp_pkg::*;
#(
  parameter int unsigned NPHASE  = NPHASE_DEFAULT,
  parameter int unsigned PHASE   = 0,
  parameter gate_func_e  FUNC    = GF_BUF,
  parameter logic [2:0]  INV     = 3'b000,
  parameter bit          OUT_INV = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic              a,
  input  logic              b,
  input  logic              c,
  output logic              y
);
  logic ai, bi, ci, f;

  assign ai = a ^ INV[0];
  assign bi = b ^ INV[1];
  assign ci = c ^ INV[2];

  always_comb begin
    unique case (FUNC)
      GF_BUF:    f = ai;
      GF_AND:    f = ai & bi;
      GF_OR:     f = ai | bi;
      GF_MAJ:    f = (ai & bi) | (bi & ci) | (ai & ci);
      GF_CONST0: f = 1'b0;
      GF_CONST1: f = 1'b1;
      default:   f = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                    y <= 1'b0;
    else if (ex[PHASE % NPHASE])   y <= f ^ OUT_INV;
  end
endmodule
