// decoder16: 4-to-16 decoder with enable, as a netlist of AQFP cells.
//
// Function: dec_out = en ? (1 << bin) : 0.
// The netlist is what a mapped and post-processed AQFP netlist looks like:
// every net with more than one load goes through a splitter, inverted inputs
// are folded into the AND gates (no separate inverters), and buffers are
// inserted so that every gate's inputs come from the same logic level.
//   level 0: 1-to-4 splitters on bin[3:0]; buffer on en
//   level 1: 2-to-4 predecoders lo = dec(bin[1:0]), hi = dec(bin[3:2])
//            (AND gates with inverted inputs); 1-to-4 splitter on en
//   level 2: he[k] = hi[k] & en; buffers on lo[j]
//   level 3: 1-to-4 splitters on he[k] and on lo[j]
//   level 4: out[4k+j] = he[k] & lo[j]
// Level L is excited in phase (PHASE0 + L) mod NPHASE.
//
// Interface: bin and en are captured on the clk edge where ex[PHASE0] is
// high; dec_out is valid LATENCY = 5 phases later and holds one ac cycle.
// One new input per ac cycle. rst_n clears all cells.
// The function and the cell types follow the described decoder and cell
// library; the particular predecode netlist is this design's choice.
module decoder16
  import aqfp_pkg::*;
#(
  parameter int unsigned NPHASE = NPHASE_DEFAULT,
  parameter int unsigned PHASE0 = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic [3:0]        bin,
  input  logic              en,
  output logic [15:0]       dec_out
);
  localparam int unsigned LATENCY = 5;

  logic [3:0] bin_s [4];     // level 0 splitter outputs, bin_s[bit][copy]
  logic       en_b;          // level 0
  logic [3:0] en_s;          // level 1
  logic [3:0] lo, hi;        // level 1
  logic [3:0] he, lo_b;      // level 2
  logic [3:0] he_s [4];      // level 3, he_s[k][j]
  logic [3:0] lo_s [4];      // level 3, lo_s[j][k]

  // Level 0.
  for (genvar i = 0; i < 4; i++) begin : g_l0
    aqfp_splitter #(.NPHASE(NPHASE), .PHASE(PHASE0), .FANOUT(4)) u_sp (
      .clk, .rst_n, .ex, .a(bin[i]), .y(bin_s[i]));
  end
  aqfp_gate #(.NPHASE(NPHASE), .PHASE(PHASE0), .FUNC(GF_BUF)) u_en_b (
    .clk, .rst_n, .ex, .a(en), .b(1'b0), .c(1'b0), .y(en_b));

  // Level 1: predecoders, inversion of a literal where the code bit is 0.
  for (genvar j = 0; j < 4; j++) begin : g_l1
    localparam logic [2:0] INVJ = {1'b0, ~j[1], ~j[0]};
    aqfp_gate #(.NPHASE(NPHASE), .PHASE(PHASE0 + 1), .FUNC(GF_AND), .INV(INVJ)) u_lo (
      .clk, .rst_n, .ex, .a(bin_s[0][j]), .b(bin_s[1][j]), .c(1'b0), .y(lo[j]));
    aqfp_gate #(.NPHASE(NPHASE), .PHASE(PHASE0 + 1), .FUNC(GF_AND), .INV(INVJ)) u_hi (
      .clk, .rst_n, .ex, .a(bin_s[2][j]), .b(bin_s[3][j]), .c(1'b0), .y(hi[j]));
  end
  aqfp_splitter #(.NPHASE(NPHASE), .PHASE(PHASE0 + 1), .FANOUT(4)) u_en_s (
    .clk, .rst_n, .ex, .a(en_b), .y(en_s));

  // Level 2.
  for (genvar k = 0; k < 4; k++) begin : g_l2
    aqfp_gate #(.NPHASE(NPHASE), .PHASE(PHASE0 + 2), .FUNC(GF_AND)) u_he (
      .clk, .rst_n, .ex, .a(hi[k]), .b(en_s[k]), .c(1'b0), .y(he[k]));
    aqfp_gate #(.NPHASE(NPHASE), .PHASE(PHASE0 + 2), .FUNC(GF_BUF)) u_lob (
      .clk, .rst_n, .ex, .a(lo[k]), .b(1'b0), .c(1'b0), .y(lo_b[k]));
  end

  // Level 3.
  for (genvar k = 0; k < 4; k++) begin : g_l3
    aqfp_splitter #(.NPHASE(NPHASE), .PHASE(PHASE0 + 3), .FANOUT(4)) u_hes (
      .clk, .rst_n, .ex, .a(he[k]), .y(he_s[k]));
    aqfp_splitter #(.NPHASE(NPHASE), .PHASE(PHASE0 + 3), .FANOUT(4)) u_los (
      .clk, .rst_n, .ex, .a(lo_b[k]), .y(lo_s[k]));
  end

  // Level 4.
  for (genvar k = 0; k < 4; k++) begin : g_l4k
    for (genvar j = 0; j < 4; j++) begin : g_l4j
      aqfp_gate #(.NPHASE(NPHASE), .PHASE(PHASE0 + LATENCY - 1), .FUNC(GF_AND)) u_out (
        .clk, .rst_n, .ex, .a(he_s[k][j]), .b(lo_s[j][k]), .c(1'b0), .y(dec_out[4*k + j]));
    end
  end
endmodule
