// br_out_sel: output selection of the parallel bit-reversal circuit.
//
// Picks the P output samples of the current cycle from the P words the banks
// have just read (rd[b] is the word of bank b):
//   msb = 0: y_out[l] = rd[P-1-bitrev(l)][bitrev(c_lo)]  (one sample per bank)
//   msb = 1: y_out[l] = rd[P-1-c_lo][l]                  (one whole word)
// For P = 4 and msb = 0 this ties output 1 to bank 3, output 2 to bank 1,
// output 3 to bank 2 and output 4 to bank 0, the pairing shown in the
// schematic of the design. The msb = 1 selection is this design's own: it
// reads the layout that the bank input multiplexers store in msb = 0 frames.
// Purely combinational.
module br_out_sel
  import br_pkg::*;
#(
  parameter int unsigned P = 4,
  parameter int unsigned W = 8
) (
  input  logic                    msb,
  input  logic [$clog2(P)-1:0]    c_lo,
  input  logic [P-1:0][W-1:0]     rd [P],
  output logic [P-1:0][W-1:0]     y_out
);
  localparam int unsigned PB = $clog2(P);

  logic [PB-1:0] lane_sel;
  logic [PB-1:0] bank_sel;

  always_comb begin
    lane_sel = PB'(bitrev(MAX_BITS'(c_lo), PB));
    bank_sel = ~c_lo;
    for (int unsigned l = 0; l < P; l++) begin
      if (msb) y_out[l] = rd[bank_sel][l];
      else     y_out[l] = rd[~PB'(bitrev(MAX_BITS'(l), PB))][lane_sel];
    end
  end

endmodule
