// br_bank_in_mux: write-data multiplexer in front of one memory bank.
//
// Every cycle each bank is read and rewritten at one address. What is
// written depends on the counter MSB, as in the circuit description
// ("when the MSB bit is 1 the input data is given to the memory and when MSB
// is 0 data from internal signals is given to the memory"):
//   msb = 1: the bank numbered P-1-c_lo takes the whole input vector
//            (x_in[i] into lane i); the other banks keep their word.
//   msb = 0: every bank takes one input sample, x_in[P-1-bitrev(BANK)], into
//            lane bitrev(c_lo) of the word it has just read, and writes the
//            rest of that word back unchanged (the internal signals).
// In an msb=0 frame the lane that gets the new sample is the one the output
// has just taken from this bank, so no stored sample is lost; in an msb=1
// frame the whole word of the one bank being read is replaced. Which lanes and
// banks are chosen is this design's own arrangement, worked out so that the
// frame stored in one kind of frame is exactly what the other kind reads.
// Purely combinational; BANK is the bank's number (0..P-1).
module br_bank_in_mux
  import br_pkg::*;
#(
  parameter int unsigned P    = 4,
  parameter int unsigned W    = 8,
  parameter int unsigned BANK = 0
) (
  input  logic                    msb,
  input  logic [$clog2(P)-1:0]    c_lo,
  input  logic [P-1:0][W-1:0]     x_in,
  input  logic [P-1:0][W-1:0]     rd_word,
  output logic [P-1:0][W-1:0]     wr_word,
  output logic                    wen
);
  localparam int unsigned PB = $clog2(P);
  localparam logic [PB-1:0] BANK_ID = PB'(BANK);
  // input lane fed to this bank in msb=0 frames: complement of bitrev(BANK)
  localparam logic [PB-1:0] SRC_LANE = ~PB'(bitrev(MAX_BITS'(BANK), PB));

  logic [PB-1:0] ins_lane;

  always_comb begin
    ins_lane = PB'(bitrev(MAX_BITS'(c_lo), PB));
    if (msb) begin
      wen     = (BANK_ID == ~c_lo);
      wr_word = x_in;
    end else begin
      wen     = 1'b1;
      wr_word = rd_word;
      wr_word[ins_lane] = x_in[SRC_LANE];
    end
  end

endmodule
