// block_ram_sp: single-port memory bank of the parallel bit-reversal circuit.
//
// DEPTH words of P samples of W bits each. There is one address for reading
// and writing. The read is asynchronous (distributed-RAM style), so the word
// at `addr_in` appears on `data_out` in the same cycle, and a write with
// en_in and wen_in high stores `data_in` at that address on the rising clock
// edge. Reading and writing one address in one cycle therefore returns the
// old word and replaces it: the read-before-write behaviour the circuit
// relies on. The contents are not reset; the circuit never shows a word
// before it has written it.
//
// The port names follow the schematic of the design; the asynchronous read is
// this design's own choice, made so that a bank can be read and rewritten in
// the same cycle without adding latency.
module block_ram_sp #(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned P     = 4,
  parameter int unsigned W     = 8
) (
  input  logic                          clk_in,
  input  logic                          en_in,
  input  logic                          wen_in,
  input  logic [$clog2(DEPTH)-1:0]      addr_in,
  input  logic [P-1:0][W-1:0]           data_in,
  output logic [P-1:0][W-1:0]           data_out
);
  logic [P-1:0][W-1:0] mem [DEPTH];

  always_ff @(posedge clk_in) begin
    if (en_in && wen_in) mem[addr_in] <= data_in;
  end

  assign data_out = mem[addr_in];

endmodule
