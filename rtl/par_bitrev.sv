// par_bitrev: parallel bit-reversal circuit for N > P^2.
//
// P samples arrive in every clock cycle; sample k of the frame (k = 0..N-1)
// arrives on lane k / (N/P) in cycle k mod (N/P) of its frame. The circuit
// puts out the same frame in bit-reversed order, P samples per cycle: output
// lane l in output cycle t carries sample bitrev_n(l*(N/P) + t), n = log2 N.
// Frames follow each other without gaps; the first output cycle of a frame is
// exactly N/P cycles after its first input cycle.
//
// Storage is P single-port banks of N/P^2 words, each word P samples wide:
// N samples in all, one frame. Each bank is read and rewritten at the same
// address in every cycle, so a new frame moves into the places the old frame
// leaves. That forces the layout to alternate between two forms, told apart
// by the counter MSB:
//   msb = 0 frames read one sample from each bank (all banks at one address)
//     and write one new sample into each bank, in the lane just read;
//   msb = 1 frames read one whole word from one bank and write the whole new
//     input vector into it.
// The group address is natural in msb = 1 frames and bit-reversed in msb = 0
// frames. The banks, the per-bank input multiplexers choosing between input
// and internal signals under the counter MSB, the counter-based address
// generator, the N/P latency and the memory of N samples follow the circuit
// description; the exact lane and bank assignment, the output selection and
// the start/valid handshake are this design's own.
//
// Interface: reset_in is synchronous, active high. Raise start_in for one
// cycle together with the first input vector; the circuit then takes x_in
// every cycle. valid_out marks cycles whose y_out belongs to a complete frame
// (from N/P cycles after start on), first_out the first cycle of each output
// frame. y_out is combinational from the bank read ports.
module par_bitrev #(
  parameter int unsigned N = 32,
  parameter int unsigned P = 4,
  parameter int unsigned W = 8
) (
  input  logic                 clk_in,
  input  logic                 reset_in,
  input  logic                 start_in,
  input  logic [P-1:0][W-1:0]  x_in,
  output logic [P-1:0][W-1:0]  y_out,
  output logic                 valid_out,
  output logic                 first_out
);
  localparam int unsigned PB    = $clog2(P);
  localparam int unsigned GB    = $clog2(N) - 2 * PB;
  localparam int unsigned DEPTH = N / (P * P);

  initial begin
    assert (P >= 2 && (1 << PB) == P) else $error("P must be a power of two >= 2");
    assert ((1 << $clog2(N)) == N && N > P * P) else $error("N must be a power of two above P^2");
  end

  logic                 active;
  logic                 msb;
  logic [PB-1:0]        c_lo;
  logic [GB-1:0]        addr;
  logic [P-1:0][W-1:0]  rd [P];
  logic [P-1:0][W-1:0]  wr [P];
  logic [P-1:0]         wen;

  br_addr_gen #(.N(N), .P(P)) u_addr_gen (
    .clk_in        (clk_in),
    .reset_in      (reset_in),
    .start_in      (start_in),
    .active        (active),
    .counter_r_msb (msb),
    .c_lo          (c_lo),
    .addr_out      (addr),
    .out_valid     (valid_out),
    .out_first     (first_out)
  );

  for (genvar b = 0; b < P; b++) begin : g_bank
    br_bank_in_mux #(.P(P), .W(W), .BANK(b)) u_in_mux (
      .msb     (msb),
      .c_lo    (c_lo),
      .x_in    (x_in),
      .rd_word (rd[b]),
      .wr_word (wr[b]),
      .wen     (wen[b])
    );

    block_ram_sp #(.DEPTH(DEPTH), .P(P), .W(W)) u_bram (
      .clk_in   (clk_in),
      .en_in    (active),
      .wen_in   (wen[b]),
      .addr_in  (addr),
      .data_in  (wr[b]),
      .data_out (rd[b])
    );
  end

  // in msb = 1 frames exactly one bank takes the input vector per cycle
  a_one_bank_per_cycle: assert property (
    @(posedge clk_in) disable iff (reset_in) (active && msb) |-> $onehot(wen))
    else $error("msb=1 cycle must write exactly one bank");

  br_out_sel #(.P(P), .W(W)) u_out_sel (
    .msb   (msb),
    .c_lo  (c_lo),
    .rd    (rd),
    .y_out (y_out)
  );

endmodule
