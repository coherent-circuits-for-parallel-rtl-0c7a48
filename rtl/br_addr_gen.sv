// br_addr_gen: control counter and address generator of the parallel
// bit-reversal circuit.
//
// The stream is cut into frames of N/P clock cycles (P samples per cycle, N
// samples per frame). A counter of log2(N/P)+1 bits counts the cycles of the
// stream; its low log2(N/P) bits are the cycle inside the frame and its MSB
// tells the two kinds of frame apart. Following the circuit description, the
// MSB steers the bank input multiplexers and decides whether the memory
// address is the natural or the bit-reversed group number:
//   cycle inside frame  = {c_hi, c_lo}, c_lo = log2(P) bits, c_hi = log2(N/P^2) bits
//   addr                = msb ? c_hi : bitrev(c_hi)
// All P banks use the same address, so a single address bus is given here.
//
// Interface and timing (own choices, the description names only clk_in,
// reset_in, start_in, the addresses and counter_r_msb): reset_in is
// synchronous and active high. The stream starts in the cycle where start_in
// is high; that cycle is cycle 0 of frame 0, and from then on one sample
// vector is taken every cycle without gaps until the next reset. `active` is
// high in every cycle that carries input. `out_valid` is high once a whole
// frame has been stored, i.e. from cycle N/P of the stream on, which gives
// the latency of N/P cycles. All outputs are combinational from the counter
// state, so they refer to the current cycle.
module br_addr_gen
  import br_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned P = 4
) (
  input  logic                              clk_in,
  input  logic                              reset_in,
  input  logic                              start_in,
  output logic                              active,
  output logic                              counter_r_msb,
  output logic [$clog2(P)-1:0]              c_lo,
  output logic [$clog2(N)-2*$clog2(P)-1:0]  addr_out,
  output logic                              out_valid,
  output logic                              out_first
);
  localparam int unsigned PB = $clog2(P);
  localparam int unsigned CB = $clog2(N) - PB;   // cycle-in-frame bits
  localparam int unsigned GB = CB - PB;          // group (address) bits

  logic          running;
  logic          primed;
  logic [CB:0]   cnt;
  logic [GB-1:0] c_hi;

  always_ff @(posedge clk_in) begin
    if (reset_in) begin
      running <= 1'b0;
      primed  <= 1'b0;
      cnt     <= '0;
    end else if (active) begin
      running <= 1'b1;
      cnt     <= cnt + 1'b1;
      if (&cnt[CB-1:0]) primed <= 1'b1;
    end
  end

  always_comb begin
    active        = running | start_in;
    counter_r_msb = cnt[CB];
    c_lo          = cnt[PB-1:0];
    c_hi          = cnt[CB-1:PB];
    addr_out      = counter_r_msb ? c_hi : GB'(bitrev(MAX_BITS'(c_hi), GB));
    out_valid     = primed & active;
    out_first     = out_valid & (cnt[CB-1:0] == '0);
  end

endmodule
