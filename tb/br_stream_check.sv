// br_stream_check: stimulus and checker for one par_bitrev instance.
//
// Runs the circuit through two streams: reset, some idle cycles, a start
// pulse and FRAMES frames of random samples, then a reset in the middle of a
// frame of a second stream and a fresh start. Every output cycle is compared
// with the bit-reversed frame computed here from the stored input samples:
// output lane l in output cycle t of frame f must hold sample
// bitrev(l*(N/P)+t) of input frame f, appearing exactly N/P cycles after the
// frame's first input. valid_out and first_out are checked every cycle.
// It also counts how often each mechanism of the circuit was used (frames
// read in each layout, bit-reversed addresses that differ from the natural
// ones, restarts after reset) and counts a failure for any that never
// happened (the address one only where the group address has 2 bits or more).
module br_stream_check
  import br_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned P      = 4,
  parameter int unsigned W      = 8,
  parameter int unsigned FRAMES = 6
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NB = $clog2(N);
  localparam int unsigned PB = $clog2(P);
  localparam int unsigned GB = NB - 2 * PB;
  localparam int unsigned FC = N / P;   // cycles per frame

  logic                reset_in, start_in;
  logic [P-1:0][W-1:0] x_in, y_out;
  logic                valid_out, first_out;

  par_bitrev #(.N(N), .P(P), .W(W)) dut (
    .clk_in(clk), .reset_in(reset_in), .start_in(start_in), .x_in(x_in),
    .y_out(y_out), .valid_out(valid_out), .first_out(first_out)
  );

  logic [W-1:0] frame_mem [FRAMES+1][N];
  int  n_read_msb0, n_read_msb1, n_rev_addr, n_restart, n_in_word, n_feedback;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d P=%0d: %s", N, P, what);
    end
  endtask

  // one stream of `frames` frames (plus one frame of flush input); when
  // cut_at > 0 the stream is reset after cut_at cycles instead
  task automatic run_stream(input int frames, input int cut_at);
    int total, s, f, t, k, fo, to, idx;
    total = (frames + 1) * FC;
    for (s = 0; s < total; s++) begin
      f = s / FC;
      t = s % FC;
      for (int l = 0; l < int'(P); l++) begin
        k = l * FC + t;
        if (f <= frames) frame_mem[f][k] = W'($urandom);
        x_in[l] = frame_mem[f][k];
      end
      start_in = (s == 0);
      #1;
      // outputs of this cycle
      check(valid_out == (s >= int'(FC)), $sformatf("valid_out at cycle %0d", s));
      check(first_out == (s >= int'(FC) && t == 0), $sformatf("first_out at cycle %0d", s));
      if (s >= int'(FC)) begin
        fo = f - 1;
        to = t;
        for (int l = 0; l < int'(P); l++) begin
          idx = int'(bitrev(MAX_BITS'(l * FC + to), NB));
          check(y_out[l] == frame_mem[fo][idx],
                $sformatf("frame %0d cycle %0d lane %0d: got %0h want %0h",
                          fo, to, l, y_out[l], frame_mem[fo][idx]));
        end
        if (t == 0 && dut.msb == 1'b0) n_read_msb0++;
        if (t == 0 && dut.msb == 1'b1) n_read_msb1++;
      end
      if (dut.msb == 1'b1 && dut.wen[~dut.c_lo]) n_in_word++;
      if (dut.msb == 1'b0 && dut.wen[0]) n_feedback++;
      if (GB >= 2 && dut.addr != dut.u_addr_gen.c_hi) n_rev_addr++;
      @(posedge clk);
      #1;
      if (cut_at > 0 && s + 1 == cut_at) begin
        reset_in = 1'b1;
        start_in = 1'b0;
        @(posedge clk);
        #1;
        reset_in = 1'b0;
        check(valid_out == 1'b0, "valid_out after reset");
        return;
      end
    end
    start_in = 1'b0;
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    n_read_msb0 = 0; n_read_msb1 = 0; n_rev_addr = 0; n_restart = 0;
    n_in_word = 0; n_feedback = 0;
    reset_in = 1; start_in = 0; x_in = '0;
    repeat (3) @(posedge clk);
    #1 reset_in = 0;
    repeat (2) @(posedge clk);
    #1;
    check(valid_out == 1'b0, "valid_out while idle");
    // first stream, cut by a reset in the middle of its third frame
    run_stream(FRAMES, 2 * FC + FC / 2 + 1);
    n_restart++;
    repeat (4) @(posedge clk);
    #1;
    check(valid_out == 1'b0, "valid_out idle after reset");
    // second stream, run to the end
    run_stream(FRAMES, 0);
    $display("N=%0d P=%0d: frames read msb0=%0d msb1=%0d, whole-word writes=%0d, feedback writes=%0d, reversed addresses=%0d, restarts=%0d",
             N, P, n_read_msb0, n_read_msb1, n_in_word, n_feedback, n_rev_addr, n_restart);
    check(n_read_msb0 > 0, "no frame read in the msb=0 layout");
    check(n_read_msb1 > 0, "no frame read in the msb=1 layout");
    check(n_in_word > 0, "no whole-word input write");
    check(n_feedback > 0, "no feedback write");
    check(n_restart > 0, "no restart after reset");
    if (GB >= 2) check(n_rev_addr > 0, "no bit-reversed address differing from natural");
    done = 1;
  end

endmodule
