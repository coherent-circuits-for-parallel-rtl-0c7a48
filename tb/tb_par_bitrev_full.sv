// tb_par_bitrev_full: the circuit at its default size (N=32 samples per frame,
// P=4 lanes, 8-bit samples) taken through complete operations: start, three
// back-to-back frames of random samples and one flush frame. Each output
// sample is compared with the bit-reversed input frame, and the first output
// must come exactly N/P = 8 cycles after the first input.
module tb_par_bitrev_full;
  import br_pkg::*;

  localparam int unsigned N  = 32;
  localparam int unsigned P  = 4;
  localparam int unsigned W  = 8;
  localparam int unsigned FC = N / P;
  localparam int unsigned NF = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                reset_in, start_in;
  logic [P-1:0][W-1:0] x_in, y_out;
  logic                valid_out, first_out;
  int                  checks = 0, failures = 0;
  int                  first_valid_cycle = -1;
  logic [W-1:0]        frames [NF+1][N];

  par_bitrev dut (
    .clk_in(clk), .reset_in(reset_in), .start_in(start_in), .x_in(x_in),
    .y_out(y_out), .valid_out(valid_out), .first_out(first_out)
  );

  initial begin
    int idx;
    reset_in = 1'b1; start_in = 1'b0; x_in = '0;
    foreach (frames[f, k]) frames[f][k] = W'($urandom);
    repeat (2) @(posedge clk);
    #1 reset_in = 1'b0;
    for (int s = 0; s < int'((NF + 1) * FC); s++) begin
      for (int l = 0; l < int'(P); l++) x_in[l] = frames[s / FC][l * FC + s % FC];
      start_in = (s == 0);
      #1;
      if (valid_out && first_valid_cycle < 0) first_valid_cycle = s;
      if (s >= int'(FC)) begin
        checks++;
        if (!valid_out) failures++;
        for (int l = 0; l < int'(P); l++) begin
          idx = int'(bitrev(MAX_BITS'(l * FC + s % FC), $clog2(N)));
          checks++;
          if (y_out[l] != frames[s / FC - 1][idx]) begin
            failures++;
            $display("FAIL cycle %0d lane %0d: got %0h want %0h", s, l, y_out[l],
                     frames[s / FC - 1][idx]);
          end
        end
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (first_valid_cycle != int'(FC)) begin
      failures++;
      $display("FAIL latency: first output in cycle %0d, expected %0d", first_valid_cycle, FC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
