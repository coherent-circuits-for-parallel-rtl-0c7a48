// tb_par_bitrev: end-to-end test of the parallel bit-reversal circuit in four
// sizes: the main one (N=32, P=4, 8-bit samples), a deeper one where the
// bit-reversed group address differs from the natural one (N=256, P=4), a
// wider one (N=128, P=8) and the narrowest (N=16, P=2). Each instance streams
// random frames through the circuit and checks every output sample and the
// N/P-cycle latency; see br_stream_check.
module tb_par_bitrev;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1, d2, d3;
  int   c0, c1, c2, c3, f0, f1, f2, f3;
  int   checks, failures;

  br_stream_check #(.N(32),  .P(4), .W(8),  .FRAMES(6)) u_main (.clk(clk), .done(d0), .checks(c0), .failures(f0));
  br_stream_check #(.N(256), .P(4), .W(12), .FRAMES(5)) u_deep (.clk(clk), .done(d1), .checks(c1), .failures(f1));
  br_stream_check #(.N(128), .P(8), .W(16), .FRAMES(5)) u_wide (.clk(clk), .done(d2), .checks(c2), .failures(f2));
  br_stream_check #(.N(16),  .P(2), .W(8),  .FRAMES(6)) u_narrow (.clk(clk), .done(d3), .checks(c3), .failures(f3));

  initial begin
    wait (d0 && d1 && d2 && d3);
    checks   = c0 + c1 + c2 + c3;
    failures = f0 + f1 + f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
