// tb_br_addr_gen: checks the control counter and address generator at the
// main size (N=32, P=4, 1 address bit) and at N=256, P=4 (4 address bits,
// where the bit-reversed address differs from the natural one). A reference
// cycle count kept here gives the expected MSB, lane counter, address,
// valid and first flags after reset, during idle cycles, at the start pulse
// and over several frames.
module tb_br_addr_gen;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic reset_in, start_in;

  logic       a_act, a_msb, a_val, a_first;
  logic [1:0] a_lo;
  logic [0:0] a_addr;
  logic       b_act, b_msb, b_val, b_first;
  logic [1:0] b_lo;
  logic [3:0] b_addr;

  br_addr_gen #(.N(32), .P(4)) u_a (
    .clk_in(clk), .reset_in(reset_in), .start_in(start_in), .active(a_act),
    .counter_r_msb(a_msb), .c_lo(a_lo), .addr_out(a_addr), .out_valid(a_val), .out_first(a_first));
  br_addr_gen #(.N(256), .P(4)) u_b (
    .clk_in(clk), .reset_in(reset_in), .start_in(start_in), .active(b_act),
    .counter_r_msb(b_msb), .c_lo(b_lo), .addr_out(b_addr), .out_valid(b_val), .out_first(b_first));

  task automatic expect_eq(input int got, input int want, input string what, input int s);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s at stream cycle %0d: got %0d want %0d", what, s, got, want);
    end
  endtask

  // expected address: natural group in msb=1 frames, reversed in msb=0 frames
  function automatic int exp_addr(input int s, input int fc, input int gb);
    int g, r;
    g = (s % fc) / 4;
    r = 0;
    for (int k = 0; k < gb; k++) if (g & (1 << k)) r |= 1 << (gb - 1 - k);
    return ((s / fc) % 2 == 1) ? g : r;
  endfunction

  initial begin
    reset_in = 1'b1; start_in = 1'b0;
    repeat (2) @(posedge clk);
    #1 reset_in = 1'b0;
    repeat (3) begin
      expect_eq(a_act, 0, "idle active", -1);
      expect_eq(b_val, 0, "idle valid", -1);
      @(posedge clk); #1;
    end
    for (int s = 0; s < 200; s++) begin
      start_in = (s == 0);
      #1;
      expect_eq(a_act, 1, "active A", s);
      expect_eq(a_msb, (s / 8) % 2, "msb A", s);
      expect_eq(a_lo, s % 4, "c_lo A", s);
      expect_eq(a_addr, exp_addr(s, 8, 1), "addr A", s);
      expect_eq(a_val, s >= 8, "valid A", s);
      expect_eq(a_first, s >= 8 && s % 8 == 0, "first A", s);
      expect_eq(b_msb, (s / 64) % 2, "msb B", s);
      expect_eq(b_lo, s % 4, "c_lo B", s);
      expect_eq(b_addr, exp_addr(s, 64, 4), "addr B", s);
      expect_eq(b_val, s >= 64, "valid B", s);
      expect_eq(b_first, s >= 64 && s % 64 == 0, "first B", s);
      @(posedge clk); #1;
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
