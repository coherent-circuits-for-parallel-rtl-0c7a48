// tb_block_ram_sp: checks the single-port bank (8 words of 4 x 8 bits here)
// against a reference array: asynchronous read, write only with en_in and
// wen_in both high, and read-before-write when one address is read and
// written in the same cycle.
module tb_block_ram_sp;
  localparam int unsigned DEPTH = 8, P = 4, W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                en_in, wen_in;
  logic [2:0]          addr_in;
  logic [P-1:0][W-1:0] data_in, data_out;
  logic [P-1:0][W-1:0] ref_mem [DEPTH];

  block_ram_sp #(.DEPTH(DEPTH), .P(P), .W(W)) dut (
    .clk_in(clk), .en_in(en_in), .wen_in(wen_in), .addr_in(addr_in),
    .data_in(data_in), .data_out(data_out));

  initial begin
    // fill every word
    for (int a = 0; a < int'(DEPTH); a++) begin
      en_in = 1; wen_in = 1; addr_in = 3'(a); data_in = {$urandom};
      ref_mem[a] = data_in;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 400; i++) begin
      en_in = 1'($urandom); wen_in = 1'($urandom);
      addr_in = 3'($urandom); data_in = {$urandom};
      #1;
      checks++;
      if (data_out != ref_mem[addr_in]) begin
        failures++;
        $display("FAIL read addr %0d: got %h want %h", addr_in, data_out, ref_mem[addr_in]);
      end
      if (en_in && wen_in) ref_mem[addr_in] = data_in;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
