// tb_br_out_sel: checks the output selection of the main size (P=4, 8-bit
// samples) for every MSB and lane-counter value with random bank words.
// msb=0: output l must be lane bitrev(c_lo) of bank 3-bitrev(l), which puts
// outputs 1..4 (l = 0..3) on banks 3, 1, 2, 0. msb=1: the outputs must be the
// whole word of bank 3-c_lo.
module tb_br_out_sel;
  localparam int unsigned P = 4, W = 8;

  int checks = 0, failures = 0;

  logic                msb;
  logic [1:0]          c_lo;
  logic [P-1:0][W-1:0] rd [P];
  logic [P-1:0][W-1:0] y_out;

  br_out_sel #(.P(P), .W(W)) dut (.msb(msb), .c_lo(c_lo), .rd(rd), .y_out(y_out));

  localparam int BANK_OF_OUT [4] = '{3, 1, 2, 0};
  localparam int REV2 [4]        = '{0, 2, 1, 3};

  initial begin
    logic [W-1:0] want;
    for (int rep = 0; rep < 50; rep++) begin
      for (int m = 0; m < 2; m++) begin
        for (int c = 0; c < 4; c++) begin
          msb = 1'(m); c_lo = 2'(c);
          for (int b = 0; b < 4; b++) rd[b] = {$urandom};
          #1;
          for (int l = 0; l < 4; l++) begin
            want = (m == 0) ? rd[BANK_OF_OUT[l]][REV2[c]] : rd[3 - c][l];
            checks++;
            if (y_out[l] != want) begin
              failures++;
              $display("FAIL msb=%0d c_lo=%0d out %0d: got %h want %h", m, c, l, y_out[l], want);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
