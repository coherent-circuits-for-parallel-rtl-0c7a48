// tb_br_bank_in_mux: checks the write-data multiplexers of all four banks of
// the main size (P=4, 8-bit samples) for every MSB and lane-counter value with
// random input and read words. Expected behaviour: with msb=1 exactly the bank
// numbered 3-c_lo is written, with the input vector; with msb=0 every bank is
// written with its read word in which lane bitrev(c_lo) is replaced by input
// lane 3-bitrev(bank). It also checks that in an msb=0 cycle the four banks
// take the four input lanes, each exactly once.
module tb_br_bank_in_mux;
  localparam int unsigned P = 4, W = 8;

  int checks = 0, failures = 0;

  logic                msb;
  logic [1:0]          c_lo;
  logic [P-1:0][W-1:0] x_in;
  logic [P-1:0][W-1:0] rd [P];
  logic [P-1:0][W-1:0] wr [P];
  logic                wen [P];

  for (genvar b = 0; b < P; b++) begin : g_mux
    br_bank_in_mux #(.P(P), .W(W), .BANK(b)) dut (
      .msb(msb), .c_lo(c_lo), .x_in(x_in), .rd_word(rd[b]), .wr_word(wr[b]), .wen(wen[b]));
  end

  // two-bit reversal written out as a table
  function automatic int rev2(input int v);
    case (v)
      0: return 0;
      1: return 2;
      2: return 1;
      default: return 3;
    endcase
  endfunction

  initial begin
    logic [P-1:0][W-1:0] want;
    int taken [P];
    for (int rep = 0; rep < 50; rep++) begin
      for (int m = 0; m < 2; m++) begin
        for (int c = 0; c < 4; c++) begin
          msb = 1'(m); c_lo = 2'(c); x_in = {$urandom};
          for (int b = 0; b < 4; b++) rd[b] = {$urandom};
          #1;
          foreach (taken[i]) taken[i] = 0;
          for (int b = 0; b < 4; b++) begin
            if (m == 1) begin
              checks++;
              if (wen[b] != (b == 3 - c)) begin
                failures++;
                $display("FAIL wen bank %0d msb=1 c_lo=%0d", b, c);
              end
              if (b == 3 - c) begin
                checks++;
                if (wr[b] != x_in) begin
                  failures++;
                  $display("FAIL word bank %0d msb=1 c_lo=%0d", b, c);
                end
              end
            end else begin
              want = rd[b];
              want[rev2(c)] = x_in[3 - rev2(b)];
              taken[3 - rev2(b)]++;
              checks += 2;
              if (!wen[b]) begin
                failures++;
                $display("FAIL wen bank %0d msb=0", b);
              end
              if (wr[b] != want) begin
                failures++;
                $display("FAIL word bank %0d msb=0 c_lo=%0d: got %h want %h", b, c, wr[b], want);
              end
            end
          end
          if (m == 0) begin
            for (int l = 0; l < 4; l++) begin
              checks++;
              if (taken[l] != 1) failures++;
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
