// tb_brt: random test of the reservation table.
//
// The model keeps the set of absolute cycles already reserved.  Each cycle the
// test reserves, with probability 3/4, a random free period 1..LEN cycles ahead
// and then compares every bit of the table (bit j = period j+1) with the model,
// so both the shift with time and the merge of the new reservation are checked.
module tb_brt;
  import cs_pkg::*;
  localparam int unsigned LEN = PCLK_MAX;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   set;
  logic [$clog2(LEN)-1:0] set_idx;
  logic [LEN-1:0]         bits;

  brt #(.LEN(LEN)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  bit reserved [int unsigned];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_full;
    n_full = 0; set = 0; set_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      cycle++;
      #1;
      for (int j = 0; j < LEN; j++)
        check(bits[j] == reserved.exists(cycle + j + 1), $sformatf("bit %0d", j));
      set = 0;
      if ($urandom_range(0, 3) != 0) begin
        int j;
        j = $urandom_range(0, LEN - 1);
        if (!reserved.exists(cycle + j + 1)) begin
          set = 1; set_idx = j[$clog2(LEN)-1:0];
          reserved[cycle + j + 1] = 1;
        end
      end
      if ($countones(bits) > LEN / 3) n_full++;
    end
    check(n_full > 0, "table reached more than a third occupancy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
