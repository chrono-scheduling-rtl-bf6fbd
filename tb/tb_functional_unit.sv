// tb_functional_unit: test of the integer and multiply FUs.
//
// Random operations with random operand order (swap) enter both FUs every
// cycle that the test chooses.  Each result must appear on the FU's CDB exactly
// LAT-1 cycles after its EX period (one cycle for the integer FU, three for the
// multiplier, so the full latencies including write-back are 2 and 4), with the
// value of the operation applied to the sources in program order, and the CDB
// must be idle in every other cycle.
module tb_functional_unit;
  import cs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  v [2], sw [2], cv [2];
  op_e   op [2];
  word_t a [2], b [2], cd [2];

  functional_unit #(.KIND(FU_INT)) u_int (
    .clk, .rst_n, .ex_valid(v[0]), .ex_op(op[0]), .ex_swap(sw[0]),
    .ex_ss_val(a[0]), .ex_chain_val(b[0]), .cdb_valid(cv[0]), .cdb_data(cd[0]));
  functional_unit #(.KIND(FU_MULT)) u_mul (
    .clk, .rst_n, .ex_valid(v[1]), .ex_op(op[1]), .ex_swap(sw[1]),
    .ex_ss_val(a[1]), .ex_chain_val(b[1]), .cdb_valid(cv[1]), .cdb_data(cd[1]));

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  word_t exp_res [int unsigned];   // key: 2*cycle + fu

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
    for (int f = 0; f < 2; f++) begin v[f] = 0; sw[f] = 0; op[f] = OP_ADD; a[f] = 0; b[f] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      cycle++;
      #1;
      for (int f = 0; f < 2; f++) begin
        int unsigned key;
        key = cycle * 2 + f;
        check(cv[f] == exp_res.exists(key), $sformatf("CDB %0d valid", f));
        if (exp_res.exists(key) && cv[f]) begin
          check(cd[f] == exp_res[key], $sformatf("CDB %0d value", f));
          exp_res.delete(key);
        end
      end
      for (int f = 0; f < 2; f++) begin
        word_t s1, s2;
        v[f]  = ($urandom_range(0, 3) != 0);
        op[f] = (f == 1) ? OP_MUL : op_e'($urandom_range(0, 8));
        sw[f] = $urandom_range(0, 1);
        a[f]  = $urandom;
        b[f]  = ($urandom_range(0, 1)) ? word_t'($urandom_range(0, 40)) : word_t'($urandom);
        s1 = sw[f] ? b[f] : a[f];
        s2 = sw[f] ? a[f] : b[f];
        // this is the EX period; WB follows LAT-1 periods later
        if (v[f]) exp_res[(cycle + ((f == 1) ? L_MULT : L_INT) - 1) * 2 + f] = alu(op[f], s1, s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
