// tb_reg_scoreboard: random test of the timing register file.
//
// Every cycle the test drives random source addresses, a random destination
// write (RP 2..20 from a random FU) and random CDB values, and compares the
// read ports (current RP, producer FU, value with CDB bypass) with its own
// model, which keeps per register the absolute cycle at which the pending value
// will be broadcast.  It also checks the write-back of the CDB into the register
// in exactly that cycle, the cancellation of an older pending value by a newer
// destination (WAW), and that R0 stays zero.
module tb_reg_scoreboard;
  import cs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  reg_t  rs_a, rs_b, wr_rd, dbg_addr;
  rp_t   ts_a, ts_b, wr_td, dbg_rp;
  fu_t   fu_a, fu_b, wr_fu;
  word_t val_a, val_b, dbg_val;
  logic  cdb_hit_a, cdb_hit_b, we, busy_any;
  word_t [NUM_FU-1:0] cdb;

  reg_scoreboard dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  // model: value, absolute broadcast cycle (0 = none pending), producer
  word_t       m_val  [NUM_REGS];
  int unsigned m_when [NUM_REGS];
  fu_t         m_fu   [NUM_REGS];
  int          n_bypass = 0, n_waw = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  function automatic int exp_ts(int r);
    if (r == 0 || m_when[r] == 0 || m_when[r] <= cycle) return 0;
    return m_when[r] - cycle;
  endfunction

  function automatic word_t exp_val(int r);
    if (r == 0) return '0;
    if (m_when[r] == cycle) return cdb[m_fu[r]];
    return m_val[r];
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; rs_a = 0; rs_b = 0; wr_rd = 0; wr_td = 0; wr_fu = 0; dbg_addr = 0; cdb = '0;
    for (int r = 0; r < NUM_REGS; r++) begin m_val[r] = 0; m_when[r] = 0; m_fu[r] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      cycle++;
      rs_a  = reg_t'($urandom_range(0, 7));
      rs_b  = reg_t'($urandom_range(0, 7));
      cdb[0] = $urandom; cdb[1] = $urandom;
      we    = ($urandom_range(0, 2) == 0);
      wr_rd = reg_t'($urandom_range(0, 7));
      wr_td = rp_t'($urandom_range(2, 20));
      wr_fu = fu_t'($urandom_range(0, 1));
      dbg_addr = reg_t'($urandom_range(0, 7));
      #1;
      check(int'(ts_a) == exp_ts(rs_a), $sformatf("ts_a R%0d %0d exp %0d", rs_a, ts_a, exp_ts(rs_a)));
      check(int'(ts_b) == exp_ts(rs_b), $sformatf("ts_b R%0d %0d exp %0d", rs_b, ts_b, exp_ts(rs_b)));
      if (exp_ts(rs_a) > 0) check(fu_a == m_fu[rs_a], "fu_a");
      if (exp_ts(rs_b) > 0) check(fu_b == m_fu[rs_b], "fu_b");
      if (exp_ts(rs_a) == 0) check(val_a == exp_val(rs_a), $sformatf("val_a R%0d", rs_a));
      if (exp_ts(rs_b) == 0) check(val_b == exp_val(rs_b), $sformatf("val_b R%0d", rs_b));
      if (rs_a != 0 && m_when[rs_a] == cycle) begin
        n_bypass++;
        check(cdb_hit_a, "cdb_hit_a");
      end
      // model update at the clock edge
      for (int r = 1; r < NUM_REGS; r++)
        if (m_when[r] == cycle) begin m_val[r] = cdb[m_fu[r]]; m_when[r] = 0; end
      if (we && wr_rd != 0) begin
        if (m_when[wr_rd] != 0) n_waw++;
        m_when[wr_rd] = cycle + wr_td;
        m_fu[wr_rd]   = wr_fu;
      end
    end
    check(n_bypass > 0 && n_waw > 0, "bypass and WAW both exercised");
    $display("bypass=%0d waw=%0d", n_bypass, n_waw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
