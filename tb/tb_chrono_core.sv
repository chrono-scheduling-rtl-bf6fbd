// tb_chrono_core: end-to-end test of the chrono-scheduled core at its default
// configuration.
//
// 1. Loads R1..R6 with ADD-immediate instructions.
// 2. Issues the five-instruction example program (MULT R3,R2,R1; ADD R4,R3,R1;
//    SUB R5,R4,R3; XOR R4,R6,R1; SHR R3,R4,R2) in consecutive cycles and
//    checks that none stalls and that the issue stage predicts
//    Td = +4, +5, +6, +2, +3 and T_EX = +1, +4, +5, +1, +2, and that the MULT
//    result is on the MULT CDB exactly four cycles after its issue.
// 3. A chain of dependent multiplies, each followed by an ADD that uses it, which
//    fills every hold station (HS-full stall); then ten dependent multiplies
//    and an ADD that needs a period beyond the reservation table (range stall).
// 4. Random programs on a few registers (so dependences and FU conflicts are
//    frequent) with random gaps in the instruction stream.
// After each part it waits until nothing is in flight and compares every
// register with an in-order reference model updated when an instruction is
// accepted.  Throughout, every result must appear on its FU's CDB in exactly
// the period Td predicted at issue, with the value the reference model gives,
// and a CDB must stay silent in every other period.  It counts each scheduler mechanism and fails if one never occurs.
module tb_chrono_core;
  import cs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid;
  instr_t             in_instr;
  logic               in_ready;
  logic  [NUM_FU-1:0] cdb_valid;
  word_t [NUM_FU-1:0] cdb_data;
  reg_t               dbg_addr;
  word_t              dbg_val;
  rp_t                dbg_rp;
  logic               idle;
  logic               ev_issue, ev_to_hs, ev_delayed, ev_cdb_bypass;
  rp_t                ev_td;
  fu_t                ev_fu;
  logic [RP_W:0]      ev_tex;
  logic [NUM_FU-1:0]  ev_launch, ev_last_capture;
  logic               ev_stall_hs, ev_stall_brt, ev_stall_range;

  chrono_core dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  word_t ref_rf [NUM_REGS];

  // mechanism counters
  int n_ss_direct = 0, n_hs = 0, n_launch = 0, n_delayed = 0, n_bypass = 0;
  int n_chain = 0, n_stall_hs = 0, n_stall_brt = 0, n_stall_range = 0, n_swap = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic instr_t mk(op_e op, int rd, int rs1, int rs2, bit imm = 0, word_t iv = '0);
    instr_t i;
    i.op = op; i.rd = reg_t'(rd); i.rs1 = reg_t'(rs1); i.rs2 = reg_t'(rs2);
    i.use_imm = imm; i.imm = iv;
    return i;
  endfunction

  function automatic void ref_exec(instr_t i);
    word_t a, b;
    a = ref_rf[i.rs1];
    b = i.use_imm ? i.imm : ref_rf[i.rs2];
    if (i.rd != '0) ref_rf[i.rd] = alu(i.op, a, b);
  endfunction

  // Result timing: every instruction must put its result on its FU's CDB in
  // exactly the period Td predicted at issue, and no CDB may carry anything in
  // a period nobody reserved.  Keyed by 2*cycle + FU.
  word_t cdb_exp [int unsigned];
  int n_cdb_ok = 0;

  function automatic void expect_result(instr_t i, fu_t f, rp_t td);
    word_t a, b;
    a = ref_rf[i.rs1];
    b = i.use_imm ? i.imm : ref_rf[i.rs2];
    cdb_exp[(cycle + int'(td)) * 2 + f] = alu(i.op, a, b);
  endfunction

  always @(negedge clk) if (rst_n) begin
    #2;
    for (int f = 0; f < NUM_FU; f++) begin
      if (cdb_exp.exists(cycle * 2 + f)) begin
        check(cdb_valid[f] && cdb_data[f] == cdb_exp[cycle * 2 + f],
              $sformatf("result on CDB %0d in its predicted period", f));
        if (cdb_valid[f] && cdb_data[f] == cdb_exp[cycle * 2 + f]) n_cdb_ok++;
        cdb_exp.delete(cycle * 2 + f);
      end else begin
        check(!cdb_valid[f], $sformatf("CDB %0d idle in an unreserved period", f));
      end
    end
  end

  // Statistics sampled just before each rising edge.
  always @(negedge clk) if (rst_n) begin
    #2;
    if (ev_issue && !ev_to_hs) n_ss_direct++;
    if (ev_issue && ev_to_hs)  n_hs++;
    if (ev_issue && ev_delayed) n_delayed++;
    if (ev_cdb_bypass) n_bypass++;
    n_launch += $countones(ev_launch);
    n_chain  += $countones(ev_last_capture);
    if (ev_stall_hs)    n_stall_hs++;
    if (ev_stall_brt)   n_stall_brt++;
    if (ev_stall_range) n_stall_range++;
    if (ev_issue && in_instr.op != OP_MUL && !in_instr.use_imm &&
        dut.u_sb.ts_a > dut.u_sb.ts_b) n_swap++;
  end

  // Offer one instruction until it is accepted; returns the cycles it waited.
  // Inputs change on the falling edge; acceptance is sampled before the
  // rising edge.
  task automatic issue(instr_t i, output int waited, output rp_t td, output logic [RP_W:0] tex);
    waited = 0;
    forever begin
      @(negedge clk);
      in_valid = 1'b1;
      in_instr = i;
      #1;
      if (in_ready) begin
        td  = ev_td;
        tex = ev_tex;
        expect_result(i, ev_fu, td);
        ref_exec(i);
        break;
      end
      waited++;
    end
  endtask

  task automatic issue_stream(instr_t i);
    int w; rp_t td; logic [RP_W:0] tex;
    issue(i, w, td, tex);
  endtask

  task automatic drain_and_compare(string tag);
    int n = 0;
    @(negedge clk);
    in_valid = 1'b0;
    while (!idle && n < 1000) begin @(negedge clk); n++; end
    repeat (6) @(negedge clk);   // results to R0-destined or renamed registers
    check(idle, {tag, ": core drains"});
    for (int r = 0; r < NUM_REGS; r++) begin
      dbg_addr = reg_t'(r);
      #1;
      check(dbg_val == ref_rf[r] && dbg_rp == '0,
            $sformatf("%s: R%0d = %h, expected %h", tag, r, dbg_val, ref_rf[r]));
    end
  endtask

  // Example program, issued back to back.
  task automatic example_program();
    instr_t prog [5];
    int     exp_td  [5] = '{4, 5, 6, 2, 3};
    int     exp_tex [5] = '{1, 4, 5, 1, 2};
    int unsigned mult_issue_cycle;
    word_t  mult_val;
    prog[0] = mk(OP_MUL, 3, 2, 1);
    prog[1] = mk(OP_ADD, 4, 3, 1);
    prog[2] = mk(OP_SUB, 5, 4, 3);
    prog[3] = mk(OP_XOR, 4, 6, 1);
    prog[4] = mk(OP_SRL, 3, 4, 2);
    mult_val = ref_rf[2] * ref_rf[1];
    for (int k = 0; k < 5; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_instr = prog[k];
      #1;
      check(in_ready, $sformatf("example: instruction %0d issues without stall", k));
      check(int'(ev_td) == exp_td[k],
            $sformatf("example: instruction %0d Td = %0d, expected %0d", k, ev_td, exp_td[k]));
      check(int'(ev_tex) == exp_tex[k],
            $sformatf("example: instruction %0d T_EX = %0d, expected %0d", k, ev_tex, exp_tex[k]));
      if (k == 0) mult_issue_cycle = cycle;
      expect_result(prog[k], ev_fu, ev_td);
      ref_exec(prog[k]);
    end
    @(negedge clk);
    in_valid = 1'b0;
    // The MULT result is broadcast in the period IS + 4 and in no other.
    for (int c = 1; c <= 6; c++) begin
      bit on;
      on = cdb_valid[FU_MULT] && cdb_data[FU_MULT] == mult_val;
      check(on == (cycle - mult_issue_cycle == 4),
            $sformatf("example: MULT result on its CDB %s at IS+%0d",
                      on ? "present" : "absent", cycle - mult_issue_cycle));
      @(negedge clk);
      #1;
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0;
    in_instr = '0;
    dbg_addr = '0;
    for (int r = 0; r < NUM_REGS; r++) ref_rf[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. register initialisation
    for (int r = 1; r <= 6; r++)
      issue_stream(mk(OP_ADD, r, 0, 0, 1, word_t'(r * 7 + 3)));
    drain_and_compare("init");

    // 2. example program
    example_program();
    drain_and_compare("example");

    // 3. dependent multiply chain, then a dependent add
    issue_stream(mk(OP_ADD, 1, 0, 0, 1, 32'd3));
    drain_and_compare("chain init");
    // each MUL waits for the previous one; each ADD waits for the MUL before
    // it, so the execution periods run further and further ahead of issue
    for (int k = 0; k < 12; k++) begin
      issue_stream(mk(OP_MUL, 1, 1, 1));
      issue_stream(mk(OP_ADD, 2 + k % 5, 1, 1));
    end
    issue_stream(mk(OP_ADD, 2, 1, 1));
    drain_and_compare("chain");
    // ten dependent MULs alone: the ADD behind them needs a period past the
    // end of the reservation table
    for (int k = 0; k < 10; k++) issue_stream(mk(OP_MUL, 1, 1, 1));
    issue_stream(mk(OP_ADD, 2, 1, 1));
    drain_and_compare("long chain");
    check(n_stall_hs > 0, "chain: hold stations ran out");
    check(n_stall_range > 0, "long chain: range stall");
    check(n_stall_hs > 0, "chain: hold stations ran out");

    // 4. random programs
    for (int blk = 0; blk < 20; blk++) begin
      for (int k = 0; k < 200; k++) begin
        instr_t i;
        op_e    op;
        int     w;
        op = op_e'($urandom_range(0, 9));
        i  = mk(op, $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7),
                ($urandom_range(0, 5) == 0), word_t'($urandom));
        issue_stream(i);
        w = $urandom_range(0, 3);
        if (w == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
      drain_and_compare($sformatf("random %0d", blk));
    end

    $display("results on time=%0d", n_cdb_ok);
    $display("mechanisms: ss_direct=%0d hs=%0d launch=%0d delayed=%0d bypass=%0d chain=%0d swap=%0d stall_hs=%0d stall_brt=%0d stall_range=%0d",
             n_ss_direct, n_hs, n_launch, n_delayed, n_bypass, n_chain, n_swap,
             n_stall_hs, n_stall_brt, n_stall_range);
    check(n_cdb_ok > 4000 && cdb_exp.size() == 0, "every result seen on its CDB at Td");
    check(n_ss_direct > 0,   "mechanism: direct issue into a shift station");
    check(n_hs > 0,          "mechanism: issue into a hold station");
    check(n_launch == n_hs,  "mechanism: every hold station launched");
    check(n_delayed > 0,     "mechanism: execution delayed by a busy FU (BRT search)");
    check(n_bypass > 0,      "mechanism: operand taken from a CDB at issue");
    check(n_chain > 0,       "mechanism: last operand captured into the delay chain");
    check(n_swap > 0,        "mechanism: operands swapped for the FU");
    check(n_stall_hs > 0,    "mechanism: stall, no free hold station");
    check(n_stall_brt > 0,   "mechanism: stall, no free bit in the K_UF window");
    check(n_stall_range > 0, "mechanism: stall, period beyond the reservation table");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
