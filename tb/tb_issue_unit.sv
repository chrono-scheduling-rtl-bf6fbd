// tb_issue_unit: test of the IS-stage computation.
//
// Part 1 replays the issue periods of the five-instruction example (MULT, ADD,
// SUB, XOR, SHR) with the scoreboard readings and reservation tables the core
// would present, and checks Td (+4, +5, +6, +2, +3), T_EX, the choice of shift
// or hold station, and the station record (which source waits where, its RPs
// and producer FUs, the swap flag).
// Part 2 drives random source RPs, reservation tables and hold-station
// availability and compares the issue decision (T_EX, Td, destination, the
// three stall causes) with a direct model of the rules.
module tb_issue_unit;
  import cs_pkg::*;
  localparam int unsigned LEN  = PCLK_MAX;
  localparam int unsigned K    = K_UF_DEF;
  localparam int unsigned N_SS = N_SS_DEF;

  logic valid, fire, sb_we, hs_free, hs_we, delayed, stall_hs, stall_brt, stall_range;
  instr_t instr;
  rp_t ts_a, ts_b_reg, sb_td;
  fu_t fu_a, fu_b, sb_fu, fu;
  word_t val_a, val_b_reg, chain_val;
  reg_t sb_rd;
  logic [NUM_FU-1:0][LEN-1:0] brt_bits;
  logic [NUM_FU-1:0] brt_set, ss_we, chain_we;
  logic [$clog2(LEN)-1:0] brt_idx;
  logic [$clog2(N_SS)-1:0] ss_slot;
  station_t entry;
  logic [$clog2(K)-1:0] chain_idx;
  logic [RP_W:0] t_ex;

  issue_unit dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic setup(op_e op, int ta, fu_t fa, int tb, fu_t fb);
    valid = 1; instr = '0; instr.op = op; instr.rd = 5'd4; instr.rs1 = 5'd1; instr.rs2 = 5'd2;
    ts_a = rp_t'(ta); fu_a = fa; ts_b_reg = rp_t'(tb); fu_b = fb;
    val_a = 32'hAAAA_0001; val_b_reg = 32'hBBBB_0002;
    hs_free = 1;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    brt_bits = '0;
    // MULT R3,R2,R1: both sources in the register file
    setup(OP_MUL, 0, FU_INT, 0, FU_INT); #1;
    check(fire && sb_td == 4 && t_ex == 1 && ss_we == 2'b10 && ss_slot == 0 && !hs_we, "MULT");
    check(entry.avail && entry.val == val_a && !entry.wait2 && chain_we == 2'b10 &&
          chain_idx == 0 && chain_val == val_b_reg, "MULT operands");
    // ADD R4,R3,R1: R3 at +3 from MULT
    setup(OP_ADD, 3, FU_MULT, 0, FU_INT); #1;
    check(fire && sb_td == 5 && t_ex == 4 && hs_we && ss_we == 0 && sb_fu == FU_INT, "ADD");
    check(entry.swap && entry.avail && entry.val == val_b_reg && entry.wait2 &&
          entry.fu2 == FU_MULT && entry.ts2 == 2 && entry.ex == 3 && chain_we == 0, "ADD record");
    // SUB R5,R4,R3: R4 at +4 (INT), R3 at +2 (MULT); ADD holds INT at +3
    brt_bits[FU_INT][2] = 1'b1;
    setup(OP_SUB, 4, FU_INT, 2, FU_MULT); #1;
    check(fire && sb_td == 6 && t_ex == 5 && hs_we, "SUB");
    check(entry.swap && !entry.avail && fu1_of(entry) == FU_MULT && rp1_of(entry) == 1 &&
          entry.wait2 && entry.fu2 == FU_INT && entry.ts2 == 3, "SUB record");
    // XOR R4,R6,R1: INT holds +2 (ADD) and +4 (SUB)
    brt_bits[FU_INT] = '0; brt_bits[FU_INT][1] = 1'b1; brt_bits[FU_INT][3] = 1'b1;
    setup(OP_XOR, 0, FU_INT, 0, FU_INT); #1;
    check(fire && sb_td == 2 && t_ex == 1 && ss_we == 2'b01 && ss_slot == 0, "XOR");
    // SHR R3,R4,R2: R4 at +1 from XOR; INT holds +1 (ADD) and +3 (SUB)
    brt_bits[FU_INT] = '0; brt_bits[FU_INT][0] = 1'b1; brt_bits[FU_INT][2] = 1'b1;
    setup(OP_SRL, 1, FU_INT, 0, FU_INT); #1;
    check(fire && sb_td == 3 && t_ex == 2 && ss_we == 2'b01 && ss_slot == 1 && !delayed, "SHR");
    check(entry.swap && entry.avail && entry.wait2 && entry.ts2 == 0 && brt_set == 2'b01 &&
          brt_idx == 1, "SHR record");
    // the same SHR if the FU were busy at +2: delayed to +3? (+3 is busy) -> +4 > window
    brt_bits[FU_INT][1] = 1'b1;
    setup(OP_SRL, 1, FU_INT, 0, FU_INT); #1;
    check(!fire && stall_brt, "SHR with two busy periods stalls");
    brt_bits[FU_INT][2] = 1'b0;
    #1;
    check(fire && delayed && t_ex == 3 && sb_td == 4 && chain_we == 0, "SHR delayed by one period");

    // random decisions against the rules
    for (int n = 0; n < 20000; n++) begin
      int ta, tb, tmax, tex, td, lat;
      bit found, imm, tohs, exp_fire;
      fu_t f;
      setup(op_e'($urandom_range(0, 9)), $urandom_range(0, 26), fu_t'($urandom_range(0, 1)),
            $urandom_range(0, 26), fu_t'($urandom_range(0, 1)));
      imm = ($urandom_range(0, 4) == 0);
      instr.use_imm = imm;
      instr.imm = $urandom;
      valid = ($urandom_range(0, 9) != 0);
      hs_free = ($urandom_range(0, 3) != 0);
      brt_bits[0] = LEN'($urandom) & LEN'($urandom);
      brt_bits[1] = LEN'($urandom) & LEN'($urandom);
      #1;
      f    = (instr.op == OP_MUL) ? FU_MULT : FU_INT;
      lat  = (f == FU_MULT) ? 4 : 2;
      ta   = ts_a;
      tb   = imm ? 0 : ts_b_reg;
      tmax = (ta > tb) ? ta : tb;
      found = 0; tex = 0;
      for (int o = 0; o < K; o++)
        if (!found && tmax + o < LEN && !brt_bits[f][tmax + o]) begin
          found = 1; tex = tmax + o + 1;
        end
      td   = tex + lat - 1;
      tohs = (tex - 1 >= N_SS);
      exp_fire = valid && found && td <= RP_LIMIT && !(tohs && !hs_free);
      check(fire == exp_fire, $sformatf("fire ta=%0d tb=%0d", ta, tb));
      check(stall_brt == (valid && !found && tmax + K <= LEN), "stall_brt");
      check(stall_range == (valid && (tmax + K > LEN && !found || found && td > RP_LIMIT)),
            "stall_range");
      check(stall_hs == (valid && found && td <= RP_LIMIT && tohs && !hs_free), "stall_hs");
      if (exp_fire) begin
        check(int'(t_ex) == tex && int'(sb_td) == td, "T_EX/Td");
        check(hs_we == tohs && (ss_we != 0) == !tohs, "SS/HS choice");
        if (!tohs) check(int'(ss_slot) == tex - 1, "SS slot");
        check(brt_set[f] && int'(brt_idx) == tex - 1, "reservation");
        check(entry.swap == (ta > tb), "swap");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
