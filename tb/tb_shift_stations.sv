// tb_shift_stations: random test of one FU's shift stations and delay chain.
//
// Each cycle the test may start one instruction with a free execution period:
// either issued directly into slot T_EX-1 (T_EX = 1..N_SS) or launched from a
// hold station (EX N_SS cycles later).  Its first operand is present or comes
// on a random CDB at a random earlier period; its last operand comes from the
// register file at issue or on a CDB at most K_UF periods before EX, as the
// issue rules allow.  CDBs carry fresh random values every cycle.  In every
// cycle the test checks that the FU is handed exactly the instruction whose
// period it is, with the station operand and the delay-chain operand equal to
// the CDB (or register) values of the periods the model predicts.
module tb_shift_stations;
  import cs_pkg::*;
  localparam int unsigned N_SS = N_SS_DEF;
  localparam int unsigned K    = K_UF_DEF;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  word_t [NUM_FU-1:0] cdb;
  logic we, chain_we, launch, ex_valid, ex_swap, last_capture;
  logic [$clog2(N_SS)-1:0] slot;
  logic [$clog2(K)-1:0] chain_idx;
  word_t chain_val, ex_ss_val, ex_chain_val;
  station_t entry, launch_entry;
  op_e ex_op;
  logic [N_SS-1:0] slot_busy;

  shift_stations dut (.*);

  typedef struct {
    word_t a;      // expected station operand
    word_t b;      // expected chain operand
    int unsigned a_cap, b_cap;  // capture cycles, 0 = value already known
    fu_t a_fu, b_fu;
    logic swap;
    op_e op;
  } exp_t;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  exp_t  expq [int unsigned];
  word_t hist [int unsigned];
  int n_ex = 0, n_launch = 0, n_direct = 0, n_cdb_last = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; chain_we = 0; launch = 0; entry = '0; launch_entry = '0; cdb = '0;
    slot = 0; chain_idx = 0; chain_val = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      cycle++;
      cdb[0] = $urandom; cdb[1] = $urandom;
      hist[cycle*2] = cdb[0]; hist[cycle*2+1] = cdb[1];
      we = 0; chain_we = 0; launch = 0;
      #1;
      // the instruction of this period
      check(ex_valid == expq.exists(cycle), "EX valid");
      if (expq.exists(cycle) && ex_valid) begin
        exp_t e;
        word_t a, b;
        e = expq[cycle];
        a = e.a_cap ? hist[e.a_cap*2 + e.a_fu] : e.a;
        b = e.b_cap ? hist[e.b_cap*2 + e.b_fu] : e.b;
        check(ex_ss_val == a, "station operand");
        check(ex_chain_val == b, "chain operand");
        check(ex_swap == e.swap && ex_op == e.op, "type of operation");
        n_ex++;
        expq.delete(cycle);
      end
      // start a new instruction
      if ($urandom_range(0, 3) != 0) begin
        bit via_hs;
        int tex, t1, t2;
        exp_t e;
        via_hs = ($urandom_range(0, 2) == 0);
        tex = via_hs ? N_SS : $urandom_range(1, N_SS);
        if (!expq.exists(cycle + tex)) begin
          e.swap = $urandom_range(0, 1);
          e.op   = op_e'($urandom_range(0, 9));
          e.a_fu = fu_t'($urandom_range(0, 1));
          e.b_fu = fu_t'($urandom_range(0, 1));
          // last operand period: 0 (at hand) only when issued directly
          t2 = $urandom_range((tex > K) ? tex - K : 0, tex - 1);
          if (via_hs && t2 == 0) t2 = 1;
          t1 = $urandom_range(0, t2);
          if (via_hs) begin
            // counters as seen in the launch cycle
            launch_entry = '0;
            launch_entry.busy = 1; launch_entry.op = e.op; launch_entry.swap = e.swap;
            launch_entry.ex = rp_t'(N_SS);
            if (t1 == 0 || $urandom_range(0, 1)) begin
              launch_entry.avail = 1; launch_entry.val = $urandom;
              e.a = launch_entry.val; e.a_cap = 0;
            end else begin
              launch_entry.avail = 0; launch_entry.val = pack_wait(e.a_fu, rp_t'(t1));
              e.a_cap = cycle + t1;
            end
            launch_entry.wait2 = 1; launch_entry.fu2 = e.b_fu; launch_entry.ts2 = rp_t'(t2);
            e.b_cap = cycle + t2;
            launch = 1;
            n_launch++;
          end else begin
            // issue record: counters as seen from the next cycle
            entry = '0;
            entry.busy = 1; entry.op = e.op; entry.swap = e.swap; entry.ex = rp_t'(tex - 1);
            if (t1 == 0) begin
              entry.avail = 1; entry.val = $urandom; e.a = entry.val; e.a_cap = 0;
            end else begin
              entry.avail = 0; entry.val = pack_wait(e.a_fu, rp_t'(t1 - 1)); e.a_cap = cycle + t1;
            end
            if (t2 == 0) begin
              chain_we = 1; chain_idx = ($clog2(K))'(tex - 1); chain_val = $urandom;
              e.b = chain_val; e.b_cap = 0;
            end else begin
              entry.wait2 = 1; entry.fu2 = e.b_fu; entry.ts2 = rp_t'(t2 - 1);
              e.b_cap = cycle + t2;
              n_cdb_last++;
            end
            we = 1; slot = ($clog2(N_SS))'(tex - 1);
            n_direct++;
          end
          expq[cycle + tex] = e;
        end
      end
    end
    check(n_ex > 1000 && n_launch > 0 && n_direct > 0 && n_cdb_last > 0, "all entry paths used");
    $display("executed=%0d launched=%0d direct=%0d", n_ex, n_launch, n_direct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
