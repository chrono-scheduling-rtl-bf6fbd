// tb_hold_stations: random test of the hold-station pool.
//
// Each cycle the test may allocate an entry for a random FU with an execution
// period 4..24 cycles ahead (kept unique per FU, as the reservation tables
// guarantee) and a first operand that is either present or arrives on a random
// CDB 1..(T_EX-1) cycles ahead.  The CDBs carry a fresh random value every
// cycle.  The model predicts for every entry the launch cycle (EX period minus
// N_SS) and the operand value captured by then; the test checks that each entry
// launches exactly once, in that cycle, with the right record (operand value
// if it already arrived, otherwise the remaining RP), that nothing else
// launches, and that the free flag and occupancy follow the model.  Bursts of
// allocations fill the pool.
module tb_hold_stations;
  import cs_pkg::*;
  localparam int unsigned N_HS = N_HS_DEF;
  localparam int unsigned N_SS = N_SS_DEF;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic we, any_free;
  station_t entry;
  word_t [NUM_FU-1:0] cdb;
  logic [NUM_FU-1:0] launch;
  station_t [NUM_FU-1:0] launch_entry;
  logic [$clog2(N_HS+1)-1:0] occupancy;

  hold_stations dut (.*);

  typedef struct {
    int unsigned ex_abs;
    int unsigned cap_abs;   // 0: operand present at allocation
    fu_t         fu1;
    word_t       val;
    fu_t         fu;
  } exp_t;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  exp_t pend [$];
  bit   used [int unsigned];   // 2*ex_abs + fu in use
  word_t cdb_hist [int unsigned];
  int n_launch = 0, n_full = 0, n_cap = 0, sz;

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
    we = 0; entry = '0; cdb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      cycle++;
      cdb[0] = $urandom; cdb[1] = $urandom;
      cdb_hist[cycle*2]   = cdb[0];
      cdb_hist[cycle*2+1] = cdb[1];
      #1;
      // entries launching in this cycle are freed only at its end
      sz = pend.size();
      check(any_free == (sz < N_HS), "free flag");
      check(int'(occupancy) == sz, "occupancy");
      if (sz == N_HS) n_full++;
      // expected launches this cycle
      for (int f = 0; f < NUM_FU; f++) begin
        int idx;
        idx = -1;
        for (int q = 0; q < pend.size(); q++)
          if (pend[q].fu == fu_t'(f) && pend[q].ex_abs == cycle + N_SS) idx = q;
        check(launch[f] == (idx >= 0), $sformatf("launch FU%0d", f));
        if (idx >= 0 && launch[f]) begin
          exp_t e;
          e = pend[idx];
          n_launch++;
          check(launch_entry[f].busy && launch_entry[f].ex == rp_t'(N_SS), "launch record ex");
          if (e.cap_abs != 0 && e.cap_abs < cycle) begin
            check(launch_entry[f].avail && launch_entry[f].val == cdb_hist[e.cap_abs*2 + e.fu1],
                  "operand captured in the hold station");
          end else if (e.cap_abs != 0) begin
            check(!launch_entry[f].avail && int'(rp1_of(launch_entry[f])) == e.cap_abs - cycle &&
                  fu1_of(launch_entry[f]) == e.fu1, "operand RP handed over");
          end else begin
            check(launch_entry[f].avail && launch_entry[f].val == e.val, "operand present");
          end
          pend.delete(idx);
        end
      end
      // allocation
      we = 0;
      if (any_free && ($urandom_range(0, 9) < ((n / 500) % 2 ? 9 : 4))) begin
        int tex;
        fu_t f;
        f   = fu_t'($urandom_range(0, 1));
        tex = $urandom_range(N_SS + 1, 24);
        if (!used.exists((cycle + tex) * 2 + f)) begin
          exp_t e;
          entry = '0;
          entry.busy = 1; entry.fu = f; entry.op = OP_ADD; entry.ex = rp_t'(tex - 1);
          e.ex_abs = cycle + tex; e.fu = f; e.fu1 = fu_t'($urandom_range(0, 1));
          if ($urandom_range(0, 1)) begin
            int ts;
            ts = $urandom_range(1, tex - 1);
            entry.avail = 0; entry.val = pack_wait(e.fu1, rp_t'(ts - 1));
            e.cap_abs = cycle + ts; e.val = '0;
            n_cap++;
          end else begin
            entry.avail = 1; entry.val = $urandom; e.cap_abs = 0; e.val = entry.val;
          end
          used[(cycle + tex) * 2 + f] = 1;
          pend.push_back(e);
          we = 1;
        end
      end
    end
    check(n_launch > 500 && n_full > 0 && n_cap > 0, "launches, full pool and captures exercised");
    $display("launches=%0d full_cycles=%0d", n_launch, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
