// tb_brt_search: test of the K_UF-bit free-period search.
//
// First the worked example of a machine with one shared CDB: when SHR issues
// (its source arrives one period later, Ts = 1), the ALU table holds the EX
// periods of XOR, ADD and SUB and the CDB table the WB periods of MULT, XOR,
// ADD and SUB; the search must give T_EX = +2 and T_WB = +3, and from Ts = 0 it
// must skip the busy first period.  Then random tables and start points are
// compared with a straightforward model, both with and without the CDB table,
// including windows that run past the end of the table.
module tb_brt_search;
  import cs_pkg::*;
  localparam int unsigned LEN = 12;
  localparam int unsigned K   = 3;

  logic [LEN-1:0] fu_bits, cdb_bits;
  rp_t            start;
  logic           found_c, found_n;
  logic [$clog2(K+1)-1:0] off_c, off_n;
  logic [RP_W:0]  tex_c, tex_n;
  logic [RP_W+1:0] twb_c, twb_n;

  // with a shared CDB (integer FU: WB one period after EX) and without
  brt_search #(.LEN(LEN), .K(K), .DUR(1), .USE_CDB(1'b1)) dut_c (
    .fu_bits, .cdb_bits, .start, .found(found_c), .offset(off_c), .t_ex(tex_c), .t_wb(twb_c));
  brt_search #(.LEN(LEN), .K(K), .DUR(1), .USE_CDB(1'b0)) dut_n (
    .fu_bits, .cdb_bits, .start, .found(found_n), .offset(off_n), .t_ex(tex_n), .t_wb(twb_n));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit busy_at(logic [LEN-1:0] b, int j);
    return (j >= LEN) ? 1'b1 : b[j];
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // periods after the issue of SHR: bit j = period j+1
    fu_bits  = '0; cdb_bits = '0;
    fu_bits[0]  = 1'b1;   // XOR in EX      (+1)
    fu_bits[2]  = 1'b1;   // SUB in EX      (+3)
    cdb_bits[0] = 1'b1;   // XOR in WB      (+1)
    cdb_bits[1] = 1'b1;   // ADD in WB      (+2)
    cdb_bits[3] = 1'b1;   // SUB in WB      (+4)
    start = 1; #1;
    check(found_c && tex_c == 2 && twb_c == 3, $sformatf("example: T_EX %0d T_WB %0d", tex_c, twb_c));
    start = 0; #1;
    check(found_c && tex_c == 2 && twb_c == 3, $sformatf("example from 0: T_EX %0d", tex_c));
    check(found_n && tex_n == 2, "example without CDB table");

    for (int n = 0; n < 20000; n++) begin
      int exp_c, exp_n;
      fu_bits  = LEN'($urandom) | LEN'($urandom);   // dense tables
      cdb_bits = LEN'($urandom) & LEN'($urandom);
      start    = rp_t'($urandom_range(0, LEN + 1));
      #1;
      exp_c = -1; exp_n = -1;
      for (int o = K - 1; o >= 0; o--) begin
        int j;
        j = int'(start) + o;
        if (!busy_at(fu_bits, j)) exp_n = o;
        if (!busy_at(fu_bits, j) && !busy_at(cdb_bits, j + 1)) exp_c = o;
      end
      check(found_n == (exp_n >= 0), "found without CDB");
      check(found_c == (exp_c >= 0), "found with CDB");
      if (exp_n >= 0) check(int'(tex_n) == int'(start) + exp_n + 1, "T_EX without CDB");
      if (exp_c >= 0) check(int'(tex_c) == int'(start) + exp_c + 1 && int'(twb_c) == int'(tex_c) + 1,
                            "T_EX/T_WB with CDB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
