// reg_scoreboard: register file with chrono-scheduling timing information.
//
// Each register holds its value plus an RP counter and the FU that will produce
// its next value.  The stored RP is the one seen at the end of a cycle: RP = r
// means the value will be on CDB 'fu' r cycles after the current one; RP = 0
// means the value in the register is current.  Every cycle each pending RP
// counts down by one; in the cycle its stored RP is 1 the register captures the
// CDB of its recorded FU.  The issue stage writes Td and the FU for the
// destination of the instruction it issues, which replaces any older pending
// value (this is how WAW hazards disappear without renaming).
//
// Read ports (combinational, two of them for the two sources):
//   ts  = RP of the operand relative to the current cycle (stored RP - 1, or 0),
//   val = register value, or the CDB value when the operand is broadcast in the
//         current cycle (stored RP = 1), so such an operand also counts as Ts = 0,
//   fu  = the producing FU (the CDB to watch) while ts > 0.
// A third read port (dbg_*) serves inspection.
// Follows the document: RP per register, decrement every cycle, capture from the
// recorded CDB at RP 0, overwrite on a new destination.  Own choices: R0 reads
// as zero and is never made pending; reset clears values and RPs.
module reg_scoreboard
  import cs_pkg::*;
#(
  parameter int unsigned N_REGS = NUM_REGS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // source read ports
  input  reg_t                  rs_a,
  input  reg_t                  rs_b,
  output rp_t                   ts_a,
  output rp_t                   ts_b,
  output fu_t                   fu_a,
  output fu_t                   fu_b,
  output word_t                 val_a,
  output word_t                 val_b,
  output logic                  cdb_hit_a,   // value taken from a CDB this cycle
  output logic                  cdb_hit_b,
  // destination write (issue)
  input  logic                  we,
  input  reg_t                  wr_rd,
  input  rp_t                   wr_td,
  input  fu_t                   wr_fu,
  // CDBs
  input  word_t [NUM_FU-1:0]    cdb,
  // inspection
  input  reg_t                  dbg_addr,
  output word_t                 dbg_val,
  output rp_t                   dbg_rp,
  output logic                  busy_any     // some register still pending
);

  word_t data_q [N_REGS];
  rp_t   rp_q   [N_REGS];
  fu_t   fu_q   [N_REGS];

  function automatic rp_t cur_ts(rp_t r);
    return (r == '0) ? rp_t'(0) : rp_t'(r - 1'b1);
  endfunction

  always_comb begin
    ts_a      = cur_ts(rp_q[rs_a]);
    ts_b      = cur_ts(rp_q[rs_b]);
    fu_a      = fu_q[rs_a];
    fu_b      = fu_q[rs_b];
    cdb_hit_a = (rp_q[rs_a] == rp_t'(1));
    cdb_hit_b = (rp_q[rs_b] == rp_t'(1));
    val_a     = cdb_hit_a ? cdb[fu_q[rs_a]] : data_q[rs_a];
    val_b     = cdb_hit_b ? cdb[fu_q[rs_b]] : data_q[rs_b];
    dbg_val   = data_q[dbg_addr];
    dbg_rp    = rp_q[dbg_addr];
    busy_any  = 1'b0;
    for (int i = 0; i < N_REGS; i++)
      if (rp_q[i] != '0) busy_any = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_REGS; i++) begin
        data_q[i] <= '0;
        rp_q[i]   <= '0;
        fu_q[i]   <= FU_INT;
      end
    end else begin
      data_q[0] <= '0;
      rp_q[0]   <= '0;
      fu_q[0]   <= FU_INT;
      for (int i = 1; i < N_REGS; i++) begin
        if (rp_q[i] == rp_t'(1))
          data_q[i] <= cdb[fu_q[i]];
        if (we && wr_rd == reg_t'(i)) begin
          rp_q[i] <= wr_td;
          fu_q[i] <= wr_fu;
        end else if (rp_q[i] != '0) begin
          rp_q[i] <= rp_q[i] - 1'b1;
        end
      end
    end
  end

endmodule
