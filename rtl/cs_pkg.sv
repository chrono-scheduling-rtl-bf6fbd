// cs_pkg: configuration, types and shared functions of the chrono-scheduled core.
//
// A chrono-scheduler works out at issue time, for every instruction, the exact
// relative period (RP, cycles counted from its own issue cycle) at which each of
// its source operands will appear on a common data bus (CDB), the period T_EX at
// which it will execute and the period Td at which its result will be broadcast.
// Stations then only count down: no tags, no associative wake-up.
//
// Configuration that follows the document: a scalar DLX-like machine (issue
// width 1), 32-bit data, an integer FU with full latency 2 and a multiply FU with
// full latency 4 (full latency includes the write-back period), one CDB per FU,
// three shift stations per FU (the bottom one being the register that feeds the
// FU), a K_UF = 2 bit BRT search, and the counter width of Eq. (1)/(2):
//   PCLK_MAX = max(L_UF) * N_HS - floor((N_HS - 1) / m),  RP_W = ceil(log2(PCLK_MAX)).
// Own choices: 32 registers (DLX), 8 hold stations, the operation set and its
// encoding, and the layout of the station record.
package cs_pkg;

  // ---------------------------------------------------------------- sizes
  parameter int unsigned XLEN       = 32;  // data width
  parameter int unsigned NUM_REGS   = 32;  // architectural registers, R0 reads as zero
  parameter int unsigned REG_W      = $clog2(NUM_REGS);
  parameter int unsigned NUM_FU     = 2;   // FU_INT and FU_MULT, one CDB each
  parameter int unsigned FU_W       = 1;   // bits naming an FU / CDB
  parameter int unsigned L_INT      = 2;   // full latency of the integer FU (EX + WB)
  parameter int unsigned L_MULT     = 4;   // full latency of the multiply FU (E1 E2 E3 WB)
  parameter int unsigned L_MAX      = (L_INT > L_MULT) ? L_INT : L_MULT;
  parameter int unsigned ISSUE_W    = 1;   // m, issue width (scalar)
  parameter int unsigned N_HS_DEF   = 8;   // hold stations
  parameter int unsigned N_SS_DEF   = 3;   // shift stations per FU, bottom register included
  parameter int unsigned K_UF_DEF   = 2;   // BRT bits explored per period

  // Eq. (1) and Eq. (2)
  parameter int unsigned PCLK_MAX   = L_MAX * N_HS_DEF - (N_HS_DEF - 1) / ISSUE_W;
  parameter int unsigned RP_W       = $clog2(PCLK_MAX);
  parameter int unsigned RP_LIMIT   = (1 << RP_W) - 1;   // largest RP a counter holds

  typedef logic [FU_W-1:0] fu_t;
  typedef logic [RP_W-1:0] rp_t;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [REG_W-1:0] reg_t;

  localparam fu_t FU_INT  = 1'b0;
  localparam fu_t FU_MULT = 1'b1;

  // ---------------------------------------------------------------- operations
  typedef enum logic [3:0] {
    OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA, OP_SLT, OP_MUL
  } op_e;

  // Decoded instruction as delivered by the (external) decode stage.
  typedef struct packed {
    op_e   op;
    reg_t  rd;
    reg_t  rs1;
    reg_t  rs2;
    logic  use_imm;   // second source is imm instead of rs2
    word_t imm;
  } instr_t;

  function automatic fu_t fu_of(op_e op);
    return (op == OP_MUL) ? FU_MULT : FU_INT;
  endfunction

  function automatic int unsigned lat_of(fu_t fu);
    return (fu == FU_MULT) ? L_MULT : L_INT;
  endfunction

  // Reference semantics, also used by the FUs: a = first source, b = second source.
  function automatic word_t alu(op_e op, word_t a, word_t b);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLL:  return a << b[4:0];
      OP_SRL:  return a >> b[4:0];
      OP_SRA:  return word_t'($signed(a) >>> b[4:0]);
      OP_SLT:  return {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      OP_MUL:  return a * b;
      default: return '0;
    endcase
  endfunction

  // ---------------------------------------------------------------- stations
  // One record serves both station kinds (the HS row of the cost table is the SS
  // row plus the launch counter).  While 'avail' is clear, the 32-bit operand
  // field holds the RP of the first operand and the FU that will produce it
  // ({fu1, rp1} in its low bits), as the document suggests.
  // All counters are stored "as seen from the next cycle": a counter that reads
  // 0 during a cycle means the event happens in that cycle.
  typedef struct packed {
    logic  busy;    // allocate/free
    logic  avail;   // first operand value present in 'val'
    logic  wait2;   // last operand still to come on CDB fu2
    fu_t   fu2;     // CDB of the last operand
    rp_t   ts2;     // cycles until the last operand is on the CDB
    word_t val;     // first operand value, or {fu1, rp1} while waiting
    op_e   op;      // type of operation
    logic  swap;    // the station holds the second source, the chain the first
    fu_t   fu;      // FU that executes it
    rp_t   ex;      // cycles until EX (meaningful in the hold stations)
  } station_t;

  function automatic rp_t rp1_of(station_t s);
    return s.val[RP_W-1:0];
  endfunction

  function automatic fu_t fu1_of(station_t s);
    return s.val[RP_W +: FU_W];
  endfunction

  function automatic word_t pack_wait(fu_t fu1, rp_t rp1);
    word_t w;
    w = '0;
    w[RP_W-1:0]    = rp1;
    w[RP_W +: FU_W] = fu1;
    return w;
  endfunction

  // One period of a waiting station: capture the first operand from its CDB
  // when its RP expires, otherwise count down; count down the last-operand RP
  // and the EX counter.  'cdb' holds this cycle's value of every CDB.
  function automatic station_t station_tick(station_t s, word_t [NUM_FU-1:0] cdb);
    station_t n;
    n = s;
    if (s.busy) begin
      if (!s.avail) begin
        if (rp1_of(s) == '0) begin
          n.val   = cdb[fu1_of(s)];
          n.avail = 1'b1;
        end else begin
          n.val = pack_wait(fu1_of(s), rp1_of(s) - 1'b1);
        end
      end
      if (s.wait2) begin
        if (s.ts2 == '0) n.wait2 = 1'b0;
        else             n.ts2   = s.ts2 - 1'b1;
      end
      if (s.ex != '0) n.ex = s.ex - 1'b1;
    end
    return n;
  endfunction

endpackage
