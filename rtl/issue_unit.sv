// issue_unit: the IS stage of the chrono-scheduler (combinational).
//
// For the decoded instruction at its input it works out, in one period:
//   Ts1, Ts2  RPs of the two sources, read from the register scoreboard
//             (an immediate second source has Ts2 = 0);
//   T_EX      first period >= MAX(Ts1,Ts2)+1 in which the target FU is free,
//             found by a K_UF-bit search of the FU's reservation table;
//   Td        T_EX + L_UF - 1, the period in which the result is on the FU's CDB
//             (equal to MAX(Ts1,Ts2) + L_UF when the FU is free at once).
// As in the document's issue circuit, the K_UF-bit search is done from both Ts1
// and Ts2 and the MAX comparison only selects between the two results, which
// keeps the comparator off the search path.
// The source that arrives first (MIN) goes into the station's operand field,
// as a value if already available or as {FU1, RP} otherwise; the source that
// arrives last goes to the FU's left-input delay chain, either now (from the
// register file or the CDB of this cycle) or later, ordered by the station
// through its FU2/Ts fields.  'swap' records when the station holds the second
// source, so that non-commutative FUs can restore the operand order.
// The record goes to shift station T_EX-1 of the FU when T_EX-1 < N_SS, and to
// a hold station otherwise.  Structural stalls (the instruction is not issued
// and is offered again in the next cycle): no free hold station, no free bit in
// the K_UF-bit window, or a window/Td beyond the table length or counter range.
// Follows the document: the RP equations, the search, the SS/HS choice and the
// three stall causes.  Own choices: MIN/MAX ties put source 1 in the station;
// instructions writing R0 issue but reserve nothing in the scoreboard.
module issue_unit
  import cs_pkg::*;
#(
  parameter int unsigned LEN  = PCLK_MAX,
  parameter int unsigned K    = K_UF_DEF,
  parameter int unsigned N_SS = N_SS_DEF
) (
  input  logic                          valid,
  input  instr_t                        instr,
  output logic                          fire,          // instruction issues this cycle
  // register scoreboard
  input  rp_t                           ts_a,
  input  rp_t                           ts_b_reg,
  input  fu_t                           fu_a,
  input  fu_t                           fu_b,
  input  word_t                         val_a,
  input  word_t                         val_b_reg,
  output logic                          sb_we,
  output reg_t                          sb_rd,
  output rp_t                           sb_td,
  output fu_t                           sb_fu,
  // reservation tables of all FUs
  input  logic [NUM_FU-1:0][LEN-1:0]    brt_bits,
  output logic [NUM_FU-1:0]             brt_set,
  output logic [$clog2(LEN)-1:0]        brt_idx,
  // hold stations
  input  logic                          hs_free,
  output logic                          hs_we,
  // shift stations of the target FU
  output logic [NUM_FU-1:0]             ss_we,
  output logic [$clog2(N_SS)-1:0]       ss_slot,
  output station_t                      entry,
  // left-input delay chain of the target FU (last operand already available)
  output logic [NUM_FU-1:0]             chain_we,
  output logic [$clog2(K)-1:0]          chain_idx,
  output word_t                         chain_val,
  // information
  output fu_t                           fu,
  output logic [RP_W:0]                 t_ex,
  output logic                          delayed,       // FU busy at MAX(Ts)+1
  output logic                          stall_hs,
  output logic                          stall_brt,
  output logic                          stall_range
);

  rp_t   ts_b;
  word_t val_b;
  logic  found_a, found_b, found;
  logic [$clog2(K+1)-1:0] off_a, off_b, off;
  logic [RP_W:0]   tex_a, tex_b;
  logic [RP_W+1:0] twb_a, twb_b;
  logic [RP_W+1:0] td_full;
  logic            a_is_last, fits, to_hs, win_short;
  rp_t             ts_max, ts_min;
  logic [LEN-1:0]  bits;

  assign ts_b  = instr.use_imm ? rp_t'(0) : ts_b_reg;
  assign val_b = instr.use_imm ? instr.imm : val_b_reg;
  assign fu    = fu_of(instr.op);
  assign bits  = brt_bits[fu];

  brt_search #(.LEN(LEN), .K(K), .DUR(0), .USE_CDB(1'b0)) u_search_a (
    .fu_bits(bits), .cdb_bits('0), .start(ts_a),
    .found(found_a), .offset(off_a), .t_ex(tex_a), .t_wb(twb_a)
  );
  brt_search #(.LEN(LEN), .K(K), .DUR(0), .USE_CDB(1'b0)) u_search_b (
    .fu_bits(bits), .cdb_bits('0), .start(ts_b),
    .found(found_b), .offset(off_b), .t_ex(tex_b), .t_wb(twb_b)
  );

  always_comb begin
    // MAX after the search: source a is the last one when it arrives later
    // (ties: source b is last, source a goes into the station).
    a_is_last = (ts_a > ts_b);
    ts_max    = a_is_last ? ts_a : ts_b;
    ts_min    = a_is_last ? ts_b : ts_a;
    found     = a_is_last ? found_a : found_b;
    off       = a_is_last ? off_a   : off_b;
    t_ex      = a_is_last ? tex_a   : tex_b;
    delayed   = found && (off != '0);
    td_full   = (RP_W+2)'(t_ex) + (RP_W+2)'(lat_of(fu)) - 1'b1;
    fits      = found && (td_full <= (RP_W+2)'(RP_LIMIT));
    win_short = (int'(ts_max) + K > LEN);
    to_hs     = (int'(t_ex) - 1 >= N_SS);

    stall_brt   = valid && !found && !win_short;
    stall_range = valid && !fits && !stall_brt;
    stall_hs    = valid && fits && to_hs && !hs_free;
    fire        = valid && fits && !(to_hs && !hs_free);

    // station record
    entry       = '0;
    entry.busy  = 1'b1;
    entry.op    = instr.op;
    entry.fu    = fu;
    entry.swap  = a_is_last;
    entry.ex    = rp_t'(t_ex - 1'b1);
    if (ts_min == '0) begin
      entry.avail = 1'b1;
      entry.val   = a_is_last ? val_b : val_a;
    end else begin
      entry.avail = 1'b0;
      entry.val   = pack_wait(a_is_last ? fu_b : fu_a, rp_t'(ts_min - 1'b1));
    end
    if (ts_max == '0) begin
      entry.wait2 = 1'b0;
    end else begin
      entry.wait2 = 1'b1;
      entry.fu2   = a_is_last ? fu_a : fu_b;
      entry.ts2   = rp_t'(ts_max - 1'b1);
    end

    // destinations of the record
    hs_we    = fire && to_hs;
    ss_we    = '0;
    ss_slot  = '0;
    if (fire && !to_hs) begin
      ss_we[fu] = 1'b1;
      ss_slot   = ($clog2(N_SS))'(t_ex - 1'b1);
    end
    chain_we  = '0;
    chain_idx = ($clog2(K))'(off);
    chain_val = a_is_last ? val_a : val_b;
    if (fire && ts_max == '0) chain_we[fu] = 1'b1;

    brt_set      = '0;
    brt_set[fu]  = fire;
    brt_idx      = ($clog2(LEN))'(t_ex - 1'b1);

    sb_we = fire && (instr.rd != '0);
    sb_rd = instr.rd;
    sb_td = rp_t'(td_full);
    sb_fu = fu;
  end

endmodule
