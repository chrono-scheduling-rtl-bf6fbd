// chrono_core: scalar out-of-order execution core with a chrono-scheduler.
//
// Decoded instructions enter in program order, one per cycle at most.  In its
// IS period each instruction reads from the register scoreboard when each
// source will be on a CDB, searches the reservation table of its FU for the
// first free execution period, records its destination's new RP and FU in the
// scoreboard, reserves the period, and leaves as a station record that already
// knows every future event: when to capture each operand and when to execute.
// Records close to execution go straight into the FU's shift stations; the
// others wait in the common pool of hold stations and are launched into the top
// shift station at the right moment.  Results go out on the FU's own CDB in the
// WB period and are picked up, by time alone, by the scoreboard and by the
// stations that wait for them.  There are no tags, no renaming and no wake-up
// or select logic.
//
//   in_valid/in_instr/in_ready  decoded instruction stream (valid/ready; an
//                               instruction not accepted is a structural stall)
//   cdb_valid/cdb_data          the CDBs, one per FU (INT = 0, MULT = 1)
//   dbg_addr/dbg_val/dbg_rp     register inspection; idle = nothing in flight
//   ev_*                        one-cycle event strobes for statistics
//
// Follows the document: the IF-IS-EX-WB pipeline of a Tomasulo-like scalar
// machine, L_UF = 2 (INT) and 4 (MULT), one FU and one CDB per FU, three shift
// stations per FU, K_UF = 2, hold stations above the shift stations, and the
// counter width of Eq. (1)/(2).  Own choices: 8 hold stations shared by both
// FUs, the operation set, R0 hardwired to zero, and the valid/ready input.
module chrono_core
  import cs_pkg::*;
#(
  parameter int unsigned N_HS = N_HS_DEF,
  parameter int unsigned N_SS = N_SS_DEF,
  parameter int unsigned K    = K_UF_DEF,
  parameter int unsigned LEN  = PCLK_MAX
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  instr_t                in_instr,
  output logic                  in_ready,
  output logic  [NUM_FU-1:0]    cdb_valid,
  output word_t [NUM_FU-1:0]    cdb_data,
  input  reg_t                  dbg_addr,
  output word_t                 dbg_val,
  output rp_t                   dbg_rp,
  output logic                  idle,
  // statistics strobes
  output logic                  ev_issue,
  output rp_t                   ev_td,          // Td of the issuing instruction
  output logic [RP_W:0]         ev_tex,         // T_EX of the issuing instruction
  output fu_t                   ev_fu,          // FU of the issuing instruction
  output logic                  ev_to_hs,
  output logic [NUM_FU-1:0]     ev_launch,
  output logic                  ev_delayed,
  output logic                  ev_cdb_bypass,
  output logic [NUM_FU-1:0]     ev_last_capture,
  output logic                  ev_stall_hs,
  output logic                  ev_stall_brt,
  output logic                  ev_stall_range
);

  // scoreboard <-> issue
  rp_t   ts_a, ts_b;
  fu_t   fu_a, fu_b;
  word_t val_a, val_b;
  logic  hit_a, hit_b, sb_busy;
  logic  sb_we;
  reg_t  sb_rd;
  rp_t   sb_td;
  fu_t   sb_fu;

  // reservation tables
  logic [NUM_FU-1:0][LEN-1:0] brt_bits;
  logic [NUM_FU-1:0]          brt_set;
  logic [$clog2(LEN)-1:0]     brt_idx;

  // stations
  logic                       hs_free, hs_we;
  logic [NUM_FU-1:0]          hs_launch;
  station_t [NUM_FU-1:0]      hs_launch_entry;
  logic [$clog2(N_HS+1)-1:0]  hs_occ;
  logic [NUM_FU-1:0]          ss_we, chain_we;
  logic [$clog2(N_SS)-1:0]    ss_slot;
  logic [$clog2(K)-1:0]       chain_idx;
  word_t                      chain_val;
  station_t                   entry;
  logic                       fire;

  // FU side
  logic  [NUM_FU-1:0]         ex_valid, ex_swap;
  op_e                        ex_op        [NUM_FU];
  word_t                      ex_ss_val    [NUM_FU];
  word_t                      ex_chain_val [NUM_FU];
  logic  [NUM_FU-1:0][N_SS-1:0] slot_busy;

  reg_scoreboard u_sb (
    .clk, .rst_n,
    .rs_a(in_instr.rs1), .rs_b(in_instr.rs2),
    .ts_a, .ts_b, .fu_a, .fu_b, .val_a, .val_b,
    .cdb_hit_a(hit_a), .cdb_hit_b(hit_b),
    .we(sb_we), .wr_rd(sb_rd), .wr_td(sb_td), .wr_fu(sb_fu),
    .cdb(cdb_data),
    .dbg_addr, .dbg_val, .dbg_rp, .busy_any(sb_busy)
  );

  issue_unit #(.LEN(LEN), .K(K), .N_SS(N_SS)) u_issue (
    .valid(in_valid), .instr(in_instr), .fire,
    .ts_a, .ts_b_reg(ts_b), .fu_a, .fu_b, .val_a, .val_b_reg(val_b),
    .sb_we, .sb_rd, .sb_td, .sb_fu,
    .brt_bits, .brt_set, .brt_idx,
    .hs_free, .hs_we,
    .ss_we, .ss_slot, .entry,
    .chain_we, .chain_idx, .chain_val,
    .fu(ev_fu), .t_ex(ev_tex), .delayed(ev_delayed),
    .stall_hs(ev_stall_hs), .stall_brt(ev_stall_brt), .stall_range(ev_stall_range)
  );

  hold_stations #(.N_HS(N_HS), .N_SS(N_SS)) u_hs (
    .clk, .rst_n, .we(hs_we), .entry, .cdb(cdb_data),
    .any_free(hs_free), .launch(hs_launch), .launch_entry(hs_launch_entry),
    .occupancy(hs_occ)
  );

  for (genvar f = 0; f < NUM_FU; f++) begin : g_fu
    brt #(.LEN(LEN)) u_brt (
      .clk, .rst_n, .set(brt_set[f]), .set_idx(brt_idx), .bits(brt_bits[f])
    );

    shift_stations #(.N_SS(N_SS), .K(K)) u_ss (
      .clk, .rst_n, .cdb(cdb_data),
      .we(ss_we[f]), .slot(ss_slot), .entry,
      .chain_we(chain_we[f]), .chain_idx, .chain_val,
      .launch(hs_launch[f]), .launch_entry(hs_launch_entry[f]),
      .ex_valid(ex_valid[f]), .ex_op(ex_op[f]), .ex_swap(ex_swap[f]),
      .ex_ss_val(ex_ss_val[f]), .ex_chain_val(ex_chain_val[f]),
      .slot_busy(slot_busy[f]), .last_capture(ev_last_capture[f])
    );

    functional_unit #(.KIND(fu_t'(f))) u_fu (
      .clk, .rst_n,
      .ex_valid(ex_valid[f]), .ex_op(ex_op[f]), .ex_swap(ex_swap[f]),
      .ex_ss_val(ex_ss_val[f]), .ex_chain_val(ex_chain_val[f]),
      .cdb_valid(cdb_valid[f]), .cdb_data(cdb_data[f])
    );
  end

  assign in_ready      = fire;
  assign ev_issue      = fire;
  assign ev_td         = sb_td;
  assign ev_to_hs      = hs_we;
  assign ev_launch     = hs_launch;
  assign ev_cdb_bypass = fire && (hit_a || (hit_b && !in_instr.use_imm));
  assign idle          = !sb_busy && (hs_occ == '0) && (slot_busy == '0);

endmodule
