// shift_stations: the stack of shift stations (SS) in front of one FU, with the
// delay chain on the FU's other ("left") input.
//
// Slot s of the stack holds the instruction that executes s cycles from now:
// slot 0 is the register feeding the FU in the current period, and every cycle
// each slot moves one place down, so time "goes down" to the FU and no selection
// logic is needed.  An instruction enters either directly from the issue stage
// (into slot T_EX-1) or, when launched from a hold station, into the top slot.
// While moving down, a station counts down the RP of its first operand and
// captures it from CDB FU1 when it expires (the operand field holds either the
// value or {FU1, RP}).  It also counts down Ts, the RP of its last operand; when
// Ts expires it orders the delay chain to load CDB FU2.
// The delay chain has K_UF registers; chain register j holds the last operand
// of the instruction executing j+1 cycles from now, and also moves down one
// place per cycle.  A last operand captured while its station sits in slot s
// therefore goes into chain register s-1; one already available at issue goes
// into register T_EX-1 directly.  Because at most one instruction per FU
// executes in a period, neither the stack nor the chain can ever be claimed
// twice for the same register.
// Timing: a record written in cycle c to slot s executes in cycle c+1+s; the
// outputs ex_* are registers and present slot 0 and chain register 0.
// Follows the document: the in-order stack, the per-station capture by RP from
// the CDB named by FU1, FU2 with Ts and the extra K_UF-1 registers on the left
// input.  Own choices: binary down counters rather than one-hot shifted RPs,
// and the launch from a hold station is treated as a virtual slot N_SS.
module shift_stations
  import cs_pkg::*;
#(
  parameter int unsigned N_SS = N_SS_DEF,
  parameter int unsigned K    = K_UF_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  word_t [NUM_FU-1:0]       cdb,
  // from the issue stage
  input  logic                     we,
  input  logic [$clog2(N_SS)-1:0]  slot,
  input  station_t                 entry,
  input  logic                     chain_we,
  input  logic [$clog2(K)-1:0]     chain_idx,
  input  word_t                    chain_val,
  // from the hold stations
  input  logic                     launch,
  input  station_t                 launch_entry,
  // to the FU
  output logic                     ex_valid,
  output op_e                      ex_op,
  output logic                     ex_swap,
  output word_t                    ex_ss_val,      // operand from the station
  output word_t                    ex_chain_val,   // operand from the delay chain
  output logic [N_SS-1:0]          slot_busy,
  output logic                     last_capture    // a chain register loads a CDB
);

  station_t ss_q [N_SS];
  station_t ss_d [N_SS];
  word_t    ch_q [K];
  word_t    ch_d [K];

  always_comb begin
    // time moves on
    for (int j = 0; j < K; j++) ch_d[j] = (j + 1 < K) ? ch_q[j+1] : '0;
    for (int s = 0; s < N_SS; s++) ss_d[s] = '0;
    last_capture = 1'b0;
    for (int s = 1; s < N_SS; s++) begin
      ss_d[s-1] = station_tick(ss_q[s], cdb);
      if (ss_q[s].busy && ss_q[s].wait2 && ss_q[s].ts2 == '0 && s - 1 < K) begin
        ch_d[(s-1) % K] = cdb[ss_q[s].fu2];
        last_capture    = 1'b1;
      end
    end
    if (launch) begin
      ss_d[N_SS-1] = station_tick(launch_entry, cdb);
      if (launch_entry.wait2 && launch_entry.ts2 == '0 && N_SS - 1 < K) begin
        ch_d[(N_SS-1) % K] = cdb[launch_entry.fu2];
        last_capture       = 1'b1;
      end
    end
    // the issuing instruction
    if (we) ss_d[slot] = entry;
    if (chain_we) ch_d[chain_idx] = chain_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SS; s++) ss_q[s] <= '0;
      for (int j = 0; j < K; j++) ch_q[j] <= '0;
    end else begin
      for (int s = 0; s < N_SS; s++) ss_q[s] <= ss_d[s];
      for (int j = 0; j < K; j++) ch_q[j] <= ch_d[j];
    end
  end

  always_comb begin
    ex_valid     = ss_q[0].busy;
    ex_op        = ss_q[0].op;
    ex_swap      = ss_q[0].swap;
    ex_ss_val    = ss_q[0].val;
    ex_chain_val = ch_q[0];
    for (int s = 0; s < N_SS; s++) slot_busy[s] = ss_q[s].busy;
  end

  // The bottom station always has both operands; nobody writes a busy slot.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ss_q[0].busy |-> (ss_q[0].avail && !ss_q[0].wait2));
  assert property (@(posedge clk) disable iff (!rst_n)
                   we |-> !(int'(slot) + 1 < N_SS && ss_q[(int'(slot)+1) % N_SS].busy));
  assert property (@(posedge clk) disable iff (!rst_n)
                   launch |-> !(we && int'(slot) == N_SS - 1));

endmodule
