// hold_stations: common pool of hold stations (HS) above the shift stations.
//
// An instruction whose execution period is further away than the shift
// stations reach is parked here.  Each busy entry counts down, every cycle:
// its first-operand RP (capturing the value from CDB FU1 when it expires), the
// RP of its last operand, and its EX counter.  When the EX counter of an entry
// reads N_SS it is launched: it leaves the pool through a per-FU multiplexer and
// enters the top shift station of its FU, so that it reaches the bottom one
// exactly in its EX period.  Because the reservation tables never give two
// instructions of one FU the same EX period, at most one entry per FU launches
// in a cycle and that entry is always the one of its FU with the smallest EX
// counter.  The multiplexer select is therefore a register ("next HS to be
// launched"), recomputed every cycle from the next state of the pool, i.e.
// whenever an entry is occupied or launched, and it never sits on the launch
// path.
// Interface: 'we'/'entry' allocate the lowest-numbered free entry (the issue
// stage only writes when 'any_free' is set); 'launch[f]'/'launch_entry[f]' give
// the entry leaving for FU f in this cycle, not yet updated for this cycle.
// Follows the document: allocate/free bit, avail/wait bit, FU2, first operand
// RP/value, FU1, type of operation, second-operand RP, the launch multiplexer
// and its next-HS register.  Own choices: one pool shared by both FUs (as in
// the two-FU floor plan), lowest-free allocation, and a launched entry is free
// again from the next cycle.
module hold_stations
  import cs_pkg::*;
#(
  parameter int unsigned N_HS = N_HS_DEF,
  parameter int unsigned N_SS = N_SS_DEF
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  station_t                  entry,
  input  word_t [NUM_FU-1:0]        cdb,
  output logic                      any_free,
  output logic [NUM_FU-1:0]         launch,
  output station_t [NUM_FU-1:0]     launch_entry,
  output logic [$clog2(N_HS+1)-1:0] occupancy
);

  localparam int unsigned IW = (N_HS > 1) ? $clog2(N_HS) : 1;

  station_t hs_q [N_HS];
  station_t hs_d [N_HS];
  logic [IW-1:0] nxt_q [NUM_FU];
  logic [IW-1:0] nxt_d [NUM_FU];
  logic [IW-1:0] alloc_idx;
  logic          alloc_ok;

  // launch multiplexers, selected by the registered next-HS pointers
  always_comb begin
    for (int f = 0; f < NUM_FU; f++) begin
      launch_entry[f] = hs_q[nxt_q[f]];
      launch[f]       = hs_q[nxt_q[f]].busy && (hs_q[nxt_q[f]].fu == fu_t'(f)) &&
                        (hs_q[nxt_q[f]].ex == rp_t'(N_SS));
    end
  end

  // free-entry search
  always_comb begin
    alloc_ok  = 1'b0;
    alloc_idx = '0;
    occupancy = '0;
    for (int i = N_HS - 1; i >= 0; i--) begin
      if (!hs_q[i].busy) begin
        alloc_ok  = 1'b1;
        alloc_idx = IW'(i);
      end
    end
    for (int i = 0; i < N_HS; i++)
      if (hs_q[i].busy) occupancy = occupancy + 1'b1;
    any_free = alloc_ok;
  end

  // next state and next launch pointers
  always_comb begin
    for (int i = 0; i < N_HS; i++) begin
      hs_d[i] = station_tick(hs_q[i], cdb);
      for (int f = 0; f < NUM_FU; f++)
        if (launch[f] && nxt_q[f] == IW'(i)) hs_d[i].busy = 1'b0;
    end
    if (we && alloc_ok) hs_d[alloc_idx] = entry;
    for (int f = 0; f < NUM_FU; f++) begin
      rp_t best;
      best     = '1;
      nxt_d[f] = nxt_q[f];
      for (int i = 0; i < N_HS; i++) begin
        if (hs_d[i].busy && hs_d[i].fu == fu_t'(f) && hs_d[i].ex <= best) begin
          best     = hs_d[i].ex;
          nxt_d[f] = IW'(i);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_HS; i++) hs_q[i] <= '0;
      for (int f = 0; f < NUM_FU; f++) nxt_q[f] <= '0;
    end else begin
      for (int i = 0; i < N_HS; i++) hs_q[i] <= hs_d[i];
      for (int f = 0; f < NUM_FU; f++) nxt_q[f] <= nxt_d[f];
    end
  end

  // An entry never waits past its launch period, and the pool is never
  // written when full.
  for (genvar i = 0; i < N_HS; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     hs_q[i].busy |-> hs_q[i].ex >= rp_t'(N_SS));
  end
  assert property (@(posedge clk) disable iff (!rst_n) we |-> alloc_ok);

endmodule
