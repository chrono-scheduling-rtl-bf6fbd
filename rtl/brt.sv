// brt: binary reservation table of one shared resource (an FU or a CDB).
//
// Bit j of 'bits' says whether the resource is already reserved (1) or free (0)
// in the period j+1 cycles after the current one; the current period itself is
// never searched, since an instruction in its IS stage cannot use a resource in
// that same period.  Every cycle the table shifts one place towards bit 0 (time
// moving on), and the reservation made by the instruction issuing in this cycle
// ('set' at index 'set_idx') is merged in before the shift.  Periods beyond the
// table length enter as free.  As a consequence the top bit always reads 0
// (period LEN seen from now was period LEN+1 when the last instruction issued,
// out of its reach); it is kept so that the table and its search cover the
// same LEN periods, and synthesis removes its flop.
// Follows the document: a "0" means free, a "1" occupied, the table advances
// with time and the issue stage sets the T_EX bit.  Own choices: bit 0 is the
// next period (so a search that starts at Ts begins at bit Ts), synchronous
// reservation, reset to all free.
module brt
  import cs_pkg::*;
#(
  parameter int unsigned LEN = PCLK_MAX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   set,
  input  logic [$clog2(LEN)-1:0] set_idx,
  output logic [LEN-1:0]         bits
);

  logic [LEN-1:0] mask;

  always_comb begin
    mask = '0;
    if (set) mask[set_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bits <= '0;
    else        bits <= (bits | mask) >> 1;
  end

  // A reservation is only ever made on a free period.
  assert property (@(posedge clk) disable iff (!rst_n) set |-> !bits[set_idx]);

endmodule
