// functional_unit: fixed-latency pipelined FU with its CDB output latch.
//
// The FU receives the bottom shift station (operation type and the operand
// captured by the station) and the bottom register of the left-input delay
// chain (the operand that arrived last).  'swap' tells which of the two is the
// instruction's first source, so that non-commutative operations (SUB, the
// shifts, SLT) see their operands in program order.
// The result is computed in the first EX period and then travels through
// LAT-1 registers; the last of them is the output latch that drives this FU's
// own CDB during the WB period.  So an operation executing in period T_EX is on
// the CDB in period T_EX + LAT - 1, and a new operation can start every cycle.
// KIND selects the integer ALU (LAT 2: EX, WB) or the multiplier (LAT 4:
// E1 E2 E3 WB).
// Follows the document: full latencies 2 and 4 including WB, one CDB per FU
// with no tag, an output latch in front of the CDB, operand-order handling in
// the FU.  Own choices: the operation set, full pipelining, and computing the
// product in E1 and only delaying it in E2/E3.
module functional_unit
  import cs_pkg::*;
#(
  parameter fu_t         KIND = FU_INT,
  parameter int unsigned LAT  = (KIND == FU_MULT) ? L_MULT : L_INT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ex_valid,
  input  op_e   ex_op,
  input  logic  ex_swap,
  input  word_t ex_ss_val,
  input  word_t ex_chain_val,
  output logic  cdb_valid,
  output word_t cdb_data
);

  word_t src1, src2, result;
  word_t pipe_d [LAT-1];
  logic  pipe_v [LAT-1];

  always_comb begin
    src1 = ex_swap ? ex_chain_val : ex_ss_val;
    src2 = ex_swap ? ex_ss_val    : ex_chain_val;
    if (KIND == FU_MULT) result = src1 * src2;
    else                 result = alu(ex_op, src1, src2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT - 1; i++) begin
        pipe_d[i] <= '0;
        pipe_v[i] <= 1'b0;
      end
    end else begin
      pipe_d[0] <= ex_valid ? result : '0;
      pipe_v[0] <= ex_valid;
      for (int i = 1; i < LAT - 1; i++) begin
        pipe_d[i] <= pipe_d[i-1];
        pipe_v[i] <= pipe_v[i-1];
      end
    end
  end

  assign cdb_valid = pipe_v[LAT-2];
  assign cdb_data  = pipe_d[LAT-2];

endmodule
