// brt_search: K_UF-bit search for the first free execution period.
//
// Starting at bit 'start' of the FU's reservation table (bit j = period j+1, see
// brt), the K_UF bits start .. start+K_UF-1 are examined by a priority encoder
// and the first free one gives the execution period T_EX = start + offset + 1.
// When the CDB is also a shared resource (USE_CDB = 1) each FU bit is first ORed
// with the CDB table bit DUR places further on, DUR being the number of periods
// from the start of EX to WB, so that the chosen period also finds the CDB free
// at T_WB = T_EX + DUR.  Bits beyond the end of the tables count as occupied, so
// a window that runs past the table can fail to find a period (a stall).
// Purely combinational.
// Follows the document: priority encoder over K_UF bits, OR of FU and shifted
// CDB tables, T_EX and T_WB outputs.  Own choice: out-of-table bits are busy.
module brt_search
  import cs_pkg::*;
#(
  parameter int unsigned LEN     = PCLK_MAX,
  parameter int unsigned K       = K_UF_DEF,
  parameter int unsigned DUR     = L_INT - 1,
  parameter bit          USE_CDB = 1'b0
) (
  input  logic [LEN-1:0] fu_bits,
  input  logic [LEN-1:0] cdb_bits,
  input  rp_t            start,
  output logic           found,
  output logic [$clog2(K+1)-1:0] offset,
  output logic [RP_W:0]  t_ex,     // one bit wider: may exceed the counter range
  output logic [RP_W+1:0] t_wb
);

  logic [K-1:0] busy;

  always_comb begin
    for (int o = 0; o < K; o++) begin
      int unsigned j;
      j = int'(start) + o;
      busy[o] = (j >= LEN) || fu_bits[j % LEN];
      if (USE_CDB)
        busy[o] = busy[o] || (j + DUR >= LEN) || cdb_bits[(j + DUR) % LEN];
    end
    found  = 1'b0;
    offset = '0;
    for (int o = K - 1; o >= 0; o--) begin
      if (!busy[o]) begin
        found  = 1'b1;
        offset = o[$clog2(K+1)-1:0];
      end
    end
    t_ex = (RP_W+1)'(start) + (RP_W+1)'(offset) + 1'b1;
    t_wb = (RP_W+2)'(t_ex) + (RP_W+2)'(DUR);
  end

endmodule
