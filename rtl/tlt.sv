// Translation lookup table: virtual to physical vector register names.
//
// 128 entries, indexed by the 2-bit thread ID concatenated with the 5-bit
// virtual register name (entries 0-31 belong to thread 0, 32-63 to
// thread 1, and so on). Each entry holds a 6-bit physical register name.
// The table has three combinational read ports, one per register field of
// an instruction, and one write port driven by the register management
// software on the control core. Entries reset to the identity mapping of
// the low virtual names (this design's choice; the document has the
// management software fill every entry a thread uses before it runs).
module tlt #(
  parameter int ENTRIES = 128,
  parameter int IDX_W   = 7,
  parameter int PREG_W  = vp_pkg::PREG_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_idx,
  input  logic [PREG_W-1:0] wr_preg,
  input  logic [IDX_W-1:0]  rd_idx  [3],
  output logic [PREG_W-1:0] rd_preg [3]
);
  logic [PREG_W-1:0] table_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) table_q[i] <= PREG_W'(i % 32);
    end else if (wr_en) begin
      table_q[wr_idx] <= wr_preg;
    end
  end

  always_comb
    for (int p = 0; p < 3; p++) rd_preg[p] = table_q[rd_idx[p]];

endmodule
