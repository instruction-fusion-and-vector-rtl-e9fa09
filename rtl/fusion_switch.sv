// Thread-fusion switch in front of the vector instruction FIFOs.
//
// Normally each application core's word stream goes to its own FIFO (the
// default path). When fusion is on, every word from core fuse_src is also
// copied into the FIFO of core fuse_dst, and in each copied instruction
// word the thread ID field is replaced by fuse_tid, so the vector
// processor runs the one instruction stream twice, in two independent
// virtual register and memory spaces. Core fuse_dst's own input is held
// off while fused. A word passes only when every FIFO it goes to has
// room (in_ready). The switch tracks which words are operand words (they
// follow an instruction for which vp_pkg::has_data is true) so it never
// rewrites data. The document gives the duplication; the ID rewrite is how
// this design lets the duplicate address its own translation table space.
module fusion_switch #(
  parameter int NPORTS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fuse_en,
  input  logic [$clog2(NPORTS)-1:0] fuse_src,
  input  logic [$clog2(NPORTS)-1:0] fuse_dst,
  input  logic [1:0]        fuse_tid,
  // from the cores
  input  logic [NPORTS-1:0] in_valid,
  input  logic [31:0]       in_data [NPORTS],
  output logic [NPORTS-1:0] in_ready,
  // to the FIFOs
  output logic [NPORTS-1:0] fifo_wr,
  output logic [31:0]       fifo_wdata [NPORTS],
  input  logic [NPORTS-1:0] fifo_full
);
  import vp_pkg::*;

  logic [NPORTS-1:0] expect_data;   // next word of this core is an operand

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      in_ready[p]   = !fifo_full[p];
      fifo_wr[p]    = in_valid[p] && !fifo_full[p];
      fifo_wdata[p] = in_data[p];
    end
    if (fuse_en) begin
      in_ready[fuse_dst]   = 1'b0;
      in_ready[fuse_src]   = !fifo_full[fuse_src] && !fifo_full[fuse_dst];
      fifo_wr[fuse_src]    = in_valid[fuse_src] && in_ready[fuse_src];
      fifo_wr[fuse_dst]    = fifo_wr[fuse_src];
      fifo_wdata[fuse_dst] = in_data[fuse_src];
      if (!expect_data[fuse_src]) fifo_wdata[fuse_dst][10:9] = fuse_tid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) expect_data <= '0;
    else
      for (int p = 0; p < NPORTS; p++)
        if (in_valid[p] && in_ready[p])
          expect_data[p] <= expect_data[p] ? 1'b0 : has_data(vop_e'(in_data[p][31:28]));
  end

endmodule
