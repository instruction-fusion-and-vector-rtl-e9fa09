// SMT vector processor system: the hardware between the application cores
// and the vector processor, and the vector processor itself.
//
// Four application cores push 32-bit words (vector instructions and their
// operand words) through the thread-fusion switch into four 16-word
// first-word-fall-through FIFOs. The round-robin arbitrator collects whole
// instructions from the non-empty FIFOs and hands them to the vector
// controller, which renames virtual registers through the 128-entry TLT
// (written by the control core over tlt_w*), checks hazards and
// broadcasts the operations to the lanes. The hosts reach the vector
// memory through vm_* (word addressed, 64 KB). The control core writes
// the lane-state register (1, 2 or 4 active lanes), the per-thread
// VM-half bits and the host VM-half bit through cfg_*, and the fusion
// switch settings through fuse_*.
//
// The application cores, control core, system bus, DMA engine, system
// memory and I/O devices are outside this module; their connections are
// the ports. The register management software that fills the TLT runs on
// the control core. lane_pg gives the lanes to power gate.
//
// The fused-mode dual-pipeline processor (the instruction-fusion design)
// is a separate design; it stands beside the vector processor with its
// own mips_* ports and shares only the clock and reset.
module svp_top #(
  parameter int NCORES = 4,
  parameter int FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // application-core instruction streams
  input  logic [NCORES-1:0] core_valid,
  input  logic [31:0]       core_data [NCORES],
  output logic [NCORES-1:0] core_ready,
  // thread fusion
  input  logic              fuse_en,
  input  logic [1:0]        fuse_src,
  input  logic [1:0]        fuse_dst,
  input  logic [1:0]        fuse_tid,
  // TLT update from the control core
  input  logic              tlt_we,
  input  logic [6:0]        tlt_widx,
  input  logic [5:0]        tlt_wpreg,
  // lane and thread state
  input  logic              cfg_we,
  input  logic [1:0]        cfg_lanes_log2,
  input  logic [3:0]        cfg_vm_hi,
  input  logic              cfg_host_hi,
  // host access to the vector memory
  input  logic              vm_en,
  input  logic              vm_we,
  input  logic [13:0]       vm_addr,
  input  logic [31:0]       vm_wdata,
  output logic [31:0]       vm_rdata,
  output logic              vm_rvalid,
  // status
  output logic [3:0]        lane_pg,
  output logic              vp_idle,
  output logic              stall_hazard,
  output logic              stall_full,
  output logic              shuf_conflict,
  output logic [3:0]        alu_busy,
  output logic [3:0]        ldst_busy,
  output logic              alu_done,
  output logic              ldst_done,
  output logic [NCORES-1:0] fifo_full,
  output logic [$clog2(FIFO_DEPTH):0] fifo_count [NCORES],
  output logic [1:0]        arb_port,      // core whose instruction was issued last
  output logic [1:0]        lanes_log2,
  // fused-mode dual-pipeline processor
  input  logic              mips_imem_we,
  input  logic [11:0]       mips_imem_waddr,
  input  logic [31:0]       mips_imem_wdata,
  input  logic              mips_dmem_we,
  input  logic [11:0]       mips_dmem_addr,
  input  logic [31:0]       mips_dmem_wdata,
  output logic [31:0]       mips_dmem_rdata,
  output logic              mips_fuse_state,
  output logic              mips_fetch1_active,
  output logic              mips_decode1_active,
  output logic              mips_halted,
  output logic [1:0]        mips_retired,
  output logic              mips_stall,
  output logic [31:0]       mips_pc
);
  import vp_pkg::*;

  logic [NCORES-1:0] f_wr, f_empty, f_rd;
  logic [31:0]       f_wdata [NCORES], f_rdata [NCORES];

  fusion_switch #(.NPORTS(NCORES)) u_switch (
    .clk, .rst_n, .fuse_en, .fuse_src, .fuse_dst, .fuse_tid,
    .in_valid(core_valid), .in_data(core_data), .in_ready(core_ready),
    .fifo_wr(f_wr), .fifo_wdata(f_wdata), .fifo_full(fifo_full));

  for (genvar c = 0; c < NCORES; c++) begin : g_fifo
    vinstr_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .wr_en(f_wr[c]), .wr_data(f_wdata[c]),
      .rd_en(f_rd[c]), .rd_data(f_rdata[c]), .empty(f_empty[c]), .full(fifo_full[c]),
      .count(fifo_count[c]));
  end

  logic  a_valid, a_ready;
  vpkt_t a_pkt;

  vp_arbiter #(.NPORTS(NCORES)) u_arb (
    .clk, .rst_n, .fifo_empty(f_empty), .fifo_data(f_rdata), .fifo_rd(f_rd),
    .out_valid(a_valid), .out_pkt(a_pkt), .out_port(arb_port), .out_ready(a_ready));

  logic [6:0] t_idx  [3];
  logic [5:0] t_preg [3];

  tlt u_tlt (.clk, .rst_n, .wr_en(tlt_we), .wr_idx(tlt_widx), .wr_preg(tlt_wpreg),
             .rd_idx(t_idx), .rd_preg(t_preg));

  vp_core u_vp (
    .clk, .rst_n,
    .cfg_we, .cfg_lanes_log2, .cfg_vm_hi, .cfg_host_hi,
    .in_valid(a_valid), .in_pkt(a_pkt), .in_ready(a_ready),
    .tlt_idx(t_idx), .tlt_preg(t_preg),
    .h_en(vm_en), .h_we(vm_we), .h_addr(vm_addr), .h_wdata(vm_wdata),
    .h_rdata(vm_rdata), .h_rvalid(vm_rvalid),
    .lane_pg, .lanes_log2, .idle(vp_idle), .stall_hazard, .stall_full, .shuf_conflict,
    .alu_busy, .ldst_busy, .alu_done, .ldst_done);

  fused_mips u_mips (
    .clk, .rst_n,
    .imem_we(mips_imem_we), .imem_waddr(mips_imem_waddr), .imem_wdata(mips_imem_wdata),
    .dmem_we(mips_dmem_we), .dmem_addr(mips_dmem_addr), .dmem_wdata(mips_dmem_wdata),
    .dmem_rdata(mips_dmem_rdata), .fuse_state(mips_fuse_state),
    .fetch1_active(mips_fetch1_active), .decode1_active(mips_decode1_active),
    .halted(mips_halted), .retired(mips_retired), .stall(mips_stall), .pc(mips_pc));

endmodule
