// Vector controller (VC): the three shared front-end stages of the vector
// processor pipeline, plus the lane-state and thread-state registers.
//
//   RR  register renaming: the instruction's thread ID and its three 5-bit
//       virtual register names index the triple-ported TLT; the physical
//       names replace them at the end of the stage.
//   HD  hazard detection: the per-thread HDU of the instruction's thread
//       compares it with that thread's last ALU and LDST instruction; on a
//       hazard the instruction waits here and the stall propagates back.
//   IS  instruction separation: the virtualized lane operation is pushed
//       into the ALU or the LDST FIFO of every active lane.
//
// Virtualization applied between HD and IS (document, Sections 4.2 and
// 9.1): with 2^L active lanes each lane handles VL/2^L elements, so the
// element count is VL >> L, a physical register p starts at lane-local
// VRF address p * (VL >> L), and the VM base address N becomes
// N << (2 - L). For a thread whose thread-state bit is set the most
// significant bit of its VM addresses is flipped, which maps its virtual
// VM space onto the upper half of every bank (Section 9.2).
//
// in_ready is high unless an instruction is stalled by a hazard or the
// lane FIFOs it needs are full, as the document describes. The lane-state
// register (log2 of the active lanes: 0, 1 or 2) and the thread-state
// register are written through the cfg port; the document only says a
// simple control instruction sets them. Operand-word formats (unit-stride
// address in bits 11:0; strided address in 15:0 and stride in 27:16) are
// this design's own.
//
// The HDUs' in-flight counters (alu_cnt, ldst_cnt) are left unconnected
// on purpose: the controller needs only each HDU's hazard flag, and the
// counters stay as outputs for testing the HDU on its own.
module vector_controller #(
  parameter int NLANES   = vp_pkg::NLANES,
  parameter int NTHREADS = vp_pkg::NTHREADS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  logic                  cfg_we,
  input  logic [1:0]            cfg_lanes_log2,
  input  logic [NTHREADS-1:0]   cfg_vm_hi,
  output logic [1:0]            lanes_log2,
  output logic [NTHREADS-1:0]   vm_hi,
  output logic [NLANES-1:0]     lane_active,
  // from the arbitrator
  input  logic                  in_valid,
  input  vp_pkg::vpkt_t         in_pkt,
  output logic                  in_ready,
  // TLT read ports
  output logic [6:0]            tlt_idx  [3],
  input  logic [5:0]            tlt_preg [3],
  // to the lanes (broadcast)
  output logic                  alu_push,
  output logic                  ldst_push,
  output vp_pkg::lane_op_t      lane_op,
  input  logic                  alu_full,
  input  logic                  ldst_full,
  // completions from the lanes
  input  logic                  alu_done,
  input  logic [1:0]            alu_done_tid,
  input  logic                  ldst_done,
  input  logic [1:0]            ldst_done_tid,
  // status
  output logic                  stall_hazard,
  output logic                  stall_full,
  output logic                  idle
);
  import vp_pkg::*;

  // ---------------- configuration registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lanes_log2 <= 2'd2;
      vm_hi      <= '0;
    end else if (cfg_we) begin
      lanes_log2 <= (cfg_lanes_log2 > 2'd2) ? 2'd2 : cfg_lanes_log2;
      vm_hi      <= cfg_vm_hi;
    end
  end

  always_comb
    for (int l = 0; l < NLANES; l++) lane_active[l] = (l < (1 << lanes_log2));

  // ---------------- pipeline registers ----------------
  logic              r1_v, r2_v, r3_v;
  vpkt_t             r1;
  vpkt_t             r2;
  logic [5:0]        r2_pd, r2_ps1, r2_ps2;
  lane_op_t          r3;
  logic              r3_ldst;

  logic [NTHREADS-1:0] haz_t;
  logic                hazard;

  wire r3_push = r3_v && (r3_ldst ? !ldst_full : !alu_full);
  wire r3_adv  = !r3_v || r3_push;
  wire r2_go   = r2_v && !hazard && r3_adv;
  wire r2_adv  = !r2_v || r2_go;
  wire r1_adv  = !r1_v || r2_adv;

  assign in_ready     = r1_adv;
  assign stall_hazard = r2_v && hazard;
  assign stall_full   = r3_v && !r3_push;
  assign idle         = !r1_v && !r2_v && !r3_v;
  assign alu_push     = r3_v && !r3_ldst && !alu_full;
  assign ldst_push    = r3_v &&  r3_ldst && !ldst_full;
  assign lane_op      = r3;

  // RR stage: TLT lookup
  assign tlt_idx[0] = {r1.ins.tid, r1.ins.dst};
  assign tlt_idx[1] = {r1.ins.tid, r1.ins.src1};
  assign tlt_idx[2] = {r1.ins.tid, r1.ins.src2};

  // HD stage: one HDU per thread
  for (genvar t = 0; t < NTHREADS; t++) begin : g_hdu
    hdu u_hdu (
      .clk, .rst_n,
      .chk_valid (r2_v && r2.ins.tid == 2'(t)),
      .chk_op    (r2.ins.op),
      .chk_dst   (r2_pd),
      .chk_src1  (r2_ps1),
      .chk_src2  (r2_ps2),
      .hazard    (haz_t[t]),
      .issue     (r2_go && r2.ins.tid == 2'(t)),
      .alu_done  (alu_done  && alu_done_tid  == 2'(t)),
      .ldst_done (ldst_done && ldst_done_tid == 2'(t)),
      .alu_cnt   (),
      .ldst_cnt  ()
    );
  end
  assign hazard = |haz_t;

  // virtualization: build the lane operation from the renamed instruction
  function automatic lane_op_t make_op(vpkt_t p, logic [5:0] pd, logic [5:0] ps1,
                                       logic [5:0] ps2, logic [1:0] ll, logic hi);
    lane_op_t o;
    logic [2:0] epl_log2;
    logic [VM_AW-1:0] base, stride;
    o          = '0;
    o.op       = p.ins.op;
    o.tid      = p.ins.tid;
    o.use_rlt  = p.ins.use_rlt;
    o.dst      = p.ins.dst;
    o.src1     = p.ins.src1;
    o.data     = p.data;
    epl_log2   = vl_log2(p.ins.vl) - {1'b0, ll};
    o.cnt      = (p.ins.op == OP_VRLT) ? '0 : CNT_W'(1) << epl_log2;
    o.rd_base  = VRF_AW'({2'b00, pd}  << epl_log2);
    o.rs1_base = VRF_AW'({2'b00, ps1} << epl_log2);
    o.rs2_base = VRF_AW'({2'b00, ps2} << epl_log2);
    if (p.ins.op inside {OP_VLD_S, OP_VST_S}) begin
      base   = p.data[VM_AW-1:0];
      stride = p.data[16 +: VM_AW];
    end else begin
      base   = p.data[VM_AW-1:0];
      stride = VM_AW'(1);
    end
    base = base << (2'd2 - ll);
    if (hi) base[VM_AW-1] = ~base[VM_AW-1];
    o.vm_base   = base;
    o.vm_stride = stride;
    return o;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_v <= 1'b0; r2_v <= 1'b0; r3_v <= 1'b0;
      r1 <= '0; r2 <= '0; r3 <= '0; r3_ldst <= 1'b0;
      r2_pd <= '0; r2_ps1 <= '0; r2_ps2 <= '0;
    end else begin
      if (r1_adv) begin
        r1_v <= in_valid;
        if (in_valid) r1 <= in_pkt;
      end
      if (r2_adv) begin
        r2_v <= r1_v;
        if (r1_v) begin
          r2     <= r1;
          r2_pd  <= tlt_preg[0];
          r2_ps1 <= tlt_preg[1];
          r2_ps2 <= tlt_preg[2];
        end
      end
      if (r3_adv) begin
        r3_v <= r2_go;
        if (r2_go) begin
          r3      <= make_op(r2, r2_pd, r2_ps1, r2_ps2, lanes_log2, vm_hi[r2.ins.tid]);
          r3_ldst <= is_ldst(r2.ins.op);
        end
      end
    end
  end

endmodule
