// One vector lane: ALU and LDST FIFOs, ALU decoder with reorder lookup
// table (RLT), FP unit with result buffer, ALU write-back, LDST decoder
// and address generator, load write-back, and the lane's VRF slice.
//
// Every lane receives the same lane operations from the vector controller
// and processes its share of the vector elements one per cycle, so all
// active lanes run in lockstep. Element k of an operation lives at
// lane-local VRF address base + k.
//
// ALU data path (document, Figure 5.3): two FIFO cycles, two decode
// cycles, two operand-fetch cycles, six FP cycles (multiplies are padded
// to six in the result buffer) and one write-back cycle. Counting the
// three vector-controller stages, the first result of an ALU instruction
// is written 16 cycles after the controller accepts it.
// LDST data path: two FIFO cycles, ID, ID, FO, FO, AG, AG, then the VM
// access (a store writes here, 11 cycles after acceptance) and, for a
// load, one write-back cycle (13 cycles after acceptance).
// Each decoder takes a new operation only in the cycle after it issued the
// last element of the previous one, which leaves one idle cycle between
// operations as in the document (80 % / 88.9 % / 94.1 % peak use for 4, 8
// and 16 elements per lane).
//
// Shuffle (Chapter 10): for OP_VSHUF the ALU decoder reads element j of RS
// (src1) and RT (src2) and sends the packet {RS[j], lane RT[j][1:0],
// address rd_base + RT[j] >> 2} into the shuffle network instead of the FP
// unit; packets that arrive for this lane are written through the ALU
// write port at the time an FP result of the same issue slot would be.
// When use_rlt is set, element j is RLT[k] instead of k (decoder
// virtualization). OP_VRLT writes eight 4-bit RLT entries of lane
// src1[1:0] (entries 0-7 if dst[0] is 0, else 8-15) from the operand word.
// The RLT is per lane, not per thread. Completion of each ALU and LDST
// operation is reported with its thread ID for the hazard unit.
// Not every field of a lane operation matters to both decoders (the ALU
// decoder ignores the memory fields, the LDST decoder the ALU ones), and
// the last ALU pipeline slot does not need every slot field, so some bits
// stay unread. The FIFOs' occupancy counts are left unconnected: only
// their empty and full flags are used.
module vector_lane #(
  parameter int LANE_ID   = 0,
  parameter int FIFO_DEPTH = 4,
  parameter int SHUF_DLY  = 2    // network (4) + SHUF_DLY = FP latency (6)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       active,
  // from the vector controller
  input  logic                       alu_push,
  input  logic                       ldst_push,
  input  vp_pkg::lane_op_t           op_in,
  output logic                       alu_full,
  output logic                       ldst_full,
  // completions
  output logic                       alu_done,
  output logic [1:0]                 alu_done_tid,
  output logic                       ldst_done,
  output logic [1:0]                 ldst_done_tid,
  // private VM bank port
  output logic                       vm_en,
  output logic                       vm_we,
  output logic [vp_pkg::VM_AW-1:0]   vm_addr,
  output logic [31:0]                vm_wdata,
  input  logic [31:0]                vm_rdata,
  // shuffle network
  output logic                       shuf_out_valid,
  output logic [1:0]                 shuf_out_lane,
  output logic [vp_pkg::VRF_AW-1:0]  shuf_out_addr,
  output logic [31:0]                shuf_out_data,
  input  logic                       shuf_in_valid,
  input  logic [vp_pkg::VRF_AW-1:0]  shuf_in_addr,
  input  logic [31:0]                shuf_in_data,
  // activity, for utilization counting
  output logic                       alu_busy,
  output logic                       ldst_busy
);
  import vp_pkg::*;
  localparam int OPW = $bits(lane_op_t);

  // ---------------- lane FIFOs ----------------
  logic     af_empty, lf_empty, af_pop, lf_pop;
  logic [OPW-1:0] af_head, lf_head;

  vinstr_fifo #(.WIDTH(OPW), .DEPTH(FIFO_DEPTH)) u_alu_fifo (
    .clk, .rst_n, .wr_en(alu_push && active), .wr_data(op_in),
    .rd_en(af_pop), .rd_data(af_head), .empty(af_empty), .full(alu_full), .count());
  vinstr_fifo #(.WIDTH(OPW), .DEPTH(FIFO_DEPTH)) u_ldst_fifo (
    .clk, .rst_n, .wr_en(ldst_push && active), .wr_data(op_in),
    .rd_en(lf_pop), .rd_data(lf_head), .empty(lf_empty), .full(ldst_full), .count());

  // ---------------- VRF ----------------
  logic [2:0]        vrf_re;
  logic [VRF_AW-1:0] vrf_raddr [3];
  logic [31:0]       vrf_rdata [3];
  logic [1:0]        vrf_we;
  logic [VRF_AW-1:0] vrf_waddr [2];
  logic [31:0]       vrf_wdata [2];

  vrf_bank u_vrf (.clk, .re(vrf_re), .raddr(vrf_raddr), .rdata(vrf_rdata),
                  .we(vrf_we), .waddr(vrf_waddr), .wdata(vrf_wdata));

  // ================= ALU decode =================
  typedef struct packed {
    logic              v;
    logic              we;      // writes the VRF through the FP path
    logic              shuf;    // shuffle element
    logic              last;
    vop_e              op;
    logic [1:0]        tid;
    logic [VRF_AW-1:0] a1, a2, ad, rb;
    logic [31:0]       scalar;
    logic              use_s;
  } aslot_t;

  lane_op_t          aop;
  logic              abusy;
  logic [CNT_W-1:0]  ak;
  logic [3:0]        rlt [16];
  aslot_t            as0, as1, as2, as3;
  logic [31:0]       opa, opb;

  assign af_pop = !abusy && !af_empty;
  assign alu_busy = as0.v && (as0.we || as0.shuf);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      abusy <= 1'b0; ak <= '0; aop <= '0;
      as0 <= '0; as1 <= '0; as2 <= '0; as3 <= '0;
      opa <= '0; opb <= '0;
      for (int i = 0; i < 16; i++) rlt[i] <= 4'(i);
    end else begin
      as0.v <= 1'b0;
      if (abusy) begin
        automatic logic [CNT_W-1:0] j = ak;
        if (aop.op == OP_VSHUF && aop.use_rlt) j = CNT_W'(rlt[ak[3:0]]);
        as0.v      <= 1'b1;
        as0.op     <= aop.op;
        as0.tid    <= aop.tid;
        as0.last   <= (ak == aop.cnt - 1'b1) || (aop.cnt == 0);
        as0.shuf   <= (aop.op == OP_VSHUF);
        as0.we     <= (aop.op inside {OP_VADD, OP_VADD_S, OP_VSUB, OP_VSUB_S, OP_VMUL, OP_VMUL_S});
        as0.a1     <= aop.rs1_base + VRF_AW'(j);
        as0.a2     <= aop.rs2_base + VRF_AW'(j);
        as0.ad     <= aop.rd_base  + VRF_AW'(j);
        as0.rb     <= aop.rd_base;
        as0.scalar <= aop.data;
        as0.use_s  <= (aop.op inside {OP_VADD_S, OP_VSUB_S, OP_VMUL_S});
        if (aop.op == OP_VRLT && aop.src1[1:0] == 2'(LANE_ID))
          for (int i = 0; i < 8; i++) rlt[{aop.dst[0], 3'(i)}] <= aop.data[4*i +: 4];
        if (aop.cnt == 0 || ak == aop.cnt - 1'b1) abusy <= 1'b0;
        ak <= ak + 1'b1;
      end else if (!af_empty) begin
        aop   <= lane_op_t'(af_head);
        abusy <= 1'b1;
        ak    <= '0;
      end
      as1 <= as0;                  // ID2: VRF addresses presented
      as2 <= as1;                  // FO1: operands read
      as3 <= as2;                  // FO2: operands registered
      opa <= vrf_rdata[0];
      opb <= as2.use_s ? as2.scalar : vrf_rdata[1];
    end
  end

  // FP unit
  logic              fp_v;
  logic [31:0]       fp_res;
  logic [VRF_AW+3:0] fp_tag;
  logic [1:0]        fp_opc;

  always_comb begin
    case (as3.op)
      OP_VSUB, OP_VSUB_S: fp_opc = 2'd1;
      OP_VMUL, OP_VMUL_S: fp_opc = 2'd2;
      default:            fp_opc = 2'd0;
    endcase
  end

  fp_unit #(.ADD_LAT(6), .MUL_LAT(4), .TAG_W(VRF_AW + 4)) u_fp (
    .clk, .rst_n,
    .in_valid(as3.v), .in_op(fp_opc), .in_a(opa), .in_b(opb),
    .in_tag({as3.we, as3.last, as3.tid, as3.ad}),
    .out_valid(fp_v), .out_res(fp_res), .out_tag(fp_tag));

  assign shuf_out_valid = as3.v && as3.shuf;
  assign shuf_out_lane  = opb[1:0];
  assign shuf_out_addr  = as3.rb + VRF_AW'(opb[VRF_AW+1:2]);
  assign shuf_out_data  = opa;

  // packets arriving for this lane, delayed to the FP result slot
  logic              sd_v    [SHUF_DLY];
  logic [VRF_AW-1:0] sd_addr [SHUF_DLY];
  logic [31:0]       sd_data [SHUF_DLY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SHUF_DLY; i++) begin sd_v[i] <= 1'b0; sd_addr[i] <= '0; sd_data[i] <= '0; end
    end else begin
      sd_v[0] <= shuf_in_valid; sd_addr[0] <= shuf_in_addr; sd_data[0] <= shuf_in_data;
      for (int i = 1; i < SHUF_DLY; i++) begin
        sd_v[i] <= sd_v[i-1]; sd_addr[i] <= sd_addr[i-1]; sd_data[i] <= sd_data[i-1];
      end
    end
  end

  // ALU write-back unit
  logic              wb_v, wb_we, wb_last;
  logic [1:0]        wb_tid;
  logic [VRF_AW-1:0] wb_addr;
  logic [31:0]       wb_data;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_v <= 1'b0; wb_we <= 1'b0; wb_last <= 1'b0; wb_tid <= '0; wb_addr <= '0; wb_data <= '0;
    end else begin
      wb_v    <= fp_v;
      wb_last <= fp_v && fp_tag[VRF_AW+2];
      wb_tid  <= fp_tag[VRF_AW+1:VRF_AW];
      if (sd_v[SHUF_DLY-1]) begin
        wb_we   <= 1'b1;
        wb_addr <= sd_addr[SHUF_DLY-1];
        wb_data <= sd_data[SHUF_DLY-1];
      end else begin
        wb_we   <= fp_v && fp_tag[VRF_AW+3];
        wb_addr <= fp_tag[VRF_AW-1:0];
        wb_data <= fp_res;
      end
    end
  end
  assign alu_done     = wb_v && wb_last;
  assign alu_done_tid = wb_tid;

  // ================= LDST decode & address generation =================
  typedef struct packed {
    logic              v;
    logic              st;
    logic              last;
    logic [1:0]        tid;
    logic [VRF_AW-1:0] ar;      // VRF address (store source / load dest)
    logic [VM_AW-1:0]  base;
    logic [VM_AW-1:0]  stride;
    logic [CNT_W-1:0]  k;
    logic [VM_AW-1:0]  off;
    logic [VM_AW-1:0]  addr;
    logic [31:0]       sdata;
  } lslot_t;

  lane_op_t         lop;
  logic             lbusy;
  logic [CNT_W-1:0] lk;
  lslot_t           ls [7];     // ID1 ID2 FO1 FO2 AG1 AG2 MM
  logic             lwb_v, lwb_last;
  logic [1:0]       lwb_tid;
  logic [VRF_AW-1:0] lwb_addr;
  logic [31:0]       lwb_data;

  assign lf_pop    = !lbusy && !lf_empty;
  assign ldst_busy = ls[0].v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lbusy <= 1'b0; lk <= '0; lop <= '0;
      for (int i = 0; i < 7; i++) ls[i] <= '0;
      lwb_v <= 1'b0; lwb_last <= 1'b0; lwb_tid <= '0; lwb_addr <= '0; lwb_data <= '0;
    end else begin
      ls[0].v <= 1'b0;
      if (lbusy) begin
        ls[0].v      <= 1'b1;
        ls[0].st     <= is_store(lop.op);
        ls[0].last   <= (lk == lop.cnt - 1'b1);
        ls[0].tid    <= lop.tid;
        ls[0].ar     <= (is_store(lop.op) ? lop.rs1_base : lop.rd_base) + VRF_AW'(lk);
        ls[0].base   <= lop.vm_base;
        ls[0].stride <= lop.vm_stride;
        ls[0].k      <= lk;
        ls[0].off    <= '0;
        ls[0].addr   <= '0;
        ls[0].sdata  <= '0;
        if (lk == lop.cnt - 1'b1) lbusy <= 1'b0;
        lk <= lk + 1'b1;
      end else if (!lf_empty) begin
        lop   <= lane_op_t'(lf_head);
        lbusy <= 1'b1;
        lk    <= '0;
      end
      ls[1] <= ls[0];                                   // ID2: VRF read issued
      ls[2] <= ls[1];                                   // FO1
      ls[3] <= ls[2];                                   // FO2: store data
      ls[3].sdata <= vrf_rdata[2];
      ls[4] <= ls[3];                                   // AG1: offset
      ls[4].off <= VM_AW'(ls[3].k * ls[3].stride);
      ls[5] <= ls[4];                                   // AG2: address
      ls[5].addr <= ls[4].base + ls[4].off;
      ls[6] <= ls[5];                                   // MM: VM access
      lwb_v    <= ls[6].v && !ls[6].st;                 // load WB
      lwb_last <= ls[6].last;
      lwb_tid  <= ls[6].tid;
      lwb_addr <= ls[6].ar;
      lwb_data <= vm_rdata;
    end
  end

  assign vm_en    = ls[5].v;
  assign vm_we    = ls[5].v && ls[5].st;
  assign vm_addr  = ls[5].addr;
  assign vm_wdata = ls[5].sdata;

  assign ldst_done     = (ls[5].v && ls[5].st && ls[5].last) || (lwb_v && lwb_last);
  assign ldst_done_tid = (ls[5].v && ls[5].st && ls[5].last) ? ls[5].tid : lwb_tid;

  // ---------------- VRF port wiring ----------------
  always_comb begin
    vrf_re       = {ls[1].v && ls[1].st, as1.v, as1.v};
    vrf_raddr[0] = as1.a1;
    vrf_raddr[1] = as1.a2;
    vrf_raddr[2] = ls[1].ar;
    vrf_we       = {lwb_v, wb_we};
    vrf_waddr[0] = wb_addr;
    vrf_wdata[0] = wb_data;
    vrf_waddr[1] = lwb_addr;
    vrf_wdata[1] = lwb_data;
  end

endmodule
