// The vector processor: vector controller with hazard detection, four
// vector lanes, their private VM banks, the inter-lane shuffle network and
// the host-to-VM mux.
//
// Instructions arrive from the arbitrator as {instruction, operand}
// packets; the controller renames their registers through the external
// TLT, checks hazards and broadcasts them to the ALU or LDST FIFO of every
// active lane. Each lane's LDST unit owns port A of its VM bank, so
// vector loads and stores never wait for arbitration; port B of every
// bank is reached by the hosts through the mux, low-order interleaved
// over the active banks. Shuffle packets leave the lanes' ALU decoders,
// cross the ring network and are written by the destination lane.
// lane_pg marks the lanes (and their banks) that the lane-state register
// has switched off; power gating itself is outside the logic here.
//
// Only lane 0's completion strobes go to the controller. All active lanes
// run the same operations in lockstep and lane 0 is never gated, so lanes
// 1-3 would report the same events; their strobes are left unread. The
// controller's thread-state output (vm_hi) is likewise unread here: the
// controller applies it itself, and only the host side needs its own bit.
module vp_core #(
  parameter int NLANES   = vp_pkg::NLANES,
  parameter int NTHREADS = vp_pkg::NTHREADS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration (lane state, thread state)
  input  logic                      cfg_we,
  input  logic [1:0]                cfg_lanes_log2,
  input  logic [NTHREADS-1:0]       cfg_vm_hi,
  input  logic                      cfg_host_hi,
  // instruction input
  input  logic                      in_valid,
  input  vp_pkg::vpkt_t             in_pkt,
  output logic                      in_ready,
  // TLT
  output logic [6:0]                tlt_idx  [3],
  input  logic [5:0]                tlt_preg [3],
  // host VM port (word addressed, 64 KB)
  input  logic                      h_en,
  input  logic                      h_we,
  input  logic [13:0]               h_addr,
  input  logic [31:0]               h_wdata,
  output logic [31:0]               h_rdata,
  output logic                      h_rvalid,
  // status
  output logic [NLANES-1:0]         lane_pg,
  output logic [1:0]                lanes_log2,
  output logic                      idle,
  output logic                      stall_hazard,
  output logic                      stall_full,
  output logic                      shuf_conflict,
  output logic [NLANES-1:0]         alu_busy,
  output logic [NLANES-1:0]         ldst_busy,
  output logic                      alu_done,
  output logic                      ldst_done
);
  import vp_pkg::*;

  logic                alu_push, ldst_push;
  lane_op_t            lane_op;
  logic [NLANES-1:0]   alu_full, ldst_full, lane_active;
  logic [NLANES-1:0]   l_alu_done, l_ldst_done;
  logic [1:0]          l_alu_tid [NLANES];
  logic [1:0]          l_ldst_tid [NLANES];
  logic [NTHREADS-1:0] vm_hi;
  logic                host_hi_q;
  logic                vc_idle;

  vector_controller #(.NLANES(NLANES), .NTHREADS(NTHREADS)) u_vc (
    .clk, .rst_n,
    .cfg_we, .cfg_lanes_log2, .cfg_vm_hi,
    .lanes_log2, .vm_hi, .lane_active,
    .in_valid, .in_pkt, .in_ready,
    .tlt_idx, .tlt_preg,
    .alu_push, .ldst_push, .lane_op,
    .alu_full (|(alu_full & lane_active)),
    .ldst_full(|(ldst_full & lane_active)),
    .alu_done (l_alu_done[0]),  .alu_done_tid (l_alu_tid[0]),
    .ldst_done(l_ldst_done[0]), .ldst_done_tid(l_ldst_tid[0]),
    .stall_hazard, .stall_full, .idle(vc_idle)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) host_hi_q <= 1'b0;
    else if (cfg_we) host_hi_q <= cfg_host_hi;

  assign lane_pg   = ~lane_active;
  assign alu_done  = l_alu_done[0];
  assign ldst_done = l_ldst_done[0];

  // VM banks and host mux
  logic [NLANES-1:0] va_en, va_we, hb_en;
  logic [VM_AW-1:0]  va_addr [NLANES];
  logic [31:0]       va_wdata [NLANES], va_rdata [NLANES], hb_rdata [NLANES];
  logic              hb_we;
  logic [VM_AW-1:0]  hb_addr;
  logic [31:0]       hb_wdata;

  vm_host_mux #(.NBANKS(NLANES), .AW(VM_AW)) u_mux (
    .clk, .rst_n, .lanes_log2, .lvp_hi(host_hi_q),
    .h_en, .h_we, .h_addr, .h_wdata, .h_rdata, .h_rvalid,
    .b_en(hb_en), .b_we(hb_we), .b_addr(hb_addr), .b_wdata(hb_wdata), .b_rdata(hb_rdata));

  // shuffle network
  logic [NLANES-1:0] sh_iv, sh_ov;
  logic [1:0]        sh_il [NLANES];
  logic [VRF_AW-1:0] sh_ia [NLANES], sh_oa [NLANES];
  logic [31:0]       sh_id [NLANES], sh_od [NLANES];

  shuffle_net #(.N(NLANES), .AW(VRF_AW), .DW(32)) u_shuf (
    .clk, .rst_n, .in_valid(sh_iv), .in_lane(sh_il), .in_addr(sh_ia), .in_data(sh_id),
    .out_valid(sh_ov), .out_addr(sh_oa), .out_data(sh_od), .conflict(shuf_conflict));

  for (genvar l = 0; l < NLANES; l++) begin : g_lane
    vector_lane #(.LANE_ID(l)) u_lane (
      .clk, .rst_n, .active(lane_active[l]),
      .alu_push, .ldst_push, .op_in(lane_op),
      .alu_full(alu_full[l]), .ldst_full(ldst_full[l]),
      .alu_done(l_alu_done[l]), .alu_done_tid(l_alu_tid[l]),
      .ldst_done(l_ldst_done[l]), .ldst_done_tid(l_ldst_tid[l]),
      .vm_en(va_en[l]), .vm_we(va_we[l]), .vm_addr(va_addr[l]),
      .vm_wdata(va_wdata[l]), .vm_rdata(va_rdata[l]),
      .shuf_out_valid(sh_iv[l]), .shuf_out_lane(sh_il[l]),
      .shuf_out_addr(sh_ia[l]), .shuf_out_data(sh_id[l]),
      .shuf_in_valid(sh_ov[l]), .shuf_in_addr(sh_oa[l]), .shuf_in_data(sh_od[l]),
      .alu_busy(alu_busy[l]), .ldst_busy(ldst_busy[l]));

    vm_bank #(.WORDS(VM_WORDS), .AW(VM_AW)) u_vm (
      .clk,
      .a_en(va_en[l]), .a_we(va_we[l]), .a_addr(va_addr[l]),
      .a_wdata(va_wdata[l]), .a_rdata(va_rdata[l]),
      .b_en(hb_en[l]), .b_we(hb_we), .b_addr(hb_addr),
      .b_wdata(hb_wdata), .b_rdata(hb_rdata[l]));
  end

  // the VP is idle when the controller is empty and nothing is in the lanes
  logic [4:0] quiet;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) quiet <= '0;
    else if (!vc_idle || |alu_busy || |ldst_busy || |sh_iv || |sh_ov) quiet <= '0;
    else if (quiet != '1) quiet <= quiet + 1'b1;
  assign idle = (quiet == '1) && vc_idle;

endmodule
