// Self-checking test of one vector lane with its VM bank. The testbench
// plays the vector controller (it pushes lane operations) and preloads and
// reads back the bank through the bank's second port. Checks: load, add,
// subtract, multiply (vector and scalar operand), strided load and store
// results against a model; the latencies the lane contributes (load write
// 10, ALU write 13 and store write 8 cycles after the push, i.e. 13, 16
// and 11 cycles after the controller accepts the instruction, with its
// three stages); one idle decoder cycle between operations; completion
// reports with thread IDs; RLT programming; a shuffle element looped back
// to this lane.
module tb_vector_lane;
  import vp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       alu_push = 0, ldst_push = 0, alu_full, ldst_full;
  lane_op_t   op_in = '0;
  logic       alu_done, ldst_done;
  logic [1:0] alu_done_tid, ldst_done_tid;
  logic       vm_en, vm_we;
  logic [11:0] vm_addr;
  logic [31:0] vm_wdata, vm_rdata;
  logic       shuf_out_valid, shuf_in_valid;
  logic [1:0] shuf_out_lane;
  logic [7:0] shuf_out_addr, shuf_in_addr;
  logic [31:0] shuf_out_data, shuf_in_data;
  logic       alu_busy, ldst_busy;
  logic       b_en = 0, b_we = 0;
  logic [11:0] b_addr = 0;
  logic [31:0] b_wdata = 0, b_rdata;

  vector_lane #(.LANE_ID(1)) dut (.clk, .rst_n, .active(1'b1), .alu_push, .ldst_push, .op_in,
    .alu_full, .ldst_full, .alu_done, .alu_done_tid, .ldst_done, .ldst_done_tid,
    .vm_en, .vm_we, .vm_addr, .vm_wdata, .vm_rdata,
    .shuf_out_valid, .shuf_out_lane, .shuf_out_addr, .shuf_out_data,
    .shuf_in_valid, .shuf_in_addr, .shuf_in_data, .alu_busy, .ldst_busy);
  vm_bank u_vm (.clk, .a_en(vm_en), .a_we(vm_we), .a_addr(vm_addr), .a_wdata(vm_wdata),
    .a_rdata(vm_rdata), .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  // shuffle loop-back standing in for the network: 4 cycles, this lane only
  logic        lb_v [4];
  logic [7:0]  lb_a [4];
  logic [31:0] lb_d [4];
  always_ff @(posedge clk) begin
    lb_v[0] <= rst_n && shuf_out_valid && shuf_out_lane == 2'd1;
    lb_a[0] <= shuf_out_addr; lb_d[0] <= shuf_out_data;
    for (int i = 1; i < 4; i++) begin lb_v[i] <= rst_n && lb_v[i-1]; lb_a[i] <= lb_a[i-1]; lb_d[i] <= lb_d[i-1]; end
  end
  assign shuf_in_valid = lb_v[3];
  assign shuf_in_addr  = lb_a[3];
  assign shuf_in_data  = lb_d[3];

  int cyc = 0;
  always @(posedge clk) cyc++;
  int first_vrf_alu = -1, first_vrf_ld = -1, first_vm_st = -1;
  int n_alu_done = 0, n_ldst_done = 0;
  logic [1:0] last_alu_tid, last_ldst_tid;
  int alu_issue_cyc [$];
  always @(negedge clk) if (rst_n) begin
    if (dut.vrf_we[0] && first_vrf_alu < 0) first_vrf_alu = cyc + 1;
    if (dut.vrf_we[1] && first_vrf_ld < 0)  first_vrf_ld  = cyc + 1;
    if (vm_en && vm_we && first_vm_st < 0)  first_vm_st   = cyc + 1;
    if (alu_done)  begin n_alu_done++;  last_alu_tid = alu_done_tid; end
    if (ldst_done) begin n_ldst_done++; last_ldst_tid = ldst_done_tid; end
    if (dut.as0.v) alu_issue_cyc.push_back(cyc);
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  function automatic lane_op_t mkop(vop_e op, int cnt, int rd, int rs1, int rs2, int vm, int stride,
                                    logic [31:0] data, int tid);
    lane_op_t o = '0;
    o.op = op; o.cnt = CNT_W'(cnt); o.rd_base = 8'(rd); o.rs1_base = 8'(rs1); o.rs2_base = 8'(rs2);
    o.vm_base = 12'(vm); o.vm_stride = 12'(stride); o.data = data; o.tid = 2'(tid);
    return o;
  endfunction

  // push one operation, return the edge at which the lane FIFO takes it
  task automatic push(lane_op_t o, output int t);
    op_in = o;
    if (is_ldst(o.op)) ldst_push = 1; else alu_push = 1;
    @(posedge clk); t = cyc + 1;
    #1 alu_push = 0; ldst_push = 0;
  endtask

  task automatic wait_quiet();
    repeat (40) @(negedge clk);
  endtask

  // single -> double, exact
  function automatic real s2r(logic [31:0] a);
    logic [63:0] d;
    if (a[30:23] == 0) return 0.0;
    d = {a[31], 11'(int'(a[30:23]) - 127 + 1023), a[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction
  // double -> single, round to nearest even (normal range only)
  function automatic logic [31:0] r2s(real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] k;
    int e;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    k = {1'b0, m[52:29]};
    if (m[28] && (m[27:0] != 0 || m[29])) k = k + 1;
    if (k[24]) begin k = k >> 1; e++; end
    return {d[63], 8'(e), k[22:0]};
  endfunction

  logic [31:0] a_val [16], b_val [16];

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t, k0;
    logic [31:0] ex;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // preload VM: small integers as floats, exact in every operation below
    for (int i = 0; i < 16; i++) begin
      a_val[i] = {1'b0, 8'(127 + (i % 4)), 23'(i << 18)};
      b_val[i] = {1'b0, 8'(128 + (i % 3)), 23'(i << 17)};
      b_en = 1; b_we = 1; b_addr = 12'(i); b_wdata = a_val[i]; @(negedge clk);
      b_addr = 12'(100 + 2 * i); b_wdata = b_val[i]; @(negedge clk);
    end
    b_en = 0; b_we = 0;
    @(negedge clk);
    // VLD 8 elements into VRF 0..7 (unit stride from 0), timing
    push(mkop(OP_VLD, 8, 0, 0, 0, 0, 1, 0, 2), t);
    wait_quiet();
    chk(first_vrf_ld - t == 10, $sformatf("load write %0d cycles after push (exp 10)", first_vrf_ld - t));
    chk(n_ldst_done == 1 && last_ldst_tid == 2, "load completion with thread ID");
    for (int i = 0; i < 8; i++) chk(dut.u_vrf.mem[i] == a_val[i], $sformatf("loaded element %0d", i));
    // strided load: 8 elements from 100, stride 2 into VRF 8..15
    push(mkop(OP_VLD_S, 8, 8, 0, 0, 100, 2, 0, 1), t);
    wait_quiet();
    for (int i = 0; i < 8; i++) chk(dut.u_vrf.mem[8 + i] == b_val[i], $sformatf("strided element %0d", i));
    // VADD VRF16..23 = 0..7 + 8..15, timing
    push(mkop(OP_VADD, 8, 16, 0, 8, 0, 0, 0, 3), t);
    k0 = alu_issue_cyc.size();
    wait_quiet();
    chk(first_vrf_alu - t == 13, $sformatf("ALU write %0d cycles after push (exp 13)", first_vrf_alu - t));
    chk(n_alu_done == 1 && last_alu_tid == 3, "ALU completion with thread ID");
    for (int i = 0; i < 8; i++) begin
      ex = r2s(s2r(a_val[i]) + s2r(b_val[i]));
      chk(dut.u_vrf.mem[16 + i] == ex, $sformatf("add element %0d", i));
    end
    // back-to-back: VSUB then VMUL_S, one idle decoder cycle between them
    alu_issue_cyc = {};
    op_in = mkop(OP_VSUB, 8, 24, 16, 8, 0, 0, 0, 0); alu_push = 1; @(negedge clk);
    op_in = mkop(OP_VMUL_S, 8, 32, 0, 0, 0, 0, 32'h4040_0000, 0); @(negedge clk);
    op_in = mkop(OP_VMUL, 8, 40, 0, 8, 0, 0, 0, 0); @(negedge clk);
    alu_push = 0;
    wait_quiet();
    chk(alu_issue_cyc.size() == 24, "24 elements issued");
    chk(alu_issue_cyc[8] - alu_issue_cyc[7] == 2 && alu_issue_cyc[16] - alu_issue_cyc[15] == 2,
        "one idle cycle between operations");
    chk(alu_issue_cyc[23] - alu_issue_cyc[0] == 25, "8/(8+1) decoder use");
    for (int i = 0; i < 8; i++) begin
      ex = r2s(s2r(dut.u_vrf.mem[16 + i]) - s2r(b_val[i]));
      chk(dut.u_vrf.mem[24 + i] == ex, $sformatf("sub element %0d", i));
      ex = r2s(s2r(a_val[i]) * 3.0);
      chk(dut.u_vrf.mem[32 + i] == ex, $sformatf("scalar mul element %0d", i));
      ex = r2s(s2r(a_val[i]) * s2r(b_val[i]));
      chk(dut.u_vrf.mem[40 + i] == ex, $sformatf("mul element %0d", i));
    end
    // store VRF 40..47 to VM 200.. stride 3, timing
    push(mkop(OP_VST_S, 8, 0, 40, 0, 200, 3, 0, 1), t);
    wait_quiet();
    chk(first_vm_st - t == 8, $sformatf("store write %0d cycles after push (exp 8)", first_vm_st - t));
    for (int i = 0; i < 8; i++) chk(u_vm.mem[200 + 3 * i] == dut.u_vrf.mem[40 + i], $sformatf("stored element %0d", i));
    // RLT programming for lane 1 (entries 0-7), ignored for lane 2
    push(mkop(OP_VRLT, 0, 0, 0, 0, 0, 0, 32'h0123_4567, 0), t);
    t = 0;
    wait_quiet();
    begin
      automatic lane_op_t o = mkop(OP_VRLT, 0, 0, 0, 0, 0, 0, 32'h7654_3210, 0);
      o.src1 = 5'd1;
      push(o, t);
      o.src1 = 5'd2; o.data = 32'hffff_ffff;
      push(o, t);
    end
    wait_quiet();
    for (int i = 0; i < 8; i++) chk(dut.rlt[i] == 4'(i), $sformatf("RLT entry %0d", i));
    // shuffle into this lane: RT elements hold destination index 4*m + 1
    // (lane 1, local slot m) reversed, through the RLT reorder
    for (int i = 0; i < 4; i++) begin
      dut.u_vrf.mem[48 + i] = 32'(4 * (3 - i) + 1);   // RT
    end
    push(mkop(OP_VSHUF, 4, 56, 0, 48, 0, 0, 0, 0), t);
    wait_quiet();
    for (int i = 0; i < 4; i++) chk(dut.u_vrf.mem[56 + 3 - i] == a_val[i], $sformatf("shuffled element %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
