// Self-checking test of the vector controller with a translation-table
// model in the testbench. Checks the three-stage timing (an instruction
// accepted at one clock edge is pushed to the lanes at the third edge
// after it), renaming through the table, the virtualized lane operation
// for 4, 2 and 1 active lanes (elements per lane VL/2^L, VRF base
// preg * VL/2^L, VM base scaled by 4/2^L, VM half flip for a thread with
// its thread-state bit set), separation into ALU and LDST pushes, the
// hazard stall and its release when the lanes report completion, the
// full-FIFO stall, and that other threads are not blocked by one thread's
// hazard once it has left the HD stage.
module tb_vector_controller;
  import vp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       cfg_we = 0;
  logic [1:0] cfg_lanes_log2 = 2;
  logic [3:0] cfg_vm_hi = 0;
  logic [1:0] lanes_log2;
  logic [3:0] vm_hi, lane_active;
  logic       in_valid = 0, in_ready;
  vpkt_t      in_pkt = '0;
  logic [6:0] tlt_idx [3];
  logic [5:0] tlt_preg [3];
  logic       alu_push, ldst_push, alu_full = 0, ldst_full = 0;
  lane_op_t   lane_op;
  logic       alu_done = 0, ldst_done = 0;
  logic [1:0] alu_done_tid = 0, ldst_done_tid = 0;
  logic       stall_hazard, stall_full, idle;

  vector_controller dut (.*);

  // translation table model: thread t, register r -> 6-bit name
  function automatic logic [5:0] map(logic [6:0] i);
    return 6'((i * 7 + 3) % 64);
  endfunction
  always_comb for (int p = 0; p < 3; p++) tlt_preg[p] = map(tlt_idx[p]);

  int cyc = 0;
  always @(posedge clk) cyc++;
  lane_op_t pushed [$];
  int       push_cyc [$];
  int       n_haz = 0, n_full = 0;
  always @(negedge clk) if (rst_n) begin
    // a push is taken by the lanes at the next rising edge
    if (alu_push || ldst_push) begin pushed.push_back(lane_op); push_cyc.push_back(cyc + 1); end
    if (stall_hazard) n_haz++;
    if (stall_full) n_full++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  function automatic vpkt_t mk(vop_e op, int d, int a, int b, int vl, int tid, logic [31:0] data);
    vpkt_t p = '0;
    p.ins.op = op; p.ins.dst = 5'(d); p.ins.src1 = 5'(a); p.ins.src2 = 5'(b);
    p.ins.vl = 2'(vl); p.ins.tid = 2'(tid); p.data = data;
    return p;
  endfunction

  // send one packet; returns the edge count at which it was accepted
  task automatic send(vpkt_t p, output int t_acc);
    in_valid = 1; in_pkt = p;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 t_acc = cyc;
    in_valid = 0;
  endtask

  // expected lane operation, worked out from the definitions
  task automatic expect_op(lane_op_t o, vpkt_t p, int L, bit hi, string what);
    int vl, epl, n;
    vl  = 16 << p.ins.vl;
    epl = vl >> L;
    chk(o.op == p.ins.op && o.tid == p.ins.tid, {what, ": op/tid"});
    chk(o.cnt == CNT_W'(p.ins.op == OP_VRLT ? 0 : epl), $sformatf("%s: count %0d exp %0d", what, o.cnt, epl));
    chk(o.rd_base  == VRF_AW'(map({p.ins.tid, p.ins.dst}) * epl), {what, ": rd base"});
    chk(o.rs1_base == VRF_AW'(map({p.ins.tid, p.ins.src1}) * epl), {what, ": rs1 base"});
    chk(o.rs2_base == VRF_AW'(map({p.ins.tid, p.ins.src2}) * epl), {what, ": rs2 base"});
    n = int'(p.data[11:0]) * (4 >> L);
    if (hi) n = n ^ 2048;
    chk(o.vm_base == VM_AW'(n), $sformatf("%s: vm base %0d exp %0d", what, o.vm_base, n));
    if (p.ins.op inside {OP_VLD_S, OP_VST_S}) chk(o.vm_stride == p.data[27:16], {what, ": stride"});
    if (p.ins.op inside {OP_VLD, OP_VST}) chk(o.vm_stride == 1, {what, ": unit stride"});
    chk(o.data == p.data, {what, ": data"});
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t, t2;
    vpkt_t p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(lanes_log2 == 2 && lane_active == 4'hf && idle, "reset: four lanes, idle");
    // 1. timing and renaming of a single ALU instruction
    p = mk(OP_VADD, 1, 2, 3, 0, 0, 0);
    send(p, t);
    wait (pushed.size() == 1); #1;
    chk(push_cyc[0] - t == 3, $sformatf("VC latency %0d edges, expected 3", push_cyc[0] - t));
    expect_op(pushed[0], p, 2, 0, "VADD VL16 L=2");
    // 2. RAW hazard: the next instruction reads v1 of the same thread
    p = mk(OP_VMUL, 4, 1, 5, 0, 0, 0);
    send(p, t);
    repeat (6) @(negedge clk);
    chk(stall_hazard && pushed.size() == 1, "RAW held in HD");
    alu_done = 1; alu_done_tid = 0; @(negedge clk); alu_done = 0;
    wait (pushed.size() == 2); #1;
    chk(!stall_hazard, "hazard released by completion");
    expect_op(pushed[1], p, 2, 0, "VMUL after stall");
    alu_done = 1; @(negedge clk); alu_done = 0;
    // 3. loads and stores, unit and strided, full-FIFO stall
    ldst_full = 1;
    p = mk(OP_VLD_S, 7, 0, 0, 2, 1, {4'd0, 12'd3, 16'd40});
    send(p, t);
    repeat (5) @(negedge clk);
    chk(stall_full && pushed.size() == 2, "LDST FIFO full stalls IS");
    ldst_full = 0;
    wait (pushed.size() == 3); #1;
    expect_op(pushed[2], p, 2, 0, "VLD_S VL64");
    ldst_done = 1; ldst_done_tid = 1; @(negedge clk); ldst_done = 0;
    // 4. lane configurations and VM halves
    for (int L = 1; L >= 0; L--) begin
      cfg_we = 1; cfg_lanes_log2 = 2'(L); cfg_vm_hi = 4'b0100;
      @(negedge clk); cfg_we = 0;
      chk(lanes_log2 == 2'(L) && lane_active == 4'((1 << (1 << L)) - 1), "lane-state register");
      for (int th = 2; th < 4; th++) begin
        p = mk(OP_VST, 0, 9, 0, 1, th, 32'd100);
        send(p, t);
        wait (pushed.size() == 4 + 2 * (1 - L) + (th - 2)); #1;
        expect_op(pushed[$], p, L, th == 2, $sformatf("VST L=%0d thread %0d", L, th));
        ldst_done = 1; ldst_done_tid = 2'(th); @(negedge clk); ldst_done = 0;
      end
    end
    // 5. back-to-back independent instructions of four threads: one per cycle
    cfg_we = 1; cfg_lanes_log2 = 2; cfg_vm_hi = 0; @(negedge clk); cfg_we = 0;
    t2 = pushed.size();
    for (int k = 0; k < 8; k++) begin
      p = mk(OP_VADD, 10 + k, 20 + k, 30 - k, 1, k % 4, 0);
      in_valid = 1; in_pkt = p;
      @(negedge clk);
      chk(in_ready, "no stall for independent threads");
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    chk(pushed.size() == t2 + 8, "eight pushed");
    for (int k = 1; k < 8; k++) chk(push_cyc[t2 + k] == push_cyc[t2 + k - 1] + 1, "one instruction per cycle");
    chk(n_haz > 0 && n_full > 0, "both stall kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
