// Self-checking test of the vector processor core (controller, four lanes,
// VM banks, host mux, shuffle network) with a translation-table model in
// the testbench. Vector programs run end to end through the host port:
//   - thread 0, VL 64, four lanes: load, load, add, scalar multiply, store;
//   - the latencies a lone instruction sees from acceptance by the
//     controller: ALU result written 16 cycles later, store 11, load 13;
//   - thread 1 with its thread-state bit set works in the upper half of
//     the VM, reached by the host with its own half bit, without touching
//     thread 0's data;
//   - two active lanes (lane state 1), VL 16;
//   - a 4x4 transpose by VSHUF, conflict-free only because the RLT of
//     lane l is programmed with k -> (k + l) mod 4.
// The host address of element i of a vector with base N is 4N + i in
// every lane configuration.
module tb_vp_core;
  import vp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cfg_we = 0, cfg_host_hi = 0;
  logic [1:0]  cfg_lanes_log2 = 2;
  logic [3:0]  cfg_vm_hi = 0;
  logic        in_valid = 0, in_ready;
  vpkt_t       in_pkt = '0;
  logic [6:0]  tlt_idx [3];
  logic [5:0]  tlt_preg [3];
  logic        h_en = 0, h_we = 0, h_rvalid;
  logic [13:0] h_addr = 0;
  logic [31:0] h_wdata = 0, h_rdata;
  logic [3:0]  lane_pg, alu_busy, ldst_busy;
  logic [1:0]  lanes_log2;
  logic        idle, stall_hazard, stall_full, shuf_conflict, alu_done, ldst_done;

  vp_core dut (.*);

  // translation table model: thread t, register r -> 4t + r (mod 64)
  always_comb for (int p = 0; p < 3; p++) tlt_preg[p] = 6'((tlt_idx[p][6:5] * 4 + tlt_idx[p][4:0]) % 64);

  int cyc = 0;
  always @(posedge clk) cyc++;
  int n_haz = 0, n_full = 0, n_conf = 0;
  always @(negedge clk) if (rst_n) begin
    if (stall_hazard) n_haz++;
    if (stall_full) n_full++;
    if (shuf_conflict) n_conf++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  // single <-> double conversions for the expected results
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

  // send one instruction; t = edge at which the controller accepts it
  task automatic send(vop_e op, int d, int a, int b, int vl, int tid, logic [31:0] data,
                      output int t, input bit rlt = 0);
    in_pkt = '0;
    in_pkt.ins.op = op; in_pkt.ins.dst = 5'(d); in_pkt.ins.src1 = 5'(a); in_pkt.ins.src2 = 5'(b);
    in_pkt.ins.vl = 2'(vl); in_pkt.ins.tid = 2'(tid); in_pkt.ins.use_rlt = rlt; in_pkt.data = data;
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 t = cyc;
    in_valid = 0;
  endtask

  task automatic hwrite(int a, logic [31:0] d);
    h_en = 1; h_we = 1; h_addr = 14'(a); h_wdata = d;
    @(negedge clk);
    h_en = 0; h_we = 0;
  endtask

  task automatic hread(int a, output logic [31:0] d);
    h_en = 1; h_we = 0; h_addr = 14'(a);
    @(negedge clk);
    h_en = 0;
    d = h_rdata;
  endtask

  task automatic wait_idle();
    repeat (2) @(negedge clk);
    while (!idle) @(negedge clk);
  endtask

  task automatic config_vp(int L, logic [3:0] hi, bit host_hi);
    cfg_we = 1; cfg_lanes_log2 = 2'(L); cfg_vm_hi = hi; cfg_host_hi = host_hi;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // edge of the first lane-0 event after edge t0
  int ev_alu, ev_ld, ev_st;
  always @(negedge clk) begin
    if (dut.g_lane[0].u_lane.vrf_we[0] && ev_alu < 0) ev_alu = cyc + 1;
    if (dut.g_lane[0].u_lane.vrf_we[1] && ev_ld < 0)  ev_ld  = cyc + 1;
    if (dut.g_lane[0].u_lane.vm_we && ev_st < 0)      ev_st  = cyc + 1;
  end

  logic [31:0] A [64], B [64];

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t;
    logic [31:0] d, ex;
    ev_alu = 0; ev_ld = 0; ev_st = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(lanes_log2 == 2 && lane_pg == 0, "four lanes after reset");
    // ---------- thread 0, VL 64 ----------
    for (int i = 0; i < 64; i++) begin
      A[i] = {1'b0, 8'(120 + i % 16), 23'($urandom())};
      B[i] = {1'b0, 8'(120 + (i * 7) % 16), 23'($urandom())};
      hwrite(i, A[i]);          // N = 0
      hwrite(64 + i, B[i]);     // N = 16
    end
    send(OP_VLD, 0, 0, 0, 2, 0, 32'd0, t);
    send(OP_VLD, 1, 0, 0, 2, 0, 32'd16, t);
    send(OP_VADD, 2, 0, 1, 2, 0, 0, t);
    send(OP_VMUL_S, 3, 2, 0, 2, 0, 32'h4000_0000, t);
    send(OP_VST, 0, 3, 0, 2, 0, 32'd32, t);
    wait_idle();
    for (int i = 0; i < 64; i++) begin
      hread(128 + i, d);
      ex = r2s(s2r(r2s(s2r(A[i]) + s2r(B[i]))) * 2.0);
      chk(d == ex, $sformatf("VL64 result %0d: %h exp %h", i, d, ex));
    end
    chk(n_haz > 0, "hazard stalls in the dependent program");
    // burst of independent VL 16 instructions: the lane ALU FIFOs fill up
    for (int k = 0; k < 10; k++) send(OP_VADD, 4 + k, 0, 1, 0, 0, 0, t);
    wait_idle();
    chk(n_full > 0, "lane FIFO full stall seen");
    // ---------- latencies of lone instructions ----------
    ev_ld = -1;  send(OP_VLD, 0, 0, 0, 0, 0, 32'd0, t);  wait_idle();
    chk(ev_ld - t == 13, $sformatf("load latency %0d (exp 13)", ev_ld - t));
    ev_alu = -1; send(OP_VADD, 2, 0, 1, 0, 0, 0, t);      wait_idle();
    chk(ev_alu - t == 16, $sformatf("ALU latency %0d (exp 16)", ev_alu - t));
    ev_st = -1;  send(OP_VST, 0, 3, 0, 0, 0, 32'd48, t);  wait_idle();
    chk(ev_st - t == 11, $sformatf("store latency %0d (exp 11)", ev_st - t));
    // ---------- thread 1 in the upper VM half ----------
    config_vp(2, 4'b0010, 1);
    for (int i = 0; i < 32; i++) hwrite(i, B[i]);              // upper half, N = 0
    send(OP_VLD, 0, 0, 0, 1, 1, 32'd0, t);
    send(OP_VADD, 1, 0, 0, 1, 1, 0, t);
    send(OP_VST, 0, 1, 0, 1, 1, 32'd8, t);
    wait_idle();
    for (int i = 0; i < 32; i++) begin
      hread(32 + i, d);
      chk(d == r2s(s2r(B[i]) * 2.0), $sformatf("upper-half result %0d", i));
    end
    config_vp(2, 4'b0000, 0);
    for (int i = 0; i < 32; i++) begin
      hread(i, d);
      chk(d == A[i], $sformatf("lower half untouched %0d", i));
    end
    // ---------- two lanes, VL 16, thread 2 ----------
    config_vp(1, 4'b0000, 0);
    chk(lanes_log2 == 1 && lane_pg == 4'b1100, "lanes 2 and 3 gated");
    for (int i = 0; i < 16; i++) hwrite(256 + i, A[i]);      // N = 64
    send(OP_VLD, 0, 0, 0, 0, 2, 32'd64, t);
    send(OP_VSUB, 1, 0, 0, 0, 2, 0, t);
    send(OP_VADD_S, 2, 0, 0, 0, 2, 32'h3f80_0000, t);
    send(OP_VST, 0, 2, 0, 0, 2, 32'd80, t);
    wait_idle();
    for (int i = 0; i < 16; i++) begin
      hread(320 + i, d);
      chk(d == r2s(s2r(A[i]) + 1.0), $sformatf("two-lane result %0d", i));
    end
    // ---------- transpose through the shuffle network, thread 3 ----------
    config_vp(2, 4'b0000, 0);
    for (int i = 0; i < 16; i++) begin
      hwrite(384 + i, A[i]);                                   // X, N = 96
      hwrite(400 + i, 32'(4 * (i % 4) + i / 4));               // RT, N = 100
    end
    for (int l = 0; l < 4; l++) begin
      logic [31:0] w = 0;
      for (int k = 0; k < 8; k++) w[4*k +: 4] = 4'(k < 4 ? (k + l) % 4 : k);
      send(OP_VRLT, 0, l, 0, 0, 3, w, t);
    end
    send(OP_VLD, 0, 0, 0, 0, 3, 32'd96, t);
    send(OP_VLD, 1, 0, 0, 0, 3, 32'd100, t);
    send(OP_VSHUF, 2, 0, 1, 0, 3, 0, t, 1);
    send(OP_VST, 0, 2, 0, 0, 3, 32'd104, t);
    wait_idle();
    for (int i = 0; i < 16; i++) begin
      hread(416 + 4 * (i % 4) + i / 4, d);
      chk(d == A[i], $sformatf("transposed element %0d", i));
    end
    chk(n_conf == 0, "no shuffle conflict with the RLT");
    $display("stalls: hazard %0d cycles, full %0d cycles", n_haz, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
