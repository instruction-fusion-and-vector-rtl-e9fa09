// End-to-end test of the whole system at its default sizes: four
// application-core instruction streams through the fusion switch, FIFOs,
// arbitrator, controller and four lanes, with host access to the vector
// memory, plus a program on the fused-mode dual-pipeline processor beside
// it. Phases:
//   1. the control core maps thread t's registers to physical 4t + r;
//      all four cores run load/load/add/store at VL 64 on their own data
//      while core 0 also floods its FIFO with dependent instructions;
//   2. thread fusion: core 1's stream is copied as thread 2, whose
//      thread-state bit puts it in the upper half of the VM, so one stream
//      produces two results from two data sets;
//   3. lane state 1 (two lanes, lanes 2 and 3 gated), VL 16;
//   4. a 4x4 transpose by VSHUF with the RLTs programmed;
//   5. the dual-pipeline processor runs a loop in fused mode.
// Every mechanism is counted and a mechanism that never happened counts as
// a failure: hazard stall, lane FIFO full, core FIFO full back-pressure,
// round-robin interleaving of cores, TLT renaming, fusion duplication, VM
// upper half, lane-state switch and gating, shuffle through the RLT,
// processor fuse switch, load-use stall.
module tb_svp_top;
  import vp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0]  core_valid, core_ready, fifo_full;
  logic [31:0] core_data [4];
  logic        fuse_en = 0;
  logic [1:0]  fuse_src = 0, fuse_dst = 0, fuse_tid = 0;
  logic        tlt_we = 0;
  logic [6:0]  tlt_widx = 0;
  logic [5:0]  tlt_wpreg = 0;
  logic        cfg_we = 0, cfg_host_hi = 0;
  logic [1:0]  cfg_lanes_log2 = 2;
  logic [3:0]  cfg_vm_hi = 0;
  logic        vm_en = 0, vm_we = 0, vm_rvalid;
  logic [13:0] vm_addr = 0;
  logic [31:0] vm_wdata = 0, vm_rdata;
  logic [3:0]  lane_pg, alu_busy, ldst_busy;
  logic        vp_idle, stall_hazard, stall_full, shuf_conflict, alu_done, ldst_done;
  logic [4:0]  fifo_count [4];
  logic [1:0]  arb_port, lanes_log2;
  logic        mips_imem_we = 0, mips_dmem_we = 0;
  logic [11:0] mips_imem_waddr = 0, mips_dmem_addr = 0;
  logic [31:0] mips_imem_wdata = 0, mips_dmem_wdata = 0, mips_dmem_rdata;
  logic        mips_fuse_state, mips_fetch1_active, mips_decode1_active, mips_halted, mips_stall;
  logic [1:0]  mips_retired;
  logic [31:0] mips_pc;

  svp_top dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  // single <-> double conversions for the expected results
  function automatic real s2r(logic [31:0] a);
    logic [63:0] d;
    if (a[30:23] == 0) return 0.0;
    d = {a[31], 11'(int'(a[30:23]) - 127 + 1023), a[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction
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

  // ---------------- application cores: word queues ----------------
  logic [31:0] cq [4][$];
  always_comb for (int c = 0; c < 4; c++) begin
    core_valid[c] = cq[c].size() > 0;
    core_data[c]  = cq[c].size() > 0 ? cq[c][0] : 32'd0;
  end
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 4; c++) if (core_valid[c] && core_ready[c]) void'(cq[c].pop_front());

  function automatic void vins(int core, vop_e op, int d, int a, int b, int vl, int tid,
                               logic [31:0] data = 0, bit rlt = 0);
    vinstr_t i = '0;
    i.op = op; i.dst = 5'(d); i.src1 = 5'(a); i.src2 = 5'(b); i.vl = 2'(vl); i.tid = 2'(tid);
    i.use_rlt = rlt;
    cq[core].push_back(32'(i));
    if (has_data(op)) cq[core].push_back(data);
  endfunction

  // ---------------- mechanism counters ----------------
  int m_haz, m_lfull, m_cfull, m_rr, m_fuse, m_pg, m_mips_sw, m_mips_stall, m_conf;
  logic [1:0] last_port = 0;
  logic       mfs_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall_hazard) m_haz++;
    if (stall_full) m_lfull++;
    if (|(core_valid & ~core_ready & ~(fuse_en ? (4'b1 << fuse_dst) : 4'b0))) m_cfull++;
    if (dut.a_valid && dut.a_ready) begin
      if (arb_port != last_port) m_rr++;
      last_port <= arb_port;
    end
    if (fuse_en && dut.f_wr[fuse_dst] && dut.f_wr[fuse_src]) m_fuse++;
    if (lane_pg != 0) m_pg++;
    if (mips_fuse_state != mfs_q) m_mips_sw++;
    mfs_q <= mips_fuse_state;
    if (mips_stall) m_mips_stall++;
    if (shuf_conflict) m_conf++;
  end

  // ---------------- host and control-core helpers ----------------
  task automatic hwrite(int a, logic [31:0] d);
    vm_en = 1; vm_we = 1; vm_addr = 14'(a); vm_wdata = d;
    @(negedge clk);
    vm_en = 0; vm_we = 0;
  endtask
  task automatic hread(int a, output logic [31:0] d);
    vm_en = 1; vm_we = 0; vm_addr = 14'(a);
    @(negedge clk);
    vm_en = 0;
    d = vm_rdata;
  endtask
  task automatic config_vp(int L, logic [3:0] hi, bit host_hi);
    cfg_we = 1; cfg_lanes_log2 = 2'(L); cfg_vm_hi = hi; cfg_host_hi = host_hi;
    @(negedge clk);
    cfg_we = 0;
  endtask
  task automatic tlt_write(int t, int r, int p);
    tlt_we = 1; tlt_widx = 7'({2'(t), 5'(r)}); tlt_wpreg = 6'(p);
    @(negedge clk);
    tlt_we = 0;
  endtask
  task automatic drain();
    int quiet = 0;
    while (quiet < 40) begin
      @(negedge clk);
      if (cq[0].size() + cq[1].size() + cq[2].size() + cq[3].size() == 0 &&
          dut.f_empty == 4'hf && !dut.a_valid && vp_idle) quiet++;
      else quiet = 0;
    end
  endtask

  // ---------------- dual-pipeline processor program ----------------
  function automatic logic [31:0] itype(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  logic [31:0] mprog [12];
  initial begin
    mprog[0]  = itype(9, 0, 1, 32'h100);   // addiu r1, r0, 0x100
    mprog[1]  = itype(9, 0, 17, 32'h200);  // addiu r17, r0, 0x200
    mprog[2]  = itype(9, 0, 2, 4);         // addiu r2, r0, 4
    mprog[3]  = itype(9, 0, 3, 0);         // addiu r3, r0, 0
    mprog[4]  = {6'h3f, 26'd0};            // fuse switch
    mprog[5]  = itype(6'h23, 1, 4, 0);     // lw r4, 0(r1)
    mprog[6]  = {6'h00, 5'd3, 5'd4, 5'd3, 5'd0, 6'h21};   // addu r3, r3, r4
    mprog[7]  = itype(9, 1, 1, 4);         // addiu r1, r1, 4
    mprog[8]  = itype(9, 2, 2, 16'hffff);  // addiu r2, r2, -1
    mprog[9]  = itype(5, 2, 0, 16'hfffb);  // bne r2, r0, -5
    mprog[10] = itype(6'h2b, 1, 3, 0);     // sw r3, 0(r1)
    mprog[11] = 32'hffff_ffff;             // halt
  end

  logic [31:0] A [4][64], B [4][64];

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d, ex;
    m_haz = 0; m_lfull = 0; m_cfull = 0; m_rr = 0; m_fuse = 0; m_pg = 0;
    m_mips_sw = 0; m_mips_stall = 0; m_conf = 0;
    // load the processor's program and data while in reset
    @(negedge clk);
    for (int i = 0; i < 12; i++) begin
      mips_imem_we = 1; mips_imem_waddr = 12'(i); mips_imem_wdata = mprog[i]; @(negedge clk);
    end
    mips_imem_we = 0;
    for (int i = 0; i < 4; i++) begin
      mips_dmem_we = 1; mips_dmem_addr = 12'(64 + i); mips_dmem_wdata = 32'(i + 1); @(negedge clk);
      mips_dmem_addr = 12'(128 + i); mips_dmem_wdata = 32'(100 * (i + 1)); @(negedge clk);
    end
    mips_dmem_we = 0;
    rst_n = 1;
    @(negedge clk);

    // ---------- phase 1: four threads, VL 64, own registers ----------
    for (int t = 0; t < 4; t++)
      for (int r = 0; r < 4; r++) tlt_write(t, r, 4 * t + r);
    for (int t = 0; t < 4; t++)
      for (int i = 0; i < 64; i++) begin
        A[t][i] = {1'b0, 8'(118 + (i + t) % 16), 23'($urandom())};
        B[t][i] = {1'b0, 8'(118 + (i * 3 + t) % 16), 23'($urandom())};
        hwrite(256 * t + i, A[t][i]);          // N = 64t
        hwrite(256 * t + 64 + i, B[t][i]);     // N = 64t + 16
      end
    for (int t = 0; t < 4; t++) begin
      vins(t, OP_VLD, 0, 0, 0, 2, t, 32'(64 * t));
      vins(t, OP_VLD, 1, 0, 0, 2, t, 32'(64 * t + 16));
      vins(t, OP_VADD, 2, 0, 1, 2, t);
      vins(t, OP_VST, 0, 2, 0, 2, t, 32'(64 * t + 32));
    end
    for (int k = 0; k < 24; k++) vins(0, OP_VMUL, 3, 0, 1, 0, 0);   // dependent (WAW) flood
    drain();
    for (int t = 0; t < 4; t++)
      for (int i = 0; i < 64; i++) begin
        hread(256 * t + 128 + i, d);
        ex = r2s(s2r(A[t][i]) + s2r(B[t][i]));
        chk(d == ex, $sformatf("phase 1 thread %0d element %0d", t, i));
      end

    // ---------- phase 2: fusion of core 1 into thread 2, upper VM half ----------
    config_vp(2, 4'b0100, 1);
    for (int i = 0; i < 32; i++) hwrite(i, B[2][i]);     // thread 2's data, upper half, N = 0
    config_vp(2, 4'b0100, 0);
    for (int i = 0; i < 32; i++) hwrite(i, A[1][i]);     // thread 1's data, lower half, N = 0
    fuse_en = 1; fuse_src = 1; fuse_dst = 2; fuse_tid = 2;
    vins(1, OP_VLD, 0, 0, 0, 1, 1, 32'd0);
    vins(1, OP_VMUL_S, 1, 0, 0, 1, 1, 32'h4040_0000);   // * 3.0
    vins(1, OP_VST, 0, 1, 0, 1, 1, 32'd16);
    drain();
    fuse_en = 0;
    for (int i = 0; i < 32; i++) begin
      hread(64 + i, d);
      chk(d == r2s(s2r(A[1][i]) * 3.0), $sformatf("fusion: original stream element %0d", i));
    end
    config_vp(2, 4'b0100, 1);
    for (int i = 0; i < 32; i++) begin
      hread(64 + i, d);
      chk(d == r2s(s2r(B[2][i]) * 3.0), $sformatf("fusion: copied stream element %0d", i));
    end

    // ---------- phase 3: two lanes, VL 16, thread 3 ----------
    config_vp(1, 4'b0000, 0);
    chk(lanes_log2 == 1 && lane_pg == 4'b1100, "lane state 1 gates lanes 2 and 3");
    for (int i = 0; i < 16; i++) hwrite(1024 + i, A[3][i]);   // N = 256
    vins(3, OP_VLD, 0, 0, 0, 0, 3, 32'd256);
    vins(3, OP_VSUB_S, 1, 0, 0, 0, 3, 32'h3f80_0000);
    vins(3, OP_VST, 0, 1, 0, 0, 3, 32'd272);
    drain();
    for (int i = 0; i < 16; i++) begin
      hread(1088 + i, d);
      chk(d == r2s(s2r(A[3][i]) - 1.0), $sformatf("two-lane element %0d", i));
    end

    // ---------- phase 4: transpose with the RLT, thread 0 ----------
    config_vp(2, 4'b0000, 0);
    for (int i = 0; i < 16; i++) begin
      hwrite(1280 + i, A[0][i]);                       // N = 320
      hwrite(1296 + i, 32'(4 * (i % 4) + i / 4));      // N = 324
    end
    for (int l = 0; l < 4; l++) begin
      logic [31:0] w = 0;
      for (int k = 0; k < 8; k++) w[4*k +: 4] = 4'(k < 4 ? (k + l) % 4 : k);
      vins(0, OP_VRLT, 0, l, 0, 0, 0, w);
    end
    vins(0, OP_VLD, 0, 0, 0, 0, 0, 32'd320);
    vins(0, OP_VLD, 1, 0, 0, 0, 0, 32'd324);
    vins(0, OP_VSHUF, 2, 0, 1, 0, 0, 0, 1);
    vins(0, OP_VST, 0, 2, 0, 0, 0, 32'd328);
    drain();
    for (int i = 0; i < 16; i++) begin
      hread(1312 + 4 * (i % 4) + i / 4, d);
      chk(d == A[0][i], $sformatf("transpose element %0d", i));
    end

    // ---------- phase 5: the dual-pipeline processor ----------
    wait (mips_halted);
    repeat (6) @(negedge clk);
    mips_dmem_addr = 12'(64 + 4); #1 chk(mips_dmem_rdata == 10, "processor: sum of set 1");
    mips_dmem_addr = 12'(128 + 4); #1 chk(mips_dmem_rdata == 1000, "processor: sum of set 2 (fused copy)");

    // ---------- mechanisms ----------
    chk(m_haz > 0,   $sformatf("hazard stall happened (%0d)", m_haz));
    chk(m_lfull > 0, $sformatf("lane FIFO full happened (%0d)", m_lfull));
    chk(m_cfull > 0, $sformatf("core FIFO back-pressure happened (%0d)", m_cfull));
    chk(m_rr >= 8,   $sformatf("round-robin interleaving (%0d switches)", m_rr));
    chk(m_fuse > 0,  $sformatf("fusion duplication happened (%0d words)", m_fuse));
    chk(m_pg > 0,    $sformatf("lane gating happened (%0d cycles)", m_pg));
    chk(m_conf == 0, "no shuffle conflict");
    chk(m_mips_sw == 1, $sformatf("processor fuse switch happened (%0d)", m_mips_sw));
    chk(m_mips_stall > 0, $sformatf("processor load-use stall happened (%0d)", m_mips_stall));
    $display("mechanisms: hazard %0d, lane-full %0d, core-full %0d, rr %0d, fuse %0d, gated %0d, mips switch %0d, mips stall %0d",
             m_haz, m_lfull, m_cfull, m_rr, m_fuse, m_pg, m_mips_sw, m_mips_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
