// Benchmark-style workloads on the vector processor core, four threads
// sharing it at the default size (four lanes, 64 KB VM, 1024-element VRF).
// Instructions of the four threads are interleaved one by one, as the
// round-robin arbitrator would hand them over.
//   MM:  16x16 single-precision matrix product per thread, one result row
//        per loop iteration, built from scalar-vector multiplies of rows of
//        the second matrix and vector-vector additions, with only two
//        vector registers (VL 16);
//   VDP: the vector part of a dot product of two 2*VL-element vectors per
//        thread for VL 16, 32 and 64: two vector multiplies, then two
//        vector additions that fold the products into a running
//        partial-sum vector kept in VM; the host adds the final VL
//        partial sums.
// Matrix and vector elements are small integers, so every single-precision
// result is exact and is compared with integer arithmetic. Each kernel's
// cycle count is printed; a lower bound from the ALU work (elements per
// lane plus the idle decoder cycle per operation) is checked, since no run
// can beat the lanes' issue rate.
module tb_vp_bench;
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

  typedef struct { vop_e op; int d, a, b, vl, tid; logic [31:0] data; } ins_t;
  ins_t prog [4][$];

  function automatic logic [31:0] f(int n);   // small integer as float
    return (n == 0) ? 32'd0 : r2s(real'(n));
  endfunction

  // run the four threads' lists interleaved one instruction at a time
  task automatic run_all(output int cycles);
    int t, t0;
    bit more;
    t0 = cyc;
    do begin
      more = 0;
      for (int th = 0; th < 4; th++)
        if (prog[th].size() > 0) begin
          ins_t x = prog[th].pop_front();
          send(x.op, x.d, x.a, x.b, x.vl, x.tid, x.data, t);
          more = 1;
        end
    end while (more);
    wait_idle();
    cycles = cyc - t0;
  endtask

  task automatic add(int th, vop_e op, int d, int a, int b, int vl, logic [31:0] data);
    ins_t x;
    x.op = op; x.d = d; x.a = a; x.b = b; x.vl = vl; x.tid = th; x.data = data;
    prog[th].push_back(x);
  endtask

  int MA [4][16][16], MB [4][16][16];
  int VA [4][128], VB [4][128], VS [4][64];

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cycles, alu_ops, bound, expv;
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---------------- MM, 16x16, four threads ----------------
    // thread th: A at host th*1024, B at +256, C at +512 (row k of B: N = base/4 + 4k)
    for (int th = 0; th < 4; th++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          MA[th][i][j] = $urandom_range(0, 15);
          MB[th][i][j] = $urandom_range(0, 15);
          hwrite(th * 1024 + 16 * i + j, f(MA[th][i][j]));
          hwrite(th * 1024 + 256 + 16 * i + j, f(MB[th][i][j]));
        end
    for (int th = 0; th < 4; th++)
      for (int i = 0; i < 16; i++) begin
        add(th, OP_VLD, 1, 0, 0, 0, 32'(th * 256 + 64));
        add(th, OP_VMUL_S, 1, 1, 0, 0, f(MA[th][i][0]));
        for (int k = 1; k < 16; k++) begin
          add(th, OP_VLD, 0, 0, 0, 0, 32'(th * 256 + 64 + 4 * k));
          add(th, OP_VMUL_S, 0, 0, 0, 0, f(MA[th][i][k]));
          add(th, OP_VADD, 1, 1, 0, 0, 0);
        end
        add(th, OP_VST, 0, 1, 0, 0, 32'(th * 256 + 128 + 4 * i));
      end
    run_all(cycles);
    // ALU operations: 4 threads x 16 rows x 31, 4 elements per lane + 1 idle
    alu_ops = 4 * 16 * 31;
    bound = alu_ops * 5;
    $display("MM 16x16 x4 threads: %0d cycles (ALU issue bound %0d)", cycles, bound);
    chk(cycles >= bound, "MM no faster than the ALU issue rate");
    for (int th = 0; th < 4; th++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          expv = 0;
          for (int k = 0; k < 16; k++) expv += MA[th][i][k] * MB[th][k][j];
          hread(th * 1024 + 512 + 16 * i + j, d);
          chk(d == f(expv), $sformatf("MM thread %0d C[%0d][%0d] = %h exp %0d", th, i, j, d, expv));
        end
    // ---------------- VDP, VL 16 / 32 / 64, four threads ----------------
    for (int vc = 0; vc < 3; vc++) begin
      automatic int vl = 16 << vc;
      // thread th: a at th*1024 (2*VL), b at +256 (2*VL), partial sums S at +512
      for (int th = 0; th < 4; th++) begin
        for (int i = 0; i < 2 * vl; i++) begin
          VA[th][i] = $urandom_range(0, 31);
          VB[th][i] = $urandom_range(0, 31);
          hwrite(th * 1024 + i, f(VA[th][i]));
          hwrite(th * 1024 + 256 + i, f(VB[th][i]));
        end
        for (int i = 0; i < vl; i++) begin
          VS[th][i] = $urandom_range(0, 255);
          hwrite(th * 1024 + 512 + i, f(VS[th][i]));
        end
        add(th, OP_VLD, 0, 0, 0, vc, 32'(th * 256));
        add(th, OP_VLD, 1, 0, 0, vc, 32'(th * 256 + 64));
        add(th, OP_VMUL, 2, 0, 1, vc, 0);
        add(th, OP_VLD, 0, 0, 0, vc, 32'(th * 256 + vl / 4));
        add(th, OP_VLD, 1, 0, 0, vc, 32'(th * 256 + 64 + vl / 4));
        add(th, OP_VMUL, 3, 0, 1, vc, 0);
        add(th, OP_VADD, 2, 2, 3, vc, 0);
        add(th, OP_VLD, 3, 0, 0, vc, 32'(th * 256 + 128));
        add(th, OP_VADD, 2, 2, 3, vc, 0);
        add(th, OP_VST, 0, 2, 0, vc, 32'(th * 256 + 128));
      end
      run_all(cycles);
      // four ALU operations per thread, VL/4 elements per lane + 1 idle
      bound = 4 * 4 * (vl / 4 + 1);
      $display("VDP VL %0d x4 threads: %0d cycles (ALU issue bound %0d)", vl, cycles, bound);
      chk(cycles >= bound, $sformatf("VDP VL %0d no faster than the ALU issue rate", vl));
      for (int th = 0; th < 4; th++) begin
        automatic int total = 0, got = 0;
        for (int i = 0; i < vl; i++) begin
          expv = VS[th][i] + VA[th][i] * VB[th][i] + VA[th][vl + i] * VB[th][vl + i];
          total += expv;
          hread(th * 1024 + 512 + i, d);
          chk(d == f(expv), $sformatf("VDP VL %0d thread %0d partial %0d", vl, th, i));
          got += int'(s2r(d));
        end
        chk(got == total, $sformatf("VDP VL %0d thread %0d dot product", vl, th));
      end
    end
    chk(n_haz > 0, "hazard stalls between dependent instructions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
