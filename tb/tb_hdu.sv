// Self-checking test of the per-thread hazard detection unit. Directed
// cases: RAW, WAW and WAR against the last ALU and the last LDST slot, no
// hazard for independent registers, the hazard clearing exactly when the
// slot's in-flight counter returns to zero, and no hazard against a slot
// whose instructions have all completed. A random phase compares 'hazard'
// with a reference model of the two slots.
module tb_hdu;
  import vp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       chk_valid = 0;
  vop_e       chk_op = OP_NOP;
  logic [5:0] chk_dst = 0, chk_src1 = 0, chk_src2 = 0;
  logic       hazard, issue = 0, alu_done = 0, ldst_done = 0;
  logic [4:0] alu_cnt, ldst_cnt;

  hdu dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // present an instruction and see if it is flagged; issue it if asked
  task automatic probe(vop_e op, int d, int a, int b, bit exp, string what, bit do_issue = 0);
    chk_valid = 1; chk_op = op; chk_dst = 6'(d); chk_src1 = 6'(a); chk_src2 = 6'(b);
    #1 chk(hazard == exp, what);
    issue = do_issue;
    @(negedge clk);
    issue = 0; chk_valid = 0;
  endtask

  // reference model
  typedef struct { vop_e op; logic [5:0] d, a, b; } slot_t;
  slot_t ms [2];
  int    mc [2];
  function automatic bit conflict_ref(slot_t s, vop_e op, logic [5:0] d, logic [5:0] a, logic [5:0] b);
    bit raw, waw, war;
    raw = writes_dst(s.op) && ((reads_src1(op) && a == s.d) || (reads_src2(op) && b == s.d));
    waw = writes_dst(s.op) && writes_dst(op) && d == s.d;
    war = writes_dst(op) && ((reads_src1(s.op) && d == s.a) || (reads_src2(s.op) && d == s.b));
    return raw || waw || war;
  endfunction

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    vop_e ops [10] = '{OP_VADD, OP_VADD_S, OP_VSUB, OP_VMUL, OP_VMUL_S, OP_VLD, OP_VLD_S,
                       OP_VST, OP_VST_S, OP_VSHUF};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    probe(OP_VADD, 1, 2, 3, 0, "nothing in flight", 1);      // ALU slot: v1 = v2 + v3
    probe(OP_VMUL, 4, 1, 5, 1, "RAW on ALU slot");
    probe(OP_VMUL, 2, 6, 7, 1, "WAR on ALU slot");
    probe(OP_VLD,  1, 0, 0, 1, "WAW on ALU slot");
    probe(OP_VMUL, 8, 6, 7, 0, "independent", 1);            // ALU slot now v8 = v6 * v7
    probe(OP_VADD, 9, 1, 3, 0, "older ALU instruction not kept");
    probe(OP_VST,  0, 10, 0, 0, "store independent", 1);     // LDST slot: store v10
    probe(OP_VADD, 10, 4, 5, 1, "WAR on LDST slot (store source)");
    probe(OP_VLD,  11, 0, 0, 0, "load to a free register");
    chk(alu_cnt == 2 && ldst_cnt == 1, "in-flight counters");
    // complete the two ALU instructions: ALU-slot hazards must clear at zero
    chk_valid = 1; chk_op = OP_VADD; chk_dst = 12; chk_src1 = 8; chk_src2 = 0;
    #1 chk(hazard == 1, "RAW on v8 while ALU count is 2");
    alu_done = 1; @(negedge clk); alu_done = 0;
    #1 chk(hazard == 1, "RAW still while ALU count is 1");
    alu_done = 1; @(negedge clk); alu_done = 0;
    #1 chk(hazard == 0 && alu_cnt == 0, "RAW cleared when ALU count reaches 0");
    chk_valid = 0;
    ldst_done = 1; @(negedge clk); ldst_done = 0;
    probe(OP_VADD, 10, 4, 5, 0, "LDST slot retired");
    // random phase with a reference model
    ms[0] = '{OP_NOP, 0, 0, 0}; ms[1] = '{OP_NOP, 0, 0, 0}; mc = '{0, 0};
    for (int i = 0; i < 4000; i++) begin
      bit exp, l;
      chk_valid = 1'($urandom_range(0, 3) != 0);
      chk_op = ops[$urandom_range(0, 9)];
      chk_dst = 6'($urandom_range(0, 7)); chk_src1 = 6'($urandom_range(0, 7));
      chk_src2 = 6'($urandom_range(0, 7));
      exp = chk_valid && ((mc[0] != 0 && conflict_ref(ms[0], chk_op, chk_dst, chk_src1, chk_src2)) ||
                          (mc[1] != 0 && conflict_ref(ms[1], chk_op, chk_dst, chk_src1, chk_src2)));
      alu_done  = 1'(mc[0] > 0 && $urandom_range(0, 2) == 0);
      ldst_done = 1'(mc[1] > 0 && $urandom_range(0, 2) == 0);
      issue = chk_valid && !exp && (mc[0] < 20) && (mc[1] < 20);
      #1 chk(hazard == exp, $sformatf("random %0d", i));
      l = is_ldst(chk_op);
      @(posedge clk);
      if (issue) begin ms[l] = '{chk_op, chk_dst, chk_src1, chk_src2}; mc[l]++; end
      if (alu_done) mc[0]--;
      if (ldst_done) mc[1]--;
      @(negedge clk);
      chk(alu_cnt == 5'(mc[0]) && ldst_cnt == 5'(mc[1]), "random counters");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
