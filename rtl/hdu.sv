// Hazard detection for one vector thread.
//
// Following the document, the module keeps two slots holding the last ALU
// and the last LDST instruction of its thread that entered the lanes, and
// two counters of that thread's ALU and LDST instructions still in the
// lanes. A counter goes up when an instruction of its type is issued and
// down when the lanes report one complete. An incoming instruction is
// checked against each slot whose counter is non-zero for RAW (it reads
// the slot's destination), WAW (same destination) and WAR (it writes a
// register the slot reads); on a match 'hazard' stays high until that
// counter reaches zero. Register names compared are physical names.
// Only the latest instruction of each type is kept, as the document
// describes; older instructions of the same type are not compared.
module hdu #(
  parameter int PREG_W = 6,
  parameter int CNT_W  = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction in the hazard-detection stage
  input  logic              chk_valid,
  input  vp_pkg::vop_e      chk_op,
  input  logic [PREG_W-1:0] chk_dst,
  input  logic [PREG_W-1:0] chk_src1,
  input  logic [PREG_W-1:0] chk_src2,
  output logic              hazard,
  // the checked instruction leaves for the lanes this cycle
  input  logic              issue,
  // completions reported by the lanes for this thread
  input  logic              alu_done,
  input  logic              ldst_done,
  output logic [CNT_W-1:0]  alu_cnt,
  output logic [CNT_W-1:0]  ldst_cnt
);
  import vp_pkg::*;

  typedef struct packed {
    vop_e              op;
    logic [PREG_W-1:0] dst, src1, src2;
  } slot_t;

  slot_t slot [2];          // 0: ALU, 1: LDST

  function automatic logic conflict(slot_t s, vop_e op, logic [PREG_W-1:0] d,
                                    logic [PREG_W-1:0] a, logic [PREG_W-1:0] b);
    logic raw, waw, war;
    raw = writes_dst(s.op) && ((reads_src1(op) && a == s.dst) ||
                               (reads_src2(op) && b == s.dst));
    waw = writes_dst(s.op) && writes_dst(op) && d == s.dst;
    war = writes_dst(op) && ((reads_src1(s.op) && d == s.src1) ||
                             (reads_src2(s.op) && d == s.src2));
    return raw || waw || war;
  endfunction

  always_comb begin
    hazard = 1'b0;
    if (chk_valid) begin
      if (alu_cnt != 0 && conflict(slot[0], chk_op, chk_dst, chk_src1, chk_src2))
        hazard = 1'b1;
      if (ldst_cnt != 0 && conflict(slot[1], chk_op, chk_dst, chk_src1, chk_src2))
        hazard = 1'b1;
    end
  end

  wire is_l = is_ldst(chk_op);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot[0]  <= '{op: OP_NOP, default: '0};
      slot[1]  <= '{op: OP_NOP, default: '0};
      alu_cnt  <= '0;
      ldst_cnt <= '0;
    end else begin
      if (issue) slot[is_l] <= '{op: chk_op, dst: chk_dst, src1: chk_src1, src2: chk_src2};
      alu_cnt  <= alu_cnt  + CNT_W'(issue && !is_l) - CNT_W'(alu_done);
      ldst_cnt <= ldst_cnt + CNT_W'(issue &&  is_l) - CNT_W'(ldst_done);
    end
  end

endmodule
