// Two-pipeline MIPS-I-like multiscalar processor with a fused execution
// mode (instruction fusion).
//
// Two classic five-stage pipelines (fetch, decode, execute, memory,
// write-back) share one 32-entry register file and a dual-ported
// instruction and data memory. In normal mode each cycle fetches the pair
// of instructions at pc and pc+4 and issues one to each pipeline. The
// special instruction "fuse switch" toggles the one-bit fuse state. In
// fused mode only pipeline 0 fetches and decodes: one instruction per
// cycle, and decode unit 0 also produces a register-renamed copy for
// pipeline 1 in which the most significant bit of every register name is
// set (r2 -> r18), so the copy works on the upper register bank. Fetch
// unit 1 and decode unit 1 stay idle (fetch1_active, decode1_active);
// from execute on both pipelines always run. Branches of pipeline 1's
// copy are executed but do not steer the program counter.
//
// What follows the document: the two pipelines, the shared register file,
// the fuse state bit, the "fuse switch" instruction, renaming by setting
// the register-name MSB, idle fetch/decode of pipeline 1, single-cycle
// memories. This design's own choices: the instruction subset and the
// fuse-switch encoding (opcode 6'h3f), no branch delay slot (branches
// resolve in execute and flush the younger instructions), full forwarding
// from the memory and write-back stages with a one-cycle load-use stall,
// and static scheduling of the two instructions of a normal-mode pair:
// they read their operands in parallel, so the code must not let the
// second depend on the first (as with hand-scheduled code). When both
// pipelines write one register in the same cycle, pipeline 1 wins.
//
// Supported: ADDU SUBU AND OR SLT SLL (R-type), MUL (SPECIAL2), ADDIU
// ORI LUI LW SW BEQ BNE BLEZ BGTZ J, fuse switch. Others execute as NOPs.
// The all-ones word halts fetching (a simulation aid of this design).
// The register-use helper receives the whole fetch/decode record but looks
// only at the instruction word, so the record's pc and flag bits are
// unused there.
module fused_mips #(
  parameter int IMEM_WORDS = 4096,   // 16 KB instruction memory
  parameter int DMEM_WORDS = 4096    // 16 KB data memory
) (
  input  logic        clk,
  input  logic        rst_n,
  // program / data loading and inspection (load while held in reset)
  input  logic        imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  input  logic        dmem_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] dmem_addr,
  input  logic [31:0] dmem_wdata,
  output logic [31:0] dmem_rdata,
  // status
  output logic        fuse_state,
  output logic        fetch1_active,
  output logic        decode1_active,
  output logic        halted,
  output logic [1:0]  retired,        // instructions written back this cycle
  output logic        stall,
  output logic [31:0] pc
);
  localparam int IAW = $clog2(IMEM_WORDS);
  localparam int DAW = $clog2(DMEM_WORDS);
  localparam logic [5:0] OP_FUSE = 6'h3f;

  logic [31:0] imem [IMEM_WORDS];
  logic [31:0] dmem [DMEM_WORDS];
  logic [31:0] rf   [32];

  typedef enum logic [3:0] {A_ADD, A_SUB, A_AND, A_OR, A_SLT, A_SLL, A_MUL, A_LUI} alu_e;
  typedef enum logic [2:0] {B_NONE, B_EQ, B_NE, B_LEZ, B_GTZ, B_J} br_e;

  typedef struct packed {
    logic        v;
    logic [31:0] pc;
    logic [31:0] ins;
    logic        copy;   // renamed copy for pipeline 1 (fused mode)
  } ifid_t;

  typedef struct packed {
    logic        v;
    logic [31:0] pc;
    alu_e        alu;
    br_e         br;
    logic        use_imm, regw, memr, memw, steer;
    logic [4:0]  rs, rt, rd;
    logic [31:0] a, b, imm;
    logic [4:0]  sh;
  } idex_t;

  typedef struct packed {
    logic        v;
    logic        regw, memr, memw;
    logic [4:0]  rd;
    logic [31:0] res, sdata;
  } exmem_t;

  typedef struct packed {
    logic        v;
    logic        regw;
    logic [4:0]  rd;
    logic [31:0] res;
  } memwb_t;

  ifid_t  fd [2];
  idex_t  de [2];
  exmem_t em [2];
  memwb_t mw [2];

  logic        redirect;
  logic [31:0] redirect_pc;
  logic        fuse_dec;         // fuse switch in decode
  logic        load_use;

  // ---------------- register file (write-back bypass) ----------------
  function automatic logic [31:0] rf_read(logic [4:0] r);
    logic [31:0] v;
    v = (r == 0) ? 32'd0 : rf[r];
    if (mw[0].v && mw[0].regw && mw[0].rd == r && r != 0) v = mw[0].res;
    if (mw[1].v && mw[1].regw && mw[1].rd == r && r != 0) v = mw[1].res;
    return v;
  endfunction

  // ---------------- decode ----------------
  function automatic idex_t decode(ifid_t f);
    idex_t d;
    logic [5:0] opc, fn;
    logic [4:0] rs, rt, rd;
    opc = f.ins[31:26]; fn = f.ins[5:0];
    rs  = f.ins[25:21]; rt = f.ins[20:16]; rd = f.ins[15:11];
    if (f.copy) begin
      rs[4] = 1'b1; rt[4] = 1'b1; rd[4] = 1'b1;
    end
    d = '0;
    d.v = f.v; d.pc = f.pc; d.rs = rs; d.rt = rt;
    d.sh = f.ins[10:6];
    d.imm = {{16{f.ins[15]}}, f.ins[15:0]};
    d.alu = A_ADD; d.br = B_NONE;
    d.steer = !f.copy;
    case (opc)
      6'h00: begin
        d.rd = rd; d.regw = 1'b1;
        case (fn)
          6'h21: d.alu = A_ADD;
          6'h23: d.alu = A_SUB;
          6'h24: d.alu = A_AND;
          6'h25: d.alu = A_OR;
          6'h2a: d.alu = A_SLT;
          6'h00: d.alu = A_SLL;
          default: d.regw = 1'b0;
        endcase
      end
      6'h1c: begin d.rd = rd; d.regw = (fn == 6'h02); d.alu = A_MUL; end
      6'h09: begin d.rd = rt; d.regw = 1'b1; d.use_imm = 1'b1; end
      6'h0d: begin d.rd = rt; d.regw = 1'b1; d.use_imm = 1'b1; d.alu = A_OR;
                   d.imm = {16'd0, f.ins[15:0]}; end
      6'h0f: begin d.rd = rt; d.regw = 1'b1; d.use_imm = 1'b1; d.alu = A_LUI; end
      6'h23: begin d.rd = rt; d.regw = 1'b1; d.use_imm = 1'b1; d.memr = 1'b1; end
      6'h2b: begin d.use_imm = 1'b1; d.memw = 1'b1; end
      6'h04: d.br = B_EQ;
      6'h05: d.br = B_NE;
      6'h06: d.br = B_LEZ;
      6'h07: d.br = B_GTZ;
      6'h02: begin d.br = B_J; d.imm = {f.pc[31:28], f.ins[25:0], 2'b00}; end
      default: ;
    endcase
    if (d.rd == 0) d.regw = 1'b0;
    d.a = rf_read(rs);
    d.b = rf_read(rt);
    return d;
  endfunction

  function automatic logic reads_reg(ifid_t f, logic [4:0] r);
    logic [5:0] opc;
    logic [4:0] rs, rt;
    opc = f.ins[31:26];
    rs = f.ins[25:21]; rt = f.ins[20:16];
    if (f.copy) begin rs[4] = 1'b1; rt[4] = 1'b1; end
    if (!f.v || r == 0 || opc == OP_FUSE || opc == 6'h02) return 1'b0;
    if (opc == 6'h00 || opc == 6'h1c || opc == 6'h2b || opc == 6'h04 || opc == 6'h05)
      return rs == r || rt == r;
    return rs == r;
  endfunction

  // ---------------- forwarding into execute ----------------
  function automatic logic [31:0] fwd(logic [4:0] r, logic [31:0] v);
    logic [31:0] o;
    o = v;
    if (r != 0) begin
      if (mw[0].v && mw[0].regw && mw[0].rd == r) o = mw[0].res;
      if (mw[1].v && mw[1].regw && mw[1].rd == r) o = mw[1].res;
      if (em[0].v && em[0].regw && !em[0].memr && em[0].rd == r) o = em[0].res;
      if (em[1].v && em[1].regw && !em[1].memr && em[1].rd == r) o = em[1].res;
    end
    return o;
  endfunction

  logic [31:0] ex_a [2], ex_b [2], ex_res [2];
  logic        ex_taken [2];

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      logic [31:0] bb;
      ex_a[p] = fwd(de[p].rs, de[p].a);
      ex_b[p] = fwd(de[p].rt, de[p].b);
      bb = de[p].use_imm ? de[p].imm : ex_b[p];
      case (de[p].alu)
        A_SUB:   ex_res[p] = ex_a[p] - bb;
        A_AND:   ex_res[p] = ex_a[p] & bb;
        A_OR:    ex_res[p] = ex_a[p] | bb;
        A_SLT:   ex_res[p] = {31'd0, $signed(ex_a[p]) < $signed(bb)};
        A_SLL:   ex_res[p] = ex_b[p] << de[p].sh;
        A_MUL:   ex_res[p] = ex_a[p] * bb;
        A_LUI:   ex_res[p] = {de[p].imm[15:0], 16'd0};
        default: ex_res[p] = ex_a[p] + bb;
      endcase
      case (de[p].br)
        B_EQ:    ex_taken[p] = ex_a[p] == ex_b[p];
        B_NE:    ex_taken[p] = ex_a[p] != ex_b[p];
        B_LEZ:   ex_taken[p] = $signed(ex_a[p]) <= 0;
        B_GTZ:   ex_taken[p] = $signed(ex_a[p]) > 0;
        B_J:     ex_taken[p] = 1'b1;
        default: ex_taken[p] = 1'b0;
      endcase
      ex_taken[p] = ex_taken[p] && de[p].v && de[p].steer;
    end
  end

  // a taken branch in pipeline 0 squashes pipeline 1's (younger) pair member
  wire take0 = ex_taken[0];
  wire take1 = ex_taken[1] && !take0;
  assign redirect    = take0 || take1;
  assign redirect_pc = take0 ? ((de[0].br == B_J) ? de[0].imm : de[0].pc + 4 + (de[0].imm << 2))
                             : ((de[1].br == B_J) ? de[1].imm : de[1].pc + 4 + (de[1].imm << 2));

  // load-use hazard: a load in execute feeds an instruction in decode
  always_comb begin
    load_use = 1'b0;
    for (int p = 0; p < 2; p++)
      for (int q = 0; q < 2; q++)
        if (de[p].v && de[p].memr && reads_reg(fd[q], de[p].rd)) load_use = 1'b1;
  end
  assign stall = load_use && !redirect;

  // a fuse switch or halt may sit in either slot of a normal-mode pair;
  // in slot 1 the older slot-0 instruction still issues
  wire  halt0 = fd[0].v && fd[0].ins == 32'hffff_ffff;
  wire  halt1 = !fuse_state && fd[1].v && fd[1].ins == 32'hffff_ffff;
  wire  fuse0 = fd[0].v && fd[0].ins[31:26] == OP_FUSE && !halt0;
  wire  fuse1 = !fuse_state && fd[1].v && fd[1].ins[31:26] == OP_FUSE && !halt1;
  assign fuse_dec = fuse0 || (fuse1 && !halt0);
  wire  halt_dec = halt0 || (halt1 && !fuse0);
  logic halt_q;

  assign fetch1_active  = !fuse_state && !halt_q;
  assign decode1_active = !fuse_state && fd[1].v;
  assign halted         = halt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0;
      fuse_state <= 1'b0;
      halt_q <= 1'b0;
      for (int i = 0; i < 32; i++) rf[i] <= '0;
      for (int p = 0; p < 2; p++) begin
        fd[p] <= '0; de[p] <= '0; em[p] <= '0; mw[p] <= '0;
      end
    end else begin
      // write-back
      for (int p = 0; p < 2; p++)
        if (mw[p].v && mw[p].regw) rf[mw[p].rd] <= mw[p].res;
      // memory
      for (int p = 0; p < 2; p++) begin
        mw[p].v    <= em[p].v;
        mw[p].regw <= em[p].regw;
        mw[p].rd   <= em[p].rd;
        mw[p].res  <= em[p].memr ? dmem[em[p].res[DAW+1:2]] : em[p].res;
      end
      // execute
      for (int p = 0; p < 2; p++) begin
        em[p].v     <= de[p].v && !(p == 1 && take0 && !fuse_state);
        em[p].regw  <= de[p].regw;
        em[p].memr  <= de[p].memr;
        em[p].memw  <= de[p].memw;
        em[p].rd    <= de[p].rd;
        em[p].res   <= ex_res[p];
        em[p].sdata <= ex_b[p];
      end
      // decode
      if (redirect) begin
        de[0] <= '0; de[1] <= '0;
        fd[0] <= '0; fd[1] <= '0;
        pc <= redirect_pc;
      end else if (stall) begin
        de[0] <= '0; de[1] <= '0;
      end else begin
        de[0] <= decode(fd[0]);
        if (fuse_state) de[1] <= decode('{v: fd[0].v, pc: fd[0].pc, ins: fd[0].ins, copy: 1'b1});
        else            de[1] <= decode(fd[1]);
        if (fuse_dec || halt_dec) begin
          // the switch (or halt) itself does nothing further; refetch after it
          if (fuse0 || halt0) de[0] <= '0;
          de[1] <= '0;
          fd[0] <= '0; fd[1] <= '0;
          if (fuse_dec) begin
            fuse_state <= !fuse_state;
            pc <= fuse0 ? fd[0].pc + 4 : fd[1].pc + 4;
          end else begin
            halt_q <= 1'b1;
          end
        end else if (!halt_q) begin
          // fetch
          fd[0] <= '{v: 1'b1, pc: pc, ins: imem[pc[IAW+1:2]], copy: 1'b0};
          if (fuse_state) begin
            fd[1] <= '0;
            pc    <= pc + 4;
          end else begin
            fd[1] <= '{v: 1'b1, pc: pc + 4, ins: imem[IAW'(pc[IAW+1:2] + 1'b1)], copy: 1'b0};
            pc    <= pc + 8;
          end
        end else begin
          fd[0] <= '0; fd[1] <= '0;
        end
      end
    end
  end

  // data memory: stores of both pipelines (pipeline 1 wins on the same
  // word) and the loading port
  always_ff @(posedge clk) begin
    if (dmem_we) dmem[dmem_addr] <= dmem_wdata;
    for (int p = 0; p < 2; p++)
      if (em[p].v && em[p].memw) dmem[em[p].res[DAW+1:2]] <= em[p].sdata;
  end

  always_ff @(posedge clk)
    if (imem_we) imem[imem_waddr] <= imem_wdata;

  assign dmem_rdata = dmem[dmem_addr];
  assign retired    = {mw[1].v, mw[0].v};

endmodule
