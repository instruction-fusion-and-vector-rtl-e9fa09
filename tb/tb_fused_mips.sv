// Self-checking test of the two-pipeline processor with instruction fusion.
// A program sets up two data sets in normal (dual-issue) mode, switches to
// fused mode, runs one summing loop whose renamed copy works on the upper
// register bank and the second data set, switches back and combines the
// two results in a normal-mode pair. Checks: both sums and the combined
// results in data memory; the fuse state seen in both values; fetch unit 1
// and decode unit 1 idle throughout fused mode; both pipelines retiring
// together (46 paired write-backs); the load-use stall; the loop count set
// by pipeline 0's branch only; and a random-data repeat of the program.
module tb_fused_mips;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        imem_we = 0, dmem_we = 0;
  logic [11:0] imem_waddr = 0, dmem_addr = 0;
  logic [31:0] imem_wdata = 0, dmem_wdata = 0, dmem_rdata;
  logic        fuse_state, fetch1_active, decode1_active, halted, stall;
  logic [1:0]  retired;
  logic [31:0] pc;

  fused_mips dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // encodings
  function automatic logic [31:0] rtype(int fn, int rs, int rt, int rd);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'(fn)};
  endfunction
  function automatic logic [31:0] itype(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  localparam logic [31:0] FUSE = {6'h3f, 26'd0};
  localparam logic [31:0] HALT = 32'hffff_ffff;
  localparam logic [31:0] NOP  = 32'd0;

  logic [31:0] prog [20];
  initial begin
    prog[0]  = itype(9, 0, 1, 32'h100);      // addiu r1, r0, 0x100
    prog[1]  = itype(9, 0, 17, 32'h200);     // addiu r17, r0, 0x200
    prog[2]  = itype(9, 0, 2, 8);            // addiu r2, r0, 8
    prog[3]  = itype(9, 0, 18, 3);           // addiu r18, r0, 3 (copy's counter, unused for control)
    prog[4]  = itype(9, 0, 3, 0);            // addiu r3, r0, 0
    prog[5]  = itype(9, 0, 19, 0);           // addiu r19, r0, 0
    prog[6]  = FUSE;                         // fuse switch -> fused mode
    prog[7]  = itype(6'h23, 1, 4, 0);        // loop: lw r4, 0(r1)
    prog[8]  = rtype(6'h21, 3, 4, 3);        // addu r3, r3, r4   (load-use)
    prog[9]  = itype(9, 1, 1, 4);            // addiu r1, r1, 4
    prog[10] = itype(9, 2, 2, 16'hffff);     // addiu r2, r2, -1
    prog[11] = itype(5, 2, 0, 16'hfffb);     // bne r2, r0, loop
    prog[12] = itype(6'h2b, 1, 3, 0);        // sw r3, 0(r1)
    prog[13] = FUSE;                         // back to normal mode
    prog[14] = {6'h1c, 5'd3, 5'd3, 5'd5, 5'd0, 6'h02};   // mul r5, r3, r3
    prog[15] = rtype(6'h23, 19, 3, 6);       // subu r6, r19, r3
    prog[16] = itype(6'h2b, 0, 5, 32'h40);   // sw r5, 0x40(r0)
    prog[17] = itype(6'h2b, 0, 6, 32'h44);   // sw r6, 0x44(r0)
    prog[18] = HALT;
    prog[19] = NOP;
  end

  int cyc, n_fused, n_fetch1_fused, n_stall, n_dual_norm, n_dual_fused, n_switch;
  logic fs_q;
  always @(posedge clk) if (rst_n && retired == 2'b11) n_dual_norm++;   // all dual retirements
  always @(posedge clk) if (rst_n && !halted) begin
    cyc++;
    if (fuse_state) n_fused++;
    if (fuse_state && (fetch1_active || decode1_active)) n_fetch1_fused++;
    if (stall) n_stall++;
    if (retired == 2'b11 && fuse_state) n_dual_fused++;
    if (fuse_state != fs_q) n_switch++;
    fs_q <= fuse_state;
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int run = 0; run < 3; run++) begin
      logic [31:0] d1 [8], d2 [8];
      logic [31:0] s1, s2;
      rst_n = 0; fs_q = 0;
      cyc = 0; n_fused = 0; n_fetch1_fused = 0; n_stall = 0; n_dual_norm = 0;
      n_dual_fused = 0; n_switch = 0;
      @(negedge clk);
      for (int i = 0; i < 20; i++) begin
        imem_we = 1; imem_waddr = 12'(i); imem_wdata = prog[i]; @(negedge clk);
      end
      imem_we = 0;
      s1 = 0; s2 = 0;
      for (int i = 0; i < 8; i++) begin
        d1[i] = run == 0 ? 32'(i + 1) : $urandom();
        d2[i] = run == 0 ? 32'(10 * (i + 1)) : $urandom();
        s1 += d1[i]; s2 += d2[i];
        dmem_we = 1; dmem_addr = 12'(32'h100 / 4 + i); dmem_wdata = d1[i]; @(negedge clk);
        dmem_addr = 12'(32'h200 / 4 + i); dmem_wdata = d2[i]; @(negedge clk);
      end
      dmem_we = 0;
      rst_n = 1;
      wait (halted);
      repeat (6) @(negedge clk);
      dmem_addr = 12'(32'h120 / 4); #1 chk(dmem_rdata == s1, $sformatf("run %0d: sum of set 1", run));
      dmem_addr = 12'(32'h220 / 4); #1 chk(dmem_rdata == s2, $sformatf("run %0d: sum of set 2 (renamed copy)", run));
      dmem_addr = 12'(32'h40 / 4);  #1 chk(dmem_rdata == s1 * s1, $sformatf("run %0d: mul after fusion", run));
      dmem_addr = 12'(32'h44 / 4);  #1 chk(dmem_rdata == s2 - s1, $sformatf("run %0d: subu across banks", run));
      chk(dut.rf[18] == 32'(3 - 8), "copy's counter ran alongside");
      chk(dut.rf[2] == 0 && dut.rf[17] == 32'h220, "loop ran eight times");
      chk(n_switch == 2 && !fuse_state, "two mode switches");
      chk(n_fused > 0 && n_fetch1_fused == 0, "fetch 1 and decode 1 idle in fused mode");
      chk(n_dual_fused >= 40, $sformatf("both pipelines retire in fused mode (%0d)", n_dual_fused));
      // 3 + 2 normal-mode pairs and 41 fused instruction pairs
      chk(n_dual_norm == 46, $sformatf("dual retirements %0d (exp 46)", n_dual_norm));
      chk(n_stall >= 8, $sformatf("load-use stalls (%0d)", n_stall));
      // loop of 5 instructions + 1 stall, 8 iterations, plus redirect bubbles
      $display("run %0d: %0d cycles, %0d in fused mode, %0d stalls", run, cyc, n_fused, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
