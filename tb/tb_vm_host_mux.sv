// Self-checking test of the host-to-VM mux with four real banks behind it:
// for 1, 2 and 4 active lanes, host word i must land in bank i mod 2^L at
// bank address i >> L (low-order interleaving), the thread-state bit must
// move the host to the upper half of every bank, and host reads must return
// the written data one cycle later with h_rvalid.
module tb_vm_host_mux;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]  lanes_log2 = 2;
  logic        lvp_hi = 0, h_en = 0, h_we = 0, h_rvalid;
  logic [13:0] h_addr = 0;
  logic [31:0] h_wdata = 0, h_rdata;
  logic [3:0]  b_en;
  logic        b_we;
  logic [11:0] b_addr;
  logic [31:0] b_wdata;
  logic [31:0] b_rdata [4];
  logic [31:0] a_rdata [4];

  vm_host_mux dut (.*);
  for (genvar g = 0; g < 4; g++) begin : g_bank
    vm_bank u_bank (.clk, .a_en(1'b0), .a_we(1'b0), .a_addr(12'd0), .a_wdata(32'd0),
                    .a_rdata(a_rdata[g]), .b_en(b_en[g]), .b_we, .b_addr, .b_wdata,
                    .b_rdata(b_rdata[g]));
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
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
    chk(h_rvalid, "read valid one cycle later");
    d = h_rdata;
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int L = 2; L >= 0; L--) begin
      for (int hi = 0; hi < 2; hi++) begin
        lanes_log2 = 2'(L); lvp_hi = 1'(hi);
        for (int i = 0; i < 64; i++) hwrite(i, {8'(L), 8'(hi), 16'(i)});
        // look into the banks directly
        for (int i = 0; i < 64; i++) begin
          automatic int bank = i % (1 << L);
          automatic int addr = (i >> L) ^ (hi ? 2048 : 0);
          case (bank)
            0: chk(g_bank[0].u_bank.mem[addr] == {8'(L), 8'(hi), 16'(i)}, $sformatf("L=%0d word %0d", L, i));
            1: chk(g_bank[1].u_bank.mem[addr] == {8'(L), 8'(hi), 16'(i)}, $sformatf("L=%0d word %0d", L, i));
            2: chk(g_bank[2].u_bank.mem[addr] == {8'(L), 8'(hi), 16'(i)}, $sformatf("L=%0d word %0d", L, i));
            default: chk(g_bank[3].u_bank.mem[addr] == {8'(L), 8'(hi), 16'(i)}, $sformatf("L=%0d word %0d", L, i));
          endcase
        end
        for (int i = 0; i < 64; i++) begin
          hread(i, d);
          chk(d == {8'(L), 8'(hi), 16'(i)}, $sformatf("read back L=%0d hi=%0d word %0d", L, hi, i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
