// Self-checking test of one true dual-port vector memory bank: random
// reads and writes on both ports against a model, one-cycle read latency,
// read data held while a port is idle.
module tb_vm_bank;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [11:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [4096];
  logic [31:0] ea, eb;
  bit          ra, rb;

  vm_bank dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(negedge clk);
    // initialise every word through port A
    for (int i = 0; i < 4096; i++) begin
      a_en = 1; a_we = 1; a_addr = 12'(i); a_wdata = $urandom(); model[i] = a_wdata;
      @(negedge clk);
    end
    a_we = 0;
    for (int i = 0; i < 6000; i++) begin
      a_en = 1'($urandom_range(0, 1)); a_we = 1'($urandom_range(0, 1));
      b_en = 1'($urandom_range(0, 1)); b_we = 1'($urandom_range(0, 1));
      a_addr = 12'($urandom_range(0, 63)); b_addr = 12'($urandom_range(0, 63));
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) b_we = 0;
      a_wdata = $urandom(); b_wdata = $urandom();
      ra = a_en && !a_we; rb = b_en && !b_we;
      ea = model[a_addr]; eb = model[b_addr];
      @(posedge clk);
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      if (ra) chk(a_rdata == ea, "port A read");
      if (rb) chk(b_rdata == eb, "port B read");
      if (ra) begin
        a_en = 0;
        @(negedge clk);
        chk(a_rdata == ea, "port A data held while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
