// Self-checking test of one lane's VRF slice: three synchronous read ports
// with enables (data one cycle after the address, held while the enable is
// low), two write ports, read-old-value on a same-cycle read and write.
module tb_vrf_bank;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]  re = 0;
  logic [7:0]  raddr [3];
  logic [31:0] rdata [3];
  logic [1:0]  we = 0;
  logic [7:0]  waddr [2];
  logic [31:0] wdata [2];
  logic [31:0] model [256];
  logic [31:0] exp_d [3];

  vrf_bank dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++) begin raddr[p] = 0; exp_d[p] = 0; end
    for (int p = 0; p < 2; p++) begin waddr[p] = 0; wdata[p] = 0; end
    @(negedge clk);
    for (int i = 0; i < 256; i += 2) begin
      we = 2'b11; waddr[0] = 8'(i); waddr[1] = 8'(i + 1);
      wdata[0] = $urandom(); wdata[1] = $urandom();
      model[i] = wdata[0]; model[i + 1] = wdata[1];
      @(negedge clk);
    end
    we = 0;
    re = 3'b111;
    for (int p = 0; p < 3; p++) raddr[p] = 8'(p);
    @(negedge clk);
    for (int p = 0; p < 3; p++) begin
      chk(rdata[p] == model[p], "read one cycle after address");
      exp_d[p] = model[p];
    end
    for (int i = 0; i < 8000; i++) begin
      re = 3'($urandom());
      for (int p = 0; p < 3; p++) raddr[p] = 8'($urandom_range(0, 31));
      we = 2'($urandom());
      waddr[0] = 8'($urandom_range(0, 31)); waddr[1] = 8'($urandom_range(0, 31));
      if (waddr[0] == waddr[1]) we[0] = 0;
      wdata[0] = $urandom(); wdata[1] = $urandom();
      for (int p = 0; p < 3; p++) if (re[p]) exp_d[p] = model[raddr[p]];
      @(posedge clk);
      for (int w = 0; w < 2; w++) if (we[w]) model[waddr[w]] = wdata[w];
      @(negedge clk);
      for (int p = 0; p < 3; p++) chk(rdata[p] == exp_d[p], $sformatf("port %0d addr %0d got %h exp %h we %b wa %0d %0d", p, raddr[p], rdata[p], exp_d[p], we, waddr[0], waddr[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
