// Self-checking test of the thread translation table: identity mapping
// after reset, random writes against a model array, and three independent
// combinational read ports that see a write from the next cycle on.
module tb_tlt;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       wr_en = 0;
  logic [6:0] wr_idx = 0;
  logic [5:0] wr_preg = 0;
  logic [6:0] rd_idx [3];
  logic [5:0] rd_preg [3];
  logic [5:0] model [128];

  tlt dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++) rd_idx[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 128; i++) begin
      model[i] = 6'(i % 32);
      rd_idx[i % 3] = 7'(i);
      #1 chk(rd_preg[i % 3] == model[i], $sformatf("reset identity %0d", i));
    end
    for (int i = 0; i < 3000; i++) begin
      wr_en = 1'($urandom_range(0, 1));
      wr_idx = 7'($urandom()); wr_preg = 6'($urandom());
      for (int p = 0; p < 3; p++) rd_idx[p] = 7'($urandom());
      #1;
      for (int p = 0; p < 3; p++)
        chk(rd_preg[p] == model[rd_idx[p]], $sformatf("port %0d idx %0d", p, rd_idx[p]));
      @(posedge clk);
      if (wr_en) model[wr_idx] = wr_preg;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
