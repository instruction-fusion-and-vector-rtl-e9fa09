// Self-checking test of the first-word-fall-through instruction FIFO:
// random pushes and pops against a queue model, full/empty flags, the
// 16-word capacity and the one-cycle fall-through latency.
module tb_vinstr_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [4:0] count;
  logic [31:0] model [$];

  vinstr_fifo dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(empty && !full, "empty after reset");
    // fill completely
    for (int i = 0; i < 20; i++) begin
      wr_en = 1; wr_data = 32'h1000 + i;
      if (i < 16) model.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 0;
    chk(full && count == 16, "full after 16 writes");
    chk(rd_data == 32'h1000, "head word falls through");
    // drain
    while (!empty) begin
      chk(rd_data == model.pop_front(), "drain order");
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    chk(model.size() == 0, "all 16 words came out");
    // one-cycle fall-through
    wr_en = 1; wr_data = 32'hABCD; @(negedge clk); wr_en = 0;
    chk(!empty && rd_data == 32'hABCD, "visible one cycle after write");
    rd_en = 1; @(negedge clk); rd_en = 0;
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      wr_en = $urandom_range(0, 1); wr_data = $urandom();
      rd_en = $urandom_range(0, 1);
      if (!empty) chk(rd_data == model[0], "random head");
      chk(empty == (model.size() == 0) && full == (model.size() == 16), "random flags");
      @(posedge clk);
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en && model.size() < 16 + (rd_en ? 1 : 0) && !full) model.push_back(wr_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
