// Self-checking test of the thread-fusion switch. Without fusion each
// core's words go to its own FIFO unchanged. With fusion on, every word of
// the source core goes to both the source and the destination FIFO; in the
// copy the thread-ID field of instruction words is replaced and operand
// words are passed untouched; the destination core is held off; a full
// destination FIFO stalls the source core.
module tb_fusion_switch;
  import vp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        fuse_en = 0;
  logic [1:0]  fuse_src = 0, fuse_dst = 1, fuse_tid = 1;
  logic [3:0]  in_valid = 0, in_ready, fifo_wr, fifo_full = 0;
  logic [31:0] in_data [4];
  logic [31:0] fifo_wdata [4];
  logic [31:0] got [4][$];
  logic [31:0] exp_w [4][$];
  int          stalls = 0;

  fusion_switch dut (.*);

  always @(posedge clk) if (rst_n)
    for (int p = 0; p < 4; p++) if (fifo_wr[p]) got[p].push_back(fifo_wdata[p]);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++) in_data[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      fuse_en = 1'(mode); fuse_src = 2; fuse_dst = 0; fuse_tid = 3;
      for (int p = 0; p < 4; p++) begin got[p] = {}; exp_w[p] = {}; end
      for (int i = 0; i < 400; i++) begin
        automatic bit pending [4];
        for (int p = 0; p < 4; p++) begin
          // core p sends an instruction (plus operand word when needed)
          in_valid[p] = 1'($urandom_range(0, 1));
          in_data[p] = {4'($urandom_range(0, 11)), 28'($urandom())};
          in_data[p][10:9] = 2'(p);
        end
        fifo_full = 4'($urandom_range(0, 15)) & 4'($urandom_range(0, 15));
        #1;
        for (int p = 0; p < 4; p++) begin
          pending[p] = in_valid[p] && in_ready[p];
          if (mode == 1 && p == 0) chk(!in_ready[0], "fusion target core held off");
          if (mode == 1 && p == 2 && in_valid[2] && fifo_full[0]) begin
            chk(!in_ready[2], "full copy FIFO stalls the source"); stalls++;
          end
        end
        for (int p = 0; p < 4; p++) if (pending[p]) begin
          exp_w[p].push_back(in_data[p]);
          if (mode == 1 && p == 2) exp_w[0].push_back({in_data[2][31:11], 2'd3, in_data[2][8:0]});
        end
        @(negedge clk);
        // operand word follows an accepted instruction that carries one
        for (int p = 0; p < 4; p++) begin
          in_valid[p] = pending[p] && has_data(vop_e'(in_data[p][31:28]));
          in_data[p] = $urandom();
        end
        fifo_full = 0;
        #1;
        for (int p = 0; p < 4; p++) if (in_valid[p] && in_ready[p]) begin
          exp_w[p].push_back(in_data[p]);
          if (mode == 1 && p == 2) exp_w[0].push_back(in_data[2]);
        end
        @(negedge clk);
        in_valid = 0;
      end
      for (int p = 0; p < 4; p++) begin
        chk(got[p].size() == exp_w[p].size(), $sformatf("mode %0d fifo %0d word count %0d/%0d",
            mode, p, got[p].size(), exp_w[p].size()));
        for (int k = 0; k < got[p].size() && k < exp_w[p].size(); k++)
          chk(got[p][k] == exp_w[p][k], $sformatf("mode %0d fifo %0d word %0d", mode, p, k));
      end
    end
    chk(stalls > 0, "source stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
